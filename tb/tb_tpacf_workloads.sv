// tb_tpacf_workloads: the two kernel workloads of the evaluation, DD/RR
// (self count of one point set, Algorithm 1) and DR (cross count of two sets,
// Algorithm 2), run at 4,096 points per set instead of 32,768 so that the
// simulation stays short. The shape of each run is that of the full workload:
// 31 logarithmic bin boundaries from 0.01 to 10000 arcmin, 10 jackknife
// labels, the second set stored right after the first.
//
// All 11 x 32 counts are checked against a reference. The cycle count of each
// run gives the cost per pair and per outer point; from those the testbench
// extrapolates the kernel time at 32,768 points per set and a 100 MHz clock
// and checks it against the measured FPGA kernel times of the source design
// (5.436 s for DD or RR, 10.816 s for DR), allowing 2 %: those measurements
// include host-side overheads this model does not have.
module tb_tpacf_workloads;
  import tpacf_pkg::*;

  localparam int unsigned RD_LAT = 2;
  localparam real         PI     = 3.14159265358979323846;
  localparam int          NB     = 30;
  localparam int          NSIM   = 4096;
  localparam real         NFULL  = 32768.0;
  localparam real         FCLK   = 100.0e6;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              start, do_self, busy, done;
  logic [ADDR_W:0]   n1, n2;
  logic [BIN_W:0]    nb;
  logic              mem_rd_en   [NARR];
  logic [ADDR_W-1:0] mem_rd_addr [NARR];
  logic [63:0]       mem_rd_data [NARR];
  logic              mem_wr_en;
  logic [ADDR_W-1:0] mem_wr_addr;
  logic [63:0]       mem_wr_data;

  int     checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cross_correlation dut (.*);

  logic [63:0] mem [NARR][MEM_DEPTH];
  logic [63:0] rd_pipe [NARR][RD_LAT];

  always @(posedge clk) begin
    for (int a = 0; a < NARR; a++) begin
      rd_pipe[a][0] <= mem[a][mem_rd_addr[a]];
      for (int k = 1; k < RD_LAT; k++) rd_pipe[a][k] <= rd_pipe[a][k-1];
    end
    if (mem_wr_en) mem[ARR_BINV][mem_wr_addr] <= mem_wr_data;
  end
  always_comb for (int a = 0; a < NARR; a++) mem_rd_data[a] = rd_pipe[a][RD_LAT-1];

  real bnd [NBOUND];
  real px [MEM_DEPTH], py [MEM_DEPTH], pz [MEM_DEPTH];

  function automatic int ref_bin(real d);
    // binary search over decreasing boundaries: number of boundaries above d
    int lo = 0, hi = NBOUND;
    while (lo < hi) begin
      int mid = (lo + hi) / 2;
      if (d < bnd[mid]) lo = mid + 1; else hi = mid;
    end
    return lo;
  endfunction

  task automatic make_point(int idx);
    real th, phi, sx, sy, sz;
    th  = $pow(10.0, -2.5 + real'($urandom % 70001) / 10000.0) / 60.0 * PI / 180.0;
    phi = real'($urandom % 1000000) / 1000000.0 * 2.0 * PI;
    sx = $sin(th) * $cos(phi); sy = $sin(th) * $sin(phi); sz = $cos(th);
    px[idx] = sx;
    py[idx] = sy * $cos(PI / 5.0) - sz * $sin(PI / 5.0);
    pz[idx] = sy * $sin(PI / 5.0) + sz * $cos(PI / 5.0);
  endtask

  task automatic run_workload(string name, bit self, real t_meas);
    longint tot [NBINS];
    longint per_jk [NHIST + 5][NBINS];
    longint pairs, t0, t1, outer;
    real    per_outer, full_pairs, full_outer, t_full;
    int     a_n1, a_n2, iend;
    a_n1 = NSIM; a_n2 = NSIM;
    for (int k = 0; k < NBOUND; k++) mem[ARR_BINV][a_n1 + k] = $realtobits(bnd[k]);
    for (int b = 0; b < NBINS; b++) begin
      tot[b] = 0;
      for (int h = 0; h < NHIST + 5; h++) per_jk[h][b] = 0;
    end
    pairs = 0;
    iend  = self ? a_n1 - 1 : a_n1;
    for (int i = 0; i < iend; i++) begin
      int  jk;
      real xi, yi, zi;
      jk = int'($bitstoreal(mem[ARR_JK][i]));
      xi = $bitstoreal(mem[ARR_X1][i]); yi = $bitstoreal(mem[ARR_Y1][i]); zi = $bitstoreal(mem[ARR_Z1][i]);
      for (int j = (self ? i + 1 : 0); j < a_n2; j++) begin
        int off, b;
        off = self ? j : a_n1 + j;
        b = ref_bin((xi * $bitstoreal(mem[ARR_X2][off]) + yi * $bitstoreal(mem[ARR_Y2][off]))
                    + zi * $bitstoreal(mem[ARR_Z2][off]));
        tot[b]++;
        per_jk[jk][b]++;
        pairs++;
      end
    end
    @(negedge clk);
    n1 = (ADDR_W+1)'(a_n1); n2 = (ADDR_W+1)'(a_n2); nb = (BIN_W+1)'(NB); do_self = self;
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t1 = cycle;
    for (int h = 0; h < NHIST; h++) for (int b = 0; b < NB + 2; b++) begin
      longint e;
      e = tot[b] - per_jk[h][b];          // every pair except those labelled h
      checks++;
      if ($bitstoreal(mem[ARR_BINV][h * (NB + 2) + b]) != real'(e)) begin
        failures++;
        if (failures < 10) $display("%s hist %0d bin %0d: got %0f expected %0d", name, h, b,
                                    $bitstoreal(mem[ARR_BINV][h * (NB + 2) + b]), e);
      end
    end
    // extrapolate to the full-size workload
    outer      = iend;
    per_outer  = real'(t1 - t0 - pairs) / real'(outer);
    full_pairs = self ? NFULL * (NFULL - 1.0) / 2.0 : NFULL * NFULL;
    full_outer = self ? NFULL - 1.0 : NFULL;
    t_full     = (full_pairs + full_outer * per_outer) / FCLK;
    $display("%s: %0d pairs in %0d cycles (%0.2f extra cycles per outer point); at 32768 points: %0.3f s, measured on the FPGA %0.3f s",
             name, pairs, t1 - t0, per_outer, t_full, t_meas);
    checks++;
    if (t_full < t_meas * 0.98 || t_full > t_meas * 1.02) begin
      failures++;
      $display("%s: extrapolated time %0.3f s is not within 2%% of %0.3f s", name, t_full, t_meas);
    end
    checks++;
    if (per_outer > real'(RD_LAT + 3)) begin
      failures++;
      $display("%s: %0.2f cycles of overhead per outer point", name, per_outer);
    end
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; do_self = 1'b0; n1 = '0; n2 = '0; nb = '0;
    for (int a = 0; a < NARR; a++) for (int k = 0; k < RD_LAT; k++) rd_pipe[a][k] = '0;
    for (int k = 0; k < NBOUND; k++) bnd[k] = $cos($pow(10.0, -2.0 + real'(k) / 5.0) / 60.0 * PI / 180.0);
    for (int i = 0; i < 2 * NSIM; i++) begin
      make_point(i);
      mem[ARR_X1][i] = $realtobits(px[i]); mem[ARR_X2][i] = $realtobits(px[i]);
      mem[ARR_Y1][i] = $realtobits(py[i]); mem[ARR_Y2][i] = $realtobits(py[i]);
      mem[ARR_Z1][i] = $realtobits(pz[i]); mem[ARR_Z2][i] = $realtobits(pz[i]);
      mem[ARR_JK][i] = $realtobits(real'(1 + ($urandom % NJK)));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_workload("DD (Algorithm 1)", 1'b1, 5.436);
    run_workload("DR (Algorithm 2)", 1'b0, 10.816);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
