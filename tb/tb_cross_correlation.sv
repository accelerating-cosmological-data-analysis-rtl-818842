// tb_cross_correlation: end-to-end test of the TPACF bin-count kernel at its
// default parameters.
//
// The testbench holds the eight SRAM arrays itself, with the same read latency
// the kernel is built for, and loads them as the host would: a clustered set
// of points on the unit sphere (so that pair separations cover the whole
// 0.01 .. 10000 arcmin range), their jackknife labels 1..10 stored as doubles,
// and the 31 boundaries of 5-per-decade logarithmic bins in cosine space at
// BINV[n1 ..]. It then runs
//   1. a DD count (do_self = 1) on the first set,
//   2. a DR count (do_self = 0) of the first set against a second one,
//   3. a second DD count with fewer points, to show counts are cleared,
//   4. two calls without any pair (DR with n2 = 0, DD with n1 = 1),
// and after each compares all 11 x 32 counts written back to BINV with a
// reference computed here in double precision with the same dot-product
// order and bin rule. It checks the cycle count against one pair per cycle
// plus RD_LAT + 2 cycles per outer point and the fixed phases, and counts how
// often each mechanism occurred: self and cross mode, pairs excluded from a
// jackknife histogram, each of the four counter banks, pairs below the first
// and beyond the last boundary.
module tb_cross_correlation;
  import tpacf_pkg::*;

  localparam int unsigned RD_LAT = 2;           // default of the kernel
  localparam real         PI     = 3.14159265358979323846;
  localparam int          NB     = 30;

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
  // mechanism counters
  int     n_self_runs = 0, n_cross_runs = 0, n_excluded = 0, n_under = 0, n_over = 0;
  int     n_bank [NBANKS];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cross_correlation dut (.*);

  // ---- SRAM arrays with RD_LAT-cycle reads -------------------------------------
  logic [63:0] mem [NARR][MEM_DEPTH];
  logic [63:0] rd_pipe [NARR][RD_LAT];

  always @(posedge clk) begin
    for (int a = 0; a < NARR; a++) begin
      rd_pipe[a][0] <= mem_rd_en[a] ? mem[a][mem_rd_addr[a]] : 64'hDEAD_BEEF_DEAD_BEEF;
      for (int k = 1; k < RD_LAT; k++) rd_pipe[a][k] <= rd_pipe[a][k-1];
    end
    if (mem_wr_en) mem[ARR_BINV][mem_wr_addr] <= mem_wr_data;
  end
  always_comb for (int a = 0; a < NARR; a++) mem_rd_data[a] = rd_pipe[a][RD_LAT-1];


  // ---- data set --------------------------------------------------------------
  real bnd [NBOUND];
  real px [MEM_DEPTH], py [MEM_DEPTH], pz [MEM_DEPTH];

  function automatic real arcmin_cos(real am);
    return $cos(am / 60.0 * PI / 180.0);
  endfunction

  // a point at angle th (arcmin) from the pole (0,0,1), azimuth phi, rotated
  // to a common centre direction
  task automatic make_point(int idx);
    real th, phi, sx, sy, sz;
    th  = $pow(10.0, -2.5 + real'($urandom % 70001) / 10000.0) / 60.0 * PI / 180.0;
    phi = real'($urandom % 1000000) / 1000000.0 * 2.0 * PI;
    sx = $sin(th) * $cos(phi); sy = $sin(th) * $sin(phi); sz = $cos(th);
    // rotate by 30 degrees about the x axis so no coordinate is trivially 0/1
    px[idx] = sx;
    py[idx] = sy * $cos(PI / 6.0) - sz * $sin(PI / 6.0);
    pz[idx] = sy * $sin(PI / 6.0) + sz * $cos(PI / 6.0);
  endtask

  function automatic int ref_bin(real d);
    int n = 0;
    for (int k = 0; k < NBOUND; k++) if (d < bnd[k]) n++;
    return n;
  endfunction

  // ---- one kernel call and its check -------------------------------------------
  task automatic run_and_check(int a_n1, int a_n2, bit self);
    longint ref_cnt [NHIST][NBINS];
    longint pairs, t0, t1, limit;
    int     iend;
    // host side: data, labels, boundaries
    for (int k = 0; k < NBOUND; k++) mem[ARR_BINV][a_n1 + k] = $realtobits(bnd[k]);
    // reference
    for (int h = 0; h < NHIST; h++) for (int b = 0; b < NBINS; b++) ref_cnt[h][b] = 0;
    pairs = 0;
    iend  = self ? a_n1 - 1 : a_n1;
    for (int i = 0; i < iend; i++) begin
      int jk;
      jk = int'($bitstoreal(mem[ARR_JK][i]));
      for (int j = (self ? i + 1 : 0); j < a_n2; j++) begin
        int  off, b;
        real d;
        off = self ? j : a_n1 + j;
        d = ($bitstoreal(mem[ARR_X1][i]) * $bitstoreal(mem[ARR_X2][off]) +
             $bitstoreal(mem[ARR_Y1][i]) * $bitstoreal(mem[ARR_Y2][off])) +
             $bitstoreal(mem[ARR_Z1][i]) * $bitstoreal(mem[ARR_Z2][off]);
        b = ref_bin(d);
        if (b == 0)      n_under++;
        if (b == NBINS-1) n_over++;
        for (int h = 0; h < NHIST; h++)
          if (h != jk) ref_cnt[h][b]++;
          else         n_excluded++;
        n_bank[j % NBANKS]++;
        pairs++;
      end
    end
    // kernel call
    @(negedge clk);
    n1 = (ADDR_W+1)'(a_n1); n2 = (ADDR_W+1)'(a_n2); nb = (BIN_W+1)'(NB); do_self = self;
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    t1 = cycle;
    if (self) n_self_runs++; else n_cross_runs++;
    // results
    for (int h = 0; h < NHIST; h++) for (int b = 0; b < NB + 2; b++) begin
      real got;
      got = $bitstoreal(mem[ARR_BINV][h * (NB + 2) + b]);
      checks++;
      if (got != real'(ref_cnt[h][b])) begin
        failures++;
        if (failures < 10) $display("n1=%0d self=%0d hist %0d bin %0d: got %0f expected %0d",
                                    a_n1, self, h, b, got, ref_cnt[h][b]);
      end
    end
    // timing: one pair per cycle plus per-outer-point and fixed overheads
    limit = pairs + longint'(iend) * (RD_LAT + 2) + (NB + 1) + (RD_LAT + 1) + (NB + 2)
            + (RD_LAT + DOT_LAT + BIN_W + 5) + NHIST * (NB + 2) + 6;
    checks++;
    if (t1 - t0 > limit || t1 - t0 < pairs) begin
      failures++;
      $display("n1=%0d self=%0d: %0d cycles for %0d pairs, limit %0d", a_n1, self, t1 - t0, pairs, limit);
    end
    $display("n1=%0d n2=%0d self=%0d: %0d pairs in %0d cycles", a_n1, a_n2, self, pairs, t1 - t0);
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nd, nr;
    start = 1'b0; do_self = 1'b0; n1 = '0; n2 = '0; nb = '0;
    for (int k = 0; k < NBANKS; k++) n_bank[k] = 0;
    for (int k = 0; k < NBOUND; k++) bnd[k] = arcmin_cos($pow(10.0, -2.0 + real'(k) / 5.0));
    nd = 240; nr = 160;
    for (int i = 0; i < nd + nr; i++) begin
      make_point(i);
      mem[ARR_X1][i] = $realtobits(px[i]); mem[ARR_X2][i] = $realtobits(px[i]);
      mem[ARR_Y1][i] = $realtobits(py[i]); mem[ARR_Y2][i] = $realtobits(py[i]);
      mem[ARR_Z1][i] = $realtobits(pz[i]); mem[ARR_Z2][i] = $realtobits(pz[i]);
      mem[ARR_JK][i] = $realtobits(real'(1 + (i % NJK)));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    run_and_check(nd, nd, 1'b1);          // DD
    run_and_check(nd, nr, 1'b0);          // DR: second set at n1 .. n1+n2-1
    run_and_check(nd / 3, nd / 3, 1'b1);  // smaller DD: stale counts must be gone
    run_and_check(nd, 0, 1'b0);           // DR with an empty second set: every inner loop empty
    run_and_check(1, 1, 1'b1);            // DD of a single point: no pairs at all

    // every mechanism must have happened
    checks++; if (n_self_runs == 0)  begin failures++; $display("self mode never ran");  end
    checks++; if (n_cross_runs == 0) begin failures++; $display("cross mode never ran"); end
    checks++; if (n_excluded == 0)   begin failures++; $display("no jackknife exclusion"); end
    checks++; if (n_under == 0)      begin failures++; $display("no pair below range"); end
    checks++; if (n_over == 0)       begin failures++; $display("no pair beyond range"); end
    for (int k = 0; k < NBANKS; k++) begin
      checks++; if (n_bank[k] == 0) begin failures++; $display("bank %0d never used", k); end
    end
    $display("mechanisms: self %0d cross %0d excluded %0d under %0d over %0d banks %0d/%0d/%0d/%0d",
             n_self_runs, n_cross_runs, n_excluded, n_under, n_over,
             n_bank[0], n_bank[1], n_bank[2], n_bank[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
