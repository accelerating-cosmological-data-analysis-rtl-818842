// tb_bin_search: loads the 31 bin boundaries of a 0.01 .. 10000 arcmin
// logarithmic binning (5 bins per decade, boundaries in cosine space) through
// the shift-register port, then streams dot products and checks each bin index
// against a linear count of the boundaries the value lies below. Test values
// are cosines of log-uniform random angles, the boundaries themselves and
// their immediate neighbours, and values beyond both ends of the range.
// Also checks the tag, the BIN_W-cycle latency, and that the boundaries agree
// with the published values for this binning (0.999999999995769, ...).
module tb_bin_search;
  import tpacf_pkg::*;

  localparam int  N = 20000;
  localparam real PI = 3.14159265358979323846;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             load_valid, in_valid, out_valid;
  fp64_t            load_data, dot;
  pair_tag_t        in_tag, out_tag;
  logic [BIN_W-1:0] out_bin;
  int               checks = 0, failures = 0, cycle = 0;
  real              bnd [NBOUND];
  int               hits [NBINS];

  typedef struct { logic [BIN_W-1:0] b; pair_tag_t t; int c; } exp_t;
  exp_t exp_q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  bin_search dut (.*);

  function automatic real arcmin_cos(real am);
    return $cos(am / 60.0 * PI / 180.0);
  endfunction

  function automatic int ref_bin(real d);
    int n = 0;
    for (int k = 0; k < NBOUND; k++) if (d < bnd[k]) n++;
    return n;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    e = exp_q.pop_front();
    hits[out_bin]++;
    if (out_bin !== e.b || out_tag !== e.t || cycle - e.c != BIN_W) begin
      failures++;
      if (failures < 10) $display("mismatch: bin %0d/%0d tag %h/%h latency %0d",
                                  out_bin, e.b, out_tag, e.t, cycle - e.c);
    end
  end

  initial begin
    int sent;
    real d;
    int unsigned sel;
    load_valid = 1'b0; load_data = '0; in_valid = 1'b0; in_tag = '0; dot = '0;
    for (int k = 0; k < NBINS; k++) hits[k] = 0;
    for (int k = 0; k < NBOUND; k++) bnd[k] = arcmin_cos($pow(10.0, -2.0 + real'(k) / 5.0));
    // the first nine boundaries of this binning, as published for it
    begin
      real pub [9] = '{0.999999999995769, 0.999999999989373, 0.999999999973305,
                       0.999999999932946, 0.999999999831569, 0.999999999576920,
                       0.999999998937272, 0.999999997330547, 0.999999993294638};
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (bnd[k] - pub[k] > 1.0e-15 || pub[k] - bnd[k] > 1.0e-15) begin
          failures++;
          $display("boundary %0d: %0.15f, published %0.15f", k, bnd[k], pub[k]);
        end
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // a stale value first: it must be shifted out by the 31 real ones
    @(negedge clk); load_valid = 1'b1; load_data = $realtobits(-2.0);
    for (int k = 0; k < NBOUND; k++) begin
      @(negedge clk); load_valid = 1'b1; load_data = $realtobits(bnd[k]);
    end
    @(negedge clk); load_valid = 1'b0;
    sent = 0;
    while (sent < N) begin
      @(negedge clk);
      in_valid = ($urandom % 6) != 0;
      sel = $urandom % 4;
      unique case (sel)
        0: d = bnd[$urandom % NBOUND];                                    // exactly on a boundary
        1: begin
             fp64_t f;
             f = $realtobits(bnd[$urandom % NBOUND]);
             f = 64'(f) + (($urandom % 2) != 0 ? 64'd1 : -64'd1);            // one ulp either side
             d = $bitstoreal(f);
           end
        2: d = real'($urandom % 2000001) / 1.0e6 - 1.0;                   // anywhere in [-1, 1]
        default: d = arcmin_cos($pow(10.0, -3.0 + real'($urandom % 80001) / 10000.0));
      endcase
      dot    = $realtobits(d);
      in_tag = pair_tag_t'($urandom);
      if (in_valid) begin
        exp_q.push_back('{b: BIN_W'(ref_bin(d)), t: in_tag, c: cycle});
        sent++;
      end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (BIN_W + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("results missing"); end
    for (int k = 0; k < NBINS; k++) begin
      checks++;
      if (hits[k] == 0) begin failures++; $display("bin %0d never produced", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
