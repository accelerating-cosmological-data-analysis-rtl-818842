// tb_fp64_mul: streams random binary64 operand pairs through fp64_mul, one per
// cycle, and compares every product bit for bit with the simulator's own
// double-precision multiply (round to nearest even). Also checks zero
// operands and the two-cycle latency.
module tb_fp64_mul;
  import tpacf_pkg::*;

  localparam int N = 20000;

  logic  clk = 1'b0;
  fp64_t a, b, p;
  int    checks = 0, failures = 0;
  fp64_t exp_q [$];

  always #5 clk = ~clk;

  fp64_mul dut (.clk, .a, .b, .p);

  function automatic fp64_t rand_fp(input int unsigned emin, input int unsigned emax);
    fp64_t r;
    r.sign = 1'($urandom);
    r.exp  = 11'(emin + ($urandom % (emax - emin + 1)));
    r.frac = {20'($urandom), 32'($urandom)};
    return r;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    for (int k = 0; k < N + MUL_LAT; k++) begin
      @(negedge clk);
      if (k >= MUL_LAT) begin
        fp64_t e;
        e = exp_q.pop_front();
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h expected %h", p, e);
        end
      end
      if (k < N) begin
        if (k % 97 == 0) begin
          a = rand_fp(1000, 1030); b = '0; b.sign = 1'($urandom);
        end else if (k % 89 == 0) begin
          a = 64'h3FF0_0000_0000_0000; b = rand_fp(900, 1100);   // 1.0 * x
        end else begin
          a = rand_fp(900, 1030); b = rand_fp(900, 1030);
        end
        exp_q.push_back(fp64_t'($realtobits($bitstoreal(a) * $bitstoreal(b))));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
