// tb_fp64_add: streams random binary64 operand pairs through fp64_add, one per
// cycle, and compares each sum bit for bit with the simulator's own double
// addition. The operands mix like and unlike signs, close and distant
// exponents, exact cancellation and zero, so that carries, long
// renormalisation shifts, sticky bits and ties are all exercised.
module tb_fp64_add;
  import tpacf_pkg::*;

  localparam int N = 40000;

  logic  clk = 1'b0;
  fp64_t a, b, s;
  int    checks = 0, failures = 0;
  fp64_t exp_q [$];

  always #5 clk = ~clk;

  fp64_add dut (.clk, .a, .b, .s);

  function automatic fp64_t rand_fp(input int unsigned emin, input int unsigned emax);
    fp64_t r;
    r.sign = 1'($urandom);
    r.exp  = 11'(emin + ($urandom % (emax - emin + 1)));
    r.frac = {20'($urandom), 32'($urandom)};
    return r;
  endfunction

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    for (int k = 0; k < N + ADD_LAT; k++) begin
      @(negedge clk);
      if (k >= ADD_LAT) begin
        fp64_t e;
        e = exp_q.pop_front();
        checks++;
        if (s !== e) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h expected %h", s, e);
        end
      end
      if (k < N) begin
        case (k % 8)
          0: begin a = rand_fp(1000, 1023); b = a; b.sign = ~a.sign; end    // x + (-x)
          1: begin a = rand_fp(1000, 1023); b = '0; end                      // x + 0
          2: begin a = rand_fp(1000, 1023); b = a; b.sign = ~a.sign;          // near cancellation
                   b.frac = a.frac ^ 52'(1 << ($urandom % 20)); end
          3: begin a = rand_fp(1010, 1023); b = rand_fp(950, 1023); end      // wide spread
          4: begin a = rand_fp(1020, 1023); b = rand_fp(1020, 1023);
                   b.sign = a.sign; end                                      // carries
          default: begin a = rand_fp(1015, 1023); b = rand_fp(1015, 1023); end
        endcase
        exp_q.push_back(fp64_t'($realtobits($bitstoreal(a) + $bitstoreal(b))));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
