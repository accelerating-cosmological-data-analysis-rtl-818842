// tb_dot_product: feeds random pairs of unit vectors into dot_product, with
// random gaps in the valid stream, and checks every result bit for bit against
// the simulator's double-precision evaluation of (x1*x2 + y1*y2) + z1*z2. It
// also checks that the tag comes out with its own pair and that the result
// appears exactly DOT_LAT cycles after the operands.
module tb_dot_product;
  import tpacf_pkg::*;

  localparam int N = 20000;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      in_valid, out_valid;
  pair_tag_t in_tag, out_tag;
  fp64_t     x1, y1, z1, x2, y2, z2, dot;
  int        checks = 0, failures = 0;
  int        cycle = 0;

  typedef struct { fp64_t d; pair_tag_t t; int c; } exp_t;
  exp_t exp_q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  dot_product dut (.*);

  task automatic rand_unit(output fp64_t x, output fp64_t y, output fp64_t z);
    real a, b, c, n;
    a = real'($urandom % 2000001) / 1.0e6 - 1.0;
    b = real'($urandom % 2000001) / 1.0e6 - 1.0;
    c = real'($urandom % 2000001) / 1.0e6 - 1.0;
    n = $sqrt(a*a + b*b + c*c) + 1.0e-9;
    x = $realtobits(a / n); y = $realtobits(b / n); z = $realtobits(c / n);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare outputs
  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      e = exp_q.pop_front();
      if (dot !== e.d || out_tag !== e.t || cycle - e.c != DOT_LAT) begin
        failures++;
        if (failures < 10)
          $display("mismatch: dot %h/%h tag %h/%h latency %0d", dot, e.d, out_tag, e.t, cycle - e.c);
      end
    end
  end

  initial begin
    int sent;
    in_valid = 1'b0; in_tag = '0;
    x1 = '0; y1 = '0; z1 = '0; x2 = '0; y2 = '0; z2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sent = 0;
    while (sent < N) begin
      @(negedge clk);
      in_valid = ($urandom % 8) != 0;
      rand_unit(x1, y1, z1);
      rand_unit(x2, y2, z2);
      in_tag = pair_tag_t'($urandom);
      if (sent % 50 == 0) begin x2 = x1; y2 = y1; z2 = z1; end   // identical points
      if (in_valid) begin
        exp_q.push_back('{d: fp64_t'($realtobits(($bitstoreal(x1) * $bitstoreal(x2) +
                                                  $bitstoreal(y1) * $bitstoreal(y2)) +
                                                  $bitstoreal(z1) * $bitstoreal(z2))),
                          t: in_tag, c: cycle});
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (DOT_LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
