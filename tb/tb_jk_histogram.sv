// tb_jk_histogram: drives jk_histogram the way the kernel does: runs of
// updates that share one jackknife label, one update per cycle, the bank
// rotating as j mod 4 with j restarting at a random value each run, and idle
// gaps between runs. A reference model counts every histogram except the
// label's. After two passes (with a clear between them) every bank-summed
// count is read back and compared; the readout latency of 2 cycles is checked.
module tb_jk_histogram;
  import tpacf_pkg::*;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               upd_valid, clr_valid, rd_valid, rd_out_valid;
  logic [BIN_W-1:0]   upd_bin, clr_bin, rd_bin;
  logic [BANK_W-1:0]  upd_bank;
  logic [JK_W-1:0]    upd_jk, rd_hist;
  logic [COUNT_W+1:0] rd_count;
  int                 checks = 0, failures = 0;
  longint             model [NHIST][NBINS];

  always #5 clk = ~clk;

  jk_histogram dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_all();
    for (int b = 0; b < NBINS; b++) begin
      @(negedge clk); clr_valid = 1'b1; clr_bin = BIN_W'(b);
    end
    @(negedge clk); clr_valid = 1'b0;
    for (int h = 0; h < NHIST; h++) for (int b = 0; b < NBINS; b++) model[h][b] = 0;
  endtask

  task automatic run_updates(int runs);
    for (int r = 0; r < runs; r++) begin
      int j, len;
      logic [JK_W-1:0] jk;
      jk  = JK_W'($urandom % (NHIST + 1));       // 0..11: includes labels outside 1..10
      j   = $urandom % 64;
      len = 1 + $urandom % 60;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        upd_valid = 1'b1;
        upd_bank  = BANK_W'(j);
        upd_jk    = jk;
        // skew towards few bins so the same counter is hit often
        upd_bin   = ($urandom % 3 == 0) ? BIN_W'($urandom) : BIN_W'($urandom % 3);
        for (int h = 0; h < NHIST; h++) if (h != int'(jk)) model[h][upd_bin]++;
        j++;
      end
      @(negedge clk); upd_valid = 1'b0;
      repeat (1 + $urandom % 3) @(negedge clk);
    end
  endtask

  task automatic read_all();
    for (int h = 0; h < NHIST; h++) for (int b = 0; b < NBINS; b++) begin
      @(negedge clk);
      rd_valid = 1'b1; rd_hist = JK_W'(h); rd_bin = BIN_W'(b);
      @(negedge clk);
      rd_valid = 1'b0;
      checks++;
      if (rd_out_valid) begin failures++; $display("readout too early"); end
      @(negedge clk);
      checks++;
      if (!rd_out_valid || longint'(rd_count) != model[h][b]) begin
        failures++;
        if (failures < 10) $display("hist %0d bin %0d: got %0d expected %0d (valid %b)",
                                    h, b, rd_count, model[h][b], rd_out_valid);
      end
    end
  endtask

  initial begin
    upd_valid = 1'b0; clr_valid = 1'b0; rd_valid = 1'b0;
    upd_bin = '0; upd_bank = '0; upd_jk = '0; clr_bin = '0; rd_hist = '0; rd_bin = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    clear_all();
    run_updates(300);
    read_all();
    clear_all();
    run_updates(200);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
