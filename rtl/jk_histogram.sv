// jk_histogram: the kernel's bin counters, with jackknife updates and four-way
// bank interleaving.
//
// There are NHIST = 11 histograms of NBINS = 32 counters. Histogram 0 holds the
// full-sample counts; histograms 1..10 each leave out one jackknife subsample.
// A pair whose outer-loop point carries label jk increments bin `bin` of every
// histogram h with h != jk, all in the same cycle (with labels 1..10, histogram
// 0 is always updated).
//
// Each histogram is split into NBANKS = 4 banks, and a pair updates only bank
// (j mod 4) of its inner-loop index j. An increment is a read-modify-write:
// the counter is read at the clock edge that accepts the update and written at
// the next edge. Two updates of the same bank in consecutive cycles would read
// a stale count; rotating over four banks keeps every bank at least four
// cycles apart while pairs stream at one per cycle. An assertion checks that
// no bank is updated in two consecutive cycles. The true count of a bin is the
// sum of its four bank counters, formed on readout as (b0 + b1) + (b2 + b3).
//
// Ports:
//   upd_valid/bin/bank/jk  one update per cycle
//   clr_valid/clr_bin      zero bin clr_bin in every bank of every histogram
//   rd_valid/hist/bin      read the bank-summed count; rd_count / rd_out_valid
//                          follow 2 cycles later
// Counters are COUNT_W = 32 bits (the kernel's int) and wrap on overflow.
module jk_histogram
  import tpacf_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                upd_valid,
  input  logic [BIN_W-1:0]    upd_bin,
  input  logic [BANK_W-1:0]   upd_bank,
  input  logic [JK_W-1:0]     upd_jk,
  input  logic                clr_valid,
  input  logic [BIN_W-1:0]    clr_bin,
  input  logic                rd_valid,
  input  logic [JK_W-1:0]     rd_hist,
  input  logic [BIN_W-1:0]    rd_bin,
  output logic                rd_out_valid,
  output logic [COUNT_W+1:0]  rd_count
);

  // read stage of the read-modify-write
  logic                a_valid;
  logic [BIN_W-1:0]    a_bin;
  logic [BANK_W-1:0]   a_bank;
  logic [JK_W-1:0]     a_jk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_valid <= 1'b0;
    else        a_valid <= upd_valid;
  end
  always_ff @(posedge clk) begin
    a_bin  <= upd_bin;
    a_bank <= upd_bank;
    a_jk   <= upd_jk;
  end

  // readout: bank counters of the selected histogram, then their sum
  logic [COUNT_W-1:0] rd_bank_q [NHIST][NBANKS];
  logic               r_valid;
  logic [JK_W-1:0]    r_hist;

  for (genvar h = 0; h < NHIST; h++) begin : g_hist
    for (genvar k = 0; k < NBANKS; k++) begin : g_bank
      logic [COUNT_W-1:0] mem [NBINS];
      logic [COUNT_W-1:0] rmw_q;
      logic               inc;

      assign inc = a_valid && (a_bank == BANK_W'(k)) && (a_jk != JK_W'(h));

      always_ff @(posedge clk) begin
        rmw_q <= mem[upd_bin];
        if (clr_valid)
          mem[clr_bin] <= '0;
        else if (inc)
          mem[a_bin] <= rmw_q + COUNT_W'(1);
        rd_bank_q[h][k] <= mem[rd_bin];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid      <= 1'b0;
      rd_out_valid <= 1'b0;
    end else begin
      r_valid      <= rd_valid;
      rd_out_valid <= r_valid;
    end
  end

  always_ff @(posedge clk) begin
    r_hist   <= rd_hist;
    rd_count <= ((COUNT_W+2)'(rd_bank_q[r_hist][0]) + (COUNT_W+2)'(rd_bank_q[r_hist][1]))
              + ((COUNT_W+2)'(rd_bank_q[r_hist][2]) + (COUNT_W+2)'(rd_bank_q[r_hist][3]));
  end

  // a bank may not be updated in two consecutive cycles (stale read otherwise)
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(upd_valid && a_valid && upd_bank == a_bank))
    else $error("jk_histogram: bank %0d updated in consecutive cycles", upd_bank);

endmodule
