// cross_correlation: the TPACF bin-count kernel. Given points on the unit
// sphere, it counts point pairs by angular separation into 32 bins, in 11
// jackknife histograms, at one pair per clock cycle.
//
// One kernel serves all three counts of the Landy & Szalay estimator:
//   do_self = 1 (DD, RR): pairs (i, j) with 0 <= i < n1-1 and i < j < n1, both
//                         points from the first set (addresses 0 .. n1-1);
//   do_self = 0 (DR):     pairs (i, j) with 0 <= i < n1 and 0 <= j < n2, the
//                         second point read at address n1 + j.
// For each pair it forms the dot product of the two unit vectors, finds its
// bin by binary search against boundaries held in cosine space, and adds one
// to that bin in every histogram except the one of the outer point's
// jackknife label (histogram 0, the full sample, whenever that label is not 0).
//
// Memory: the kernel reads eight external SRAM arrays of MEM_DEPTH doubles,
// X1 Y1 Z1 JK (outer point), X2 Y2 Z2 (inner point) and BINV (bin boundaries
// in, counts out), each through its own read port indexed by tpacf_pkg::arr_e.
// Every read returns its data RD_LAT cycles after the address (no stall).
// BINV has the only write port.
//
// Sequence after a one-cycle `start` pulse (arguments sampled then):
//   1. read nb+1 boundaries from BINV[n1 + k] into the search registers;
//   2. clear nb+2 bins of every counter bank;
//   3. for every outer i: read X1/Y1/Z1/JK[i] (RD_LAT + 2 cycles), then issue
//      one inner address per cycle;
//   4. wait for the pair pipeline to drain;
//   5. write count(h, b) as a double to BINV[h*(nb+2) + b], h = 0..10,
//      b = 0..nb+1, one per cycle; then pulse `done`.
// Step 3 runs at one pair per cycle, so a DD count of N points takes about
// N(N-1)/2 cycles, a DR count N1*N2 cycles, plus RD_LAT + 2 cycles per outer
// point. The pair pipeline is RD_LAT + DOT_LAT + 5 (search) + 2 (count) deep.
//
// Counts are non-negative, so the sign bit of mem_wr_data is always 0.
// Addresses are 16 bits and wrap: n1 + n2 <= 65,536 and n1 + 31 <= 65,536.
//
// The loop structure, address map, boundary shift register, search tree, bank
// rotation j mod 4 and write-back order follow the kernel this design is
// built from. The SRAM read latency, the port-per-array memory interface, the
// start/done handshake and the pipeline depths are this design's choices.
module cross_correlation
  import tpacf_pkg::*;
#(
  parameter int unsigned RD_LAT = 2     // SRAM read latency in cycles
) (
  input  logic              clk,
  input  logic              rst_n,
  // control (arguments of the kernel call)
  input  logic              start,
  input  logic [ADDR_W:0]   n1,
  input  logic [ADDR_W:0]   n2,
  input  logic [BIN_W:0]    nb,         // nb+1 boundaries, nb+2 bins (30 for 32 bins)
  input  logic              do_self,
  output logic              busy,
  output logic              done,
  // SRAM array ports, indexed by arr_e
  output logic              mem_rd_en   [NARR],
  output logic [ADDR_W-1:0] mem_rd_addr [NARR],
  input  logic [63:0]       mem_rd_data [NARR],
  output logic              mem_wr_en,
  output logic [ADDR_W-1:0] mem_wr_addr,
  output logic [63:0]       mem_wr_data
);

  localparam int unsigned DRAIN_CYC = RD_LAT + DOT_LAT + BIN_W + 4;
  localparam int unsigned WB_LAT    = 3;    // histogram read (2) + conversion (1)

  typedef enum logic [3:0] {
    S_IDLE, S_LOADB, S_LOADB_WAIT, S_CLEAR, S_OUTER_RD, S_OUTER_WAIT,
    S_INNER, S_DRAIN, S_WB, S_WB_WAIT, S_DONE
  } state_e;

  state_e            state;
  logic [ADDR_W:0]   r_n1, r_n2;
  logic [BIN_W:0]    r_nb;
  logic              r_self;
  logic [ADDR_W:0]   i, j, i_end;
  logic [7:0]        cnt;                // small phase counter
  logic [JK_W-1:0]   wb_hist;
  logic [BIN_W:0]    wb_bin;
  logic [ADDR_W:0]   wb_addr;

  fp64_t             x1, y1, z1;
  logic [JK_W-1:0]   jk;

  logic [BIN_W+1:0]  nb1, nb2;
  assign nb1 = (BIN_W+2)'(r_nb) + 1'b1;
  assign nb2 = (BIN_W+2)'(r_nb) + (BIN_W+2)'(2);

  // ---- control FSM -----------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      r_n1    <= '0;
      r_n2    <= '0;
      r_nb    <= '0;
      r_self  <= 1'b0;
      i       <= '0;
      j       <= '0;
      i_end   <= '0;
      cnt     <= '0;
      wb_hist <= '0;
      wb_bin  <= '0;
      wb_addr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          r_n1   <= n1;
          r_n2   <= do_self ? n1 : n2;
          r_nb   <= nb;
          r_self <= do_self;
          i_end  <= do_self ? ((n1 == '0) ? '0 : n1 - 1'b1) : n1;
          cnt    <= '0;
          state  <= S_LOADB;
        end
        S_LOADB: begin
          cnt <= cnt + 1'b1;
          if (8'(cnt + 1'b1) == 8'(nb1)) begin
            cnt   <= '0;
            state <= S_LOADB_WAIT;
          end
        end
        S_LOADB_WAIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(RD_LAT)) begin
            cnt   <= '0;
            state <= S_CLEAR;
          end
        end
        S_CLEAR: begin
          cnt <= cnt + 1'b1;
          if (8'(cnt + 1'b1) == 8'(nb2)) begin
            cnt   <= '0;
            i     <= '0;
            state <= (i_end == '0) ? S_DRAIN : S_OUTER_RD;
          end
        end
        S_OUTER_RD: begin
          cnt   <= '0;
          state <= S_OUTER_WAIT;
        end
        S_OUTER_WAIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(RD_LAT)) begin
            cnt <= '0;
            j   <= r_self ? i + 1'b1 : '0;
            if ((r_self ? i + 1'b1 : '0) >= r_n2) begin
              // empty inner loop
              i     <= i + 1'b1;
              state <= (i + 1'b1 == i_end) ? S_DRAIN : S_OUTER_RD;
            end else begin
              state <= S_INNER;
            end
          end
        end
        S_INNER: begin
          j <= j + 1'b1;
          if (j + 1'b1 == r_n2) begin
            i     <= i + 1'b1;
            state <= (i + 1'b1 == i_end) ? S_DRAIN : S_OUTER_RD;
          end
        end
        S_DRAIN: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(DRAIN_CYC)) begin
            cnt     <= '0;
            wb_hist <= '0;
            wb_bin  <= '0;
            wb_addr <= '0;
            state   <= S_WB;
          end
        end
        S_WB: begin
          wb_addr <= wb_addr + 1'b1;
          if (wb_bin + 1'b1 == (BIN_W+1)'(nb2)) begin
            wb_bin <= '0;
            if (wb_hist == JK_W'(NHIST - 1)) state <= S_WB_WAIT;
            else wb_hist <= wb_hist + 1'b1;
          end else begin
            wb_bin <= wb_bin + 1'b1;
          end
        end
        S_WB_WAIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(WB_LAT)) begin
            cnt   <= '0;
            state <= S_DONE;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // ---- SRAM read addresses -----------------------------------------------------
  logic [ADDR_W:0] inner_addr;
  assign inner_addr = r_self ? j : r_n1 + j;

  always_comb begin
    for (int a = 0; a < NARR; a++) begin
      mem_rd_en[a]   = 1'b0;
      mem_rd_addr[a] = '0;
    end
    // boundaries: BINV[n1 + k]
    mem_rd_en[ARR_BINV]   = (state == S_LOADB);
    mem_rd_addr[ARR_BINV] = ADDR_W'(r_n1 + (ADDR_W+1)'(cnt));
    // outer point
    for (int a = int'(ARR_X1); a <= int'(ARR_JK); a++) begin
      mem_rd_en[a]   = (state == S_OUTER_RD);
      mem_rd_addr[a] = ADDR_W'(i);
    end
    // inner point
    for (int a = int'(ARR_X2); a <= int'(ARR_Z2); a++) begin
      mem_rd_en[a]   = (state == S_INNER);
      mem_rd_addr[a] = ADDR_W'(inner_addr);
    end
  end

  // ---- read-return bookkeeping ----------------------------------------------------
  logic      bnd_sr   [RD_LAT];   // boundary read in flight
  logic      outer_sr [RD_LAT];   // outer-point read in flight
  logic      pair_sr  [RD_LAT];   // inner-point read in flight
  pair_tag_t tag_sr   [RD_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < RD_LAT; k++) begin
        bnd_sr[k]   <= 1'b0;
        outer_sr[k] <= 1'b0;
        pair_sr[k]  <= 1'b0;
      end
    end else begin
      bnd_sr[0]   <= (state == S_LOADB);
      outer_sr[0] <= (state == S_OUTER_RD);
      pair_sr[0]  <= (state == S_INNER);
      for (int k = 1; k < RD_LAT; k++) begin
        bnd_sr[k]   <= bnd_sr[k-1];
        outer_sr[k] <= outer_sr[k-1];
        pair_sr[k]  <= pair_sr[k-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    tag_sr[0] <= '{bank: BANK_W'(j), jk: jk};
    for (int k = 1; k < RD_LAT; k++) tag_sr[k] <= tag_sr[k-1];
  end

  // outer point registers, loaded when its read returns
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0;
      y1 <= '0;
      z1 <= '0;
      jk <= '0;
    end else if (outer_sr[RD_LAT-1]) begin
      x1 <= fp64_t'(mem_rd_data[ARR_X1]);
      y1 <= fp64_t'(mem_rd_data[ARR_Y1]);
      z1 <= fp64_t'(mem_rd_data[ARR_Z1]);
      jk <= JK_W'(fp64_to_u16(fp64_t'(mem_rd_data[ARR_JK])));
    end
  end

  // ---- pair pipeline ------------------------------------------------------------
  logic      dp_valid;
  pair_tag_t dp_tag;
  fp64_t     dp_dot;

  dot_product #(.tag_t(pair_tag_t)) u_dot (
    .clk, .rst_n,
    .in_valid (pair_sr[RD_LAT-1]),
    .in_tag   (tag_sr[RD_LAT-1]),
    .x1, .y1, .z1,
    .x2       (fp64_t'(mem_rd_data[ARR_X2])),
    .y2       (fp64_t'(mem_rd_data[ARR_Y2])),
    .z2       (fp64_t'(mem_rd_data[ARR_Z2])),
    .out_valid(dp_valid),
    .out_tag  (dp_tag),
    .dot      (dp_dot)
  );

  logic             bs_valid;
  pair_tag_t        bs_tag;
  logic [BIN_W-1:0] bs_bin;

  bin_search #(.tag_t(pair_tag_t)) u_search (
    .clk, .rst_n,
    .load_valid(bnd_sr[RD_LAT-1]),
    .load_data (fp64_t'(mem_rd_data[ARR_BINV])),
    .in_valid  (dp_valid),
    .in_tag    (dp_tag),
    .dot       (dp_dot),
    .out_valid (bs_valid),
    .out_tag   (bs_tag),
    .out_bin   (bs_bin)
  );

  logic               h_rd_out_valid;
  logic [COUNT_W+1:0] h_rd_count;

  jk_histogram u_hist (
    .clk, .rst_n,
    .upd_valid   (bs_valid),
    .upd_bin     (bs_bin),
    .upd_bank    (bs_tag.bank),
    .upd_jk      (bs_tag.jk),
    .clr_valid   (state == S_CLEAR),
    .clr_bin     (BIN_W'(cnt)),
    .rd_valid    (state == S_WB),
    .rd_hist     (wb_hist),
    .rd_bin      (BIN_W'(wb_bin)),
    .rd_out_valid(h_rd_out_valid),
    .rd_count    (h_rd_count)
  );

  // ---- write-back: count -> double -> BINV[h*nb2 + b] ---------------------------------
  logic [ADDR_W-1:0] wb_addr_sr [2];

  always_ff @(posedge clk) begin
    wb_addr_sr[0] <= ADDR_W'(wb_addr);
    wb_addr_sr[1] <= wb_addr_sr[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_wr_en   <= 1'b0;
      mem_wr_addr <= '0;
      mem_wr_data <= '0;
    end else begin
      mem_wr_en   <= h_rd_out_valid;
      mem_wr_addr <= wb_addr_sr[1];
      mem_wr_data <= u64_to_fp64(64'(h_rd_count));
    end
  end

  // ---- protocol checks ------------------------------------------------------------
  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE)
    else $error("cross_correlation: start while busy");
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(mem_wr_en && mem_rd_en[ARR_BINV]))
    else $error("cross_correlation: BINV read and written in the same cycle");

endmodule
