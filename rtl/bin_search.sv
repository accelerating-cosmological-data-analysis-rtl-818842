// bin_search: bin-boundary registers and a pipelined, fully unrolled binary
// search that maps a dot product to one of NBINS = 32 angular bins.
//
// Boundaries are cosines of the bin-edge angles, so they decrease with angle:
// b[0] (binb00) is the largest cosine, b[30] (binb30) the smallest. They are
// loaded as in the kernel, through a shift register: every load_valid shifts
// b[k] <= b[k+1] and puts load_data into b[30], so after 31 loads the first
// value loaded sits in b[0].
//
// The bin index is the number of boundaries the dot product lies below,
// found one bit per tree level, most significant bit first. At level l, with
// the bits p already decided, the node compares against boundary
//     b[ p * 2^(5-l) + 2^(4-l) - 1 ]
// (b15 at the root, then b23 or b7, ... , b30..b0 at the leaves) and the next
// bit is (dot < boundary). Index 0 therefore means dot >= b[0] (closer than the
// smallest angle) and index 31 means dot < b[30]. This is the decision tree of
// the kernel; here each level is one pipeline stage, so the unit accepts a
// dot product every cycle and answers BIN_W = 5 cycles later, with its tag.
module bin_search
  import tpacf_pkg::*;
#(
  parameter type tag_t = pair_tag_t
) (
  input  logic             clk,
  input  logic             rst_n,
  // boundary loading
  input  logic             load_valid,
  input  fp64_t            load_data,
  // search
  input  logic             in_valid,
  input  tag_t             in_tag,
  input  fp64_t            dot,
  output logic             out_valid,
  output tag_t             out_tag,
  output logic [BIN_W-1:0] out_bin
);

  localparam int unsigned LEVELS = BIN_W;

  fp64_t binb [NBOUND];

  always_ff @(posedge clk) begin
    if (load_valid) begin
      for (int k = 0; k < NBOUND - 1; k++) binb[k] <= binb[k+1];
      binb[NBOUND-1] <= load_data;
    end
  end

  // per-level pipeline registers (index 0 = input of level 0)
  logic             v   [LEVELS+1];
  tag_t             tg  [LEVELS+1];
  fp64_t            d   [LEVELS+1];
  logic [BIN_W-1:0] idx [LEVELS+1];

  assign v[0]   = in_valid;
  assign tg[0]  = in_tag;
  assign d[0]   = dot;
  assign idx[0] = '0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned SPAN = 1 << (LEVELS - l);   // 2^(5-l)
    logic [BIN_W-1:0] prefix;
    logic [BIN_W:0]   node;
    logic             below;
    // bits already decided are the top l bits of idx[l]
    assign prefix = idx[l] >> (LEVELS - l);
    assign node   = (BIN_W+1)'(prefix * SPAN + SPAN / 2 - 1);
    assign below  = fp64_lt(d[l], binb[node[BIN_W-1:0]]);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[l+1] <= 1'b0;
      else        v[l+1] <= v[l];
    end
    always_ff @(posedge clk) begin
      tg[l+1]  <= tg[l];
      d[l+1]   <= d[l];
      idx[l+1] <= idx[l] | (BIN_W'(below) << (LEVELS - 1 - l));
    end
  end

  assign out_valid = v[LEVELS];
  assign out_tag   = tg[LEVELS];
  assign out_bin   = idx[LEVELS];

endmodule
