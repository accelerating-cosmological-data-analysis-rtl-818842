// dot_product: double-precision dot product of two unit vectors, one pair per
// cycle.
//
// The angular separation of two sky positions p and q is arccos(p . q); the
// kernel never takes the arccos but bins the dot product itself against
// boundaries pre-computed in cosine space. This unit evaluates
//     dot = (x1*x2 + y1*y2) + z1*z2
// with three fp64_mul and two fp64_add, in the same order of operations as the
// kernel's C expression, so its result is bit-identical to a binary64
// evaluation of that expression. The z product is delayed by one adder latency
// so it meets the first partial sum.
//
// Interface: in_valid / in_tag accompany the six coordinates; out_valid /
// out_tag come out with the dot product DOT_LAT = MUL_LAT + 2*ADD_LAT cycles
// later. There is no back-pressure; the tag type is a parameter so the unit can
// carry whatever the caller needs along with each pair.
module dot_product
  import tpacf_pkg::*;
#(
  parameter type tag_t = pair_tag_t
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  tag_t  in_tag,
  input  fp64_t x1, y1, z1,
  input  fp64_t x2, y2, z2,
  output logic  out_valid,
  output tag_t  out_tag,
  output fp64_t dot
);

  fp64_t px, py, pz, sxy;
  fp64_t pz_d [ADD_LAT];

  fp64_mul u_mul_x (.clk, .a(x1), .b(x2), .p(px));
  fp64_mul u_mul_y (.clk, .a(y1), .b(y2), .p(py));
  fp64_mul u_mul_z (.clk, .a(z1), .b(z2), .p(pz));

  fp64_add u_add_xy (.clk, .a(px), .b(py), .s(sxy));

  always_ff @(posedge clk) begin
    pz_d[0] <= pz;
    for (int i = 1; i < ADD_LAT; i++) pz_d[i] <= pz_d[i-1];
  end

  fp64_add u_add_z (.clk, .a(sxy), .b(pz_d[ADD_LAT-1]), .s(dot));

  // valid / tag delay line matching the arithmetic
  logic v_sr [DOT_LAT];
  tag_t t_sr [DOT_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DOT_LAT; i++) v_sr[i] <= 1'b0;
    end else begin
      v_sr[0] <= in_valid;
      for (int i = 1; i < DOT_LAT; i++) v_sr[i] <= v_sr[i-1];
    end
  end

  always_ff @(posedge clk) begin
    t_sr[0] <= in_tag;
    for (int i = 1; i < DOT_LAT; i++) t_sr[i] <= t_sr[i-1];
  end

  assign out_valid = v_sr[DOT_LAT-1];
  assign out_tag   = t_sr[DOT_LAT-1];

endmodule
