// Filter: matched-filter value exp(j * 2*ku * R) for each distance R.
//
// Argument calculator
//   M1:  ARG = R * 2ku, where 2ku is in laps of the unit circle per metre
//        (unsigned 7.57). Only the fraction of a lap matters, so the
//        product keeps bits [81:18]: ARG is an unsigned 0.64 fraction of a
//        lap. 7 cycles.
//   Quadrant = ARG[63:62]; ARG[61:0] is the angle inside the quadrant.
//   M2:  ARG_1 = ARG[61:0] * 2pi (unsigned 3.61), bits [126:103]: the angle
//        in radians in signed 1.22 format, in [0, pi/2). 7 cycles.
//   ARG_1 is sign-extended for the sine/cosine stage.
// Trigonometric stage: CORDIC, 28 cycles.
// Quadrant normalizer: cos, -cos, sin, -sin (negation registered, 1 cycle)
// and a registered 4-way multiplexer selected by the delayed quadrant
// (1 cycle):
//   quadrant 0: ( cos,  sin)   1: (-sin,  cos)
//   quadrant 2: (-cos, -sin)   3: ( sin, -cos)
// giving filter.re in [23:0] and filter.im in [47:24].
// Total latency 7+7+28+1+1 = 44 cycles, one value per cycle, as in the
// design. Structure, bit selections and latencies follow the design; the
// multipliers are written as a product followed by registers.
module filter
  import bp_pkg::*;
#(
  parameter logic [63:0] TWO_KU = TWO_KU_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  dist_t r,
  output cplx_t filter_out
);
  localparam int unsigned M_LAT   = 7;
  localparam int unsigned COR_LAT = 28;

  logic [103:0] m1_prod;
  logic [63:0]  arg;
  logic [126:0] m2_prod;
  logic [23:0]  arg_1;
  logic signed [31:0] arg_2;
  logic [1:0]   quad;
  data_t        cos_v, sin_v, cos_b, sin_b, ncos_b, nsin_b;

  assign m1_prod = 104'(unsigned'(r)) * 104'(TWO_KU);
  delay_line #(.W(64), .N(M_LAT)) u_m1 (
    .clk, .rst_n, .d(m1_prod[81:18]), .q(arg));

  assign m2_prod = 127'(arg[61:0]) * 127'(TWO_PI);
  delay_line #(.W(24), .N(M_LAT)) u_m2 (
    .clk, .rst_n, .d(m2_prod[126:103]), .q(arg_1));

  assign arg_2 = 32'(signed'(arg_1));

  delay_line #(.W(2), .N(M_LAT + COR_LAT + 1)) u_quad_sr (
    .clk, .rst_n, .d(arg[63:62]), .q(quad));

  cordic u_cordic (.clk, .phase(arg_2[24:0]), .cos_o(cos_v), .sin_o(sin_v));

  always_ff @(posedge clk) begin
    cos_b  <= cos_v;
    sin_b  <= sin_v;
    ncos_b <= -cos_v;
    nsin_b <= -sin_v;
    unique case (quad)
      2'd0: filter_out <= '{re: cos_b,  im: sin_b};
      2'd1: filter_out <= '{re: nsin_b, im: cos_b};
      2'd2: filter_out <= '{re: ncos_b, im: nsin_b};
      2'd3: filter_out <= '{re: sin_b,  im: ncos_b};
    endcase
  end
endmodule
