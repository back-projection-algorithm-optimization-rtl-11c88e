// Interpolation: linear interpolation between two complex samples.
//
//   sample.re = data_1.re * W1 + data_2.re * W2
//   sample.im = data_1.im * W1 + data_2.im * W2
// data_x are 64-bit sample-memory words holding the real part in bits
// [23:0] and the imaginary part in bits [55:32] (signed 2.22). W1 is
// unsigned 1.25 (26 bits, so a weight of exactly 1 is representable), W2
// unsigned 0.25. Each product is truncated back to 2.22 (24 bits).
// Timing: multipliers take 2 cycles, the adders 1, so the result appears
// 3 cycles after the inputs; one item per cycle.
// Equations, field positions and latencies follow the design; truncation
// (rather than rounding) of the products is this implementation's choice.
module interpolation
  import bp_pkg::*;
(
  input  logic              clk,
  input  logic [WORD_W-1:0] data_1,
  input  logic [WORD_W-1:0] data_2,
  input  logic [25:0]       w1,
  input  logic [24:0]       w2,
  output cplx_t             sample
);
  localparam int unsigned PW = DATA_W + 27;

  function automatic data_t scale(data_t d, logic [25:0] w);
    logic signed [PW-1:0] dw, ww, p;
    dw = PW'(d);
    ww = PW'(signed'({1'b0, w}));
    p  = dw * ww;
    return p[DATA_W+24:25];
  endfunction

  data_t s_re_1, s_re_2, s_im_1, s_im_2;
  data_t s_re_1_q, s_re_2_q, s_im_1_q, s_im_2_q;

  always_ff @(posedge clk) begin
    s_re_1   <= scale(data_t'(data_1[23:0]),  w1);
    s_im_1   <= scale(data_t'(data_1[55:32]), w1);
    s_re_2   <= scale(data_t'(data_2[23:0]),  {1'b0, w2});
    s_im_2   <= scale(data_t'(data_2[55:32]), {1'b0, w2});
    s_re_1_q <= s_re_1;
    s_re_2_q <= s_re_2;
    s_im_1_q <= s_im_1;
    s_im_2_q <= s_im_2;
    sample.re <= s_re_1_q + s_re_2_q;
    sample.im <= s_im_1_q + s_im_2_q;
  end
endmodule
