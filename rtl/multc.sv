// MultC: complex product of the interpolated sample and the matched filter.
//
//   prod.re = sample.re * filter.re - sample.im * filter.im
//   prod.im = sample.re * filter.im + sample.im * filter.re
// Inputs are signed 2.22; the four products keep all 48 bits (4.44) and the
// subtractor/adder results stay 48 bits. Multipliers take 2 cycles and the
// adder/subtractor 1: the product leaves 3 cycles after the inputs, one per
// cycle, as in the design.
module multc
  import bp_pkg::*;
(
  input  logic   clk,
  input  cplx_t  sample_in,
  input  cplx_t  filter_in,
  output cprod_t prod
);
  prod_lane_t re_1, re_2, im_1, im_2, re_1_q, re_2_q, im_1_q, im_2_q;

  always_ff @(posedge clk) begin
    re_1   <= PROD_W'(sample_in.re) * PROD_W'(filter_in.re);
    re_2   <= PROD_W'(sample_in.im) * PROD_W'(filter_in.im);
    im_1   <= PROD_W'(sample_in.re) * PROD_W'(filter_in.im);
    im_2   <= PROD_W'(sample_in.im) * PROD_W'(filter_in.re);
    re_1_q <= re_1;
    re_2_q <= re_2;
    im_1_q <= im_1;
    im_2_q <= im_2;
    prod.re <= re_1_q - re_2_q;
    prod.im <= im_1_q + im_2_q;
  end
endmodule
