// WBin: range bin and linear-interpolation weights from the distance.
//
//   bin0 = R - R0                       (15.25 format)
//   Bin  = floor(bin0 * dR_inv)         dR_inv = 32, so Bin = bin0[33:20]
//   W2   = bin0 * dR_inv - Bin          fraction bits bin0[19:0], widened to
//                                       25 fraction bits with five zero LSBs
//   W1   = 1 - W2                       2^25 - W2, 26 bits (1.25 format)
// The multiplication by the power-of-two constant is a bit selection, as in
// the design. in_range is high when 0 <= Bin <= NSAMPLES-2, the condition
// under which the algorithm uses the pair of samples Bin, Bin+1; outside it
// the contribution is dropped downstream. All outputs are registered: one
// cycle of latency, one item per cycle.
// Equations, bit fields and latency follow the design; the in_range output is
// this implementation's addition taken from the algorithm's bin test. The
// five low bits of W2 are zero by construction.
module wbin
  import bp_pkg::*;
#(
  parameter int unsigned NSAMPLES = 4096,
  parameter logic signed [POS_W-1:0] R0 = R0_DEFAULT
) (
  input  logic        clk,
  input  dist_t       r,
  output logic [13:0] bin,
  output logic [25:0] w1,
  output logic [24:0] w2,
  output logic        in_range
);
  logic signed [POS_W:0] bin0;
  logic signed [POS_W-20:0] bin_int;   // bin0 >>> 20
  logic [24:0] w;

  assign bin0    = (POS_W+1)'(r) - (POS_W+1)'(R0);
  assign bin_int = bin0[POS_W:20];
  assign w       = {bin0[19:0], 5'b00000};

  always_ff @(posedge clk) begin
    bin      <= bin0[33:20];
    w2       <= w;
    w1       <= 26'(1 << 25) - 26'(w);
    in_range <= !bin_int[POS_W-20] && (bin_int <= (POS_W-19)'(NSAMPLES - 2));
  end
endmodule
