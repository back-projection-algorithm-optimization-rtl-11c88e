// Pipelined CORDIC computing sine and cosine of an angle.
//
// Input: phase in radians, signed 2.22 format (25 bits), range [-pi, pi].
// Output: cos and sin, signed 1.22 format (24 bits), truncated.
// The vector starts at (K, 0), K = prod cos(atan(2^-i)) = 0.6072529350, so
// no scale correction is needed at the end. A coarse-rotation stage folds
// angles beyond +-pi/2 by pi and negates the result afterwards; then ITER
// micro-rotations by +-atan(2^-i) drive the residual angle to zero:
//   x' = x - d*y*2^-i,  y' = y + d*x*2^-i,  z' = z - d*atan(2^-i),
//   d = sign(z).
// Internal words carry 26 fraction bits. atan(2^-i) constants are
// round(atan(2^-i) * 2^26).
// Timing: input register, coarse rotation, ITER = 24 micro-rotation stages,
// quadrant correction and output register: 28 cycles, one angle per cycle,
// the latency of the sine/cosine core the design uses (parallel, maximum
// pipelining, 25-bit input, 24-bit output, coarse rotation, truncation).
// That core is a vendor part whose insides the design does not give; this
// module is a plain CORDIC with the same interface, formats and latency.
module cordic #(
  localparam int unsigned IN_W  = 25,
  localparam int unsigned OUT_W = 24,
  localparam int unsigned ITER  = 24
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  phase,
  output logic signed [OUT_W-1:0] cos_o,
  output logic signed [OUT_W-1:0] sin_o
);
  localparam int unsigned IW   = 30;   // internal word: sign, 3 int, 26 frac
  localparam int unsigned FRAC = 26;
  typedef logic signed [IW-1:0] iw_t;

  localparam iw_t K_INIT  = iw_t'(30'h026D_D3B7);            // 0.6072529350
  localparam iw_t PI      = iw_t'(30'h0C90_FDAA);            // pi
  localparam iw_t HALF_PI = iw_t'(30'h0648_7ED5);            // pi/2

  function automatic iw_t atan_tab(int i);
    case (i)
      0:  return iw_t'(30'h0324_3F6B);
      1:  return iw_t'(30'h01DA_C670);
      2:  return iw_t'(30'h00FA_DBB0);
      3:  return iw_t'(30'h007F_56EA);
      4:  return iw_t'(30'h003F_EAB7);
      5:  return iw_t'(30'h001F_FD56);
      6:  return iw_t'(30'h000F_FFAB);
      7:  return iw_t'(30'h0007_FFF5);
      8:  return iw_t'(30'h0003_FFFF);
      default: return iw_t'(30'h0400_0000) >>> i;   // atan(2^-i) = 2^-i here
    endcase
  endfunction

  iw_t  z_in;
  iw_t  x [ITER+1];
  iw_t  y [ITER+1];
  iw_t  z [ITER+1];
  logic neg [ITER+1];
  logic signed [OUT_W-1:0] cos_q, sin_q;

  // stage 1: input register; stage 2: coarse rotation
  always_ff @(posedge clk) begin
    z_in <= iw_t'(phase) <<< (FRAC - 22);
    x[0] <= K_INIT;
    y[0] <= '0;
    if (z_in > HALF_PI) begin
      z[0] <= z_in - PI;  neg[0] <= 1'b1;
    end else if (z_in < -HALF_PI) begin
      z[0] <= z_in + PI;  neg[0] <= 1'b1;
    end else begin
      z[0] <= z_in;       neg[0] <= 1'b0;
    end
  end

  for (genvar i = 0; i < int'(ITER); i++) begin : g_stage
    always_ff @(posedge clk) begin
      neg[i+1] <= neg[i];
      if (!z[i][IW-1]) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - atan_tab(i);
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + atan_tab(i);
      end
    end
  end

  // quadrant correction with truncation to 22 fraction bits, then output
  always_ff @(posedge clk) begin
    cos_q <= OUT_W'((neg[ITER] ? -x[ITER] : x[ITER]) >>> (FRAC - 22));
    sin_q <= OUT_W'((neg[ITER] ? -y[ITER] : y[ITER]) >>> (FRAC - 22));
    cos_o <= cos_q;
    sin_o <= sin_q;
  end
endmodule
