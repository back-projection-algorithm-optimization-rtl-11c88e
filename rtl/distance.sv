// Distance: range from the platform to a pixel for every (pixel, pulse) pair.
//
// Contains the Pixel Position counters, the B1 platform-position memories
// and the arithmetic of
//   R = sqrt((plat_x - px)^2 + (plat_y - py)^2 + Z1)
// where Z1 = plat_z^2 is a constant (the platform flies at fixed height and
// image pixels lie at z = 0, so the Z part of the circuit is not built).
// Pipeline, counted from the cycle Pixel Position issues an item (ce high):
//   1  cycle  B1 read (pixel coordinates registered alongside)
//   0         two 40-bit subtractors
//   5  cycles two squaring multipliers (80-bit unsigned results)
//   0         X1 + Y1 adder
//   1  cycle  + Z1 adder, result truncated to the 78-bit radicand
//   39 cycles binary restoring square root
// so R (15.25 format) and the item's control word leave 46 cycles after
// issue, the latency the design reports. One item per cycle.
// Structure, formats and latencies follow the design; the split of the
// 5-cycle multiplier into a product followed by registers is this
// implementation's choice (a synthesis tool retimes it into the DSPs). The
// top bit of R is always zero because a square root is never negative.
module distance
  import bp_pkg::*;
#(
  parameter int unsigned NPIX_X      = 512,
  parameter int unsigned REGION_ROWS = 16,
  parameter int unsigned NREGIONS    = 32,
  parameter int unsigned NPULSES     = 512,
  parameter logic signed [POS_W-1:0] DXDY = DXDY_DEFAULT,
  parameter logic [SQ_W-2:0]         Z1   = Z1_DEFAULT,
  localparam int unsigned RW = (NREGIONS > 1) ? $clog2(NREGIONS) : 1,
  localparam int unsigned PW = (NPULSES > 1) ? $clog2(NPULSES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  // position file stream (B1 write side)
  input  logic [WORD_W-1:0] s_axis_pos_tdata,
  input  logic              s_axis_pos_tvalid,
  output logic              s_axis_pos_tready,
  output logic              pos_loaded,
  // schedule state of the item that would issue next
  output logic [RW-1:0]     region,
  output logic [PW-1:0]     pulse,
  output logic              done,
  // result
  output dist_t             r,
  output ctrl_t             ctrl_out
);
  localparam int unsigned MUL_LAT  = 5;
  localparam int unsigned SQRT_LAT = RAD_W / 2;
  localparam int unsigned LATENCY  = 1 + MUL_LAT + 1 + SQRT_LAT;

  dist_t         px, py, px_q, py_q, plat_x, plat_y, xdiff, ydiff;
  logic [PW-1:0] pos_addr;
  ctrl_t         ctrl_pp;
  logic [SQ_W-1:0] x1_prod, y1_prod, x1, y1, xy1;
  logic [RAD_W-1:0] radicant_q;
  logic [POS_W-2:0] root;

  pixel_position #(
    .NPIX_X(NPIX_X), .REGION_ROWS(REGION_ROWS), .NREGIONS(NREGIONS),
    .NPULSES(NPULSES), .DXDY(DXDY)
  ) u_pp (
    .clk, .rst_n, .ce, .px, .py, .pos_addr, .ctrl(ctrl_pp),
    .region, .pulse, .done);

  b1_position_store #(.NPULSES(NPULSES)) u_b1 (
    .clk, .rst_n,
    .s_axis_tdata(s_axis_pos_tdata), .s_axis_tvalid(s_axis_pos_tvalid),
    .s_axis_tready(s_axis_pos_tready), .loaded(pos_loaded),
    .rd_addr(pos_addr), .plat_x, .plat_y);

  // pixel coordinates wait one cycle for the B1 read
  always_ff @(posedge clk) begin
    px_q <= px;
    py_q <= py;
  end

  assign xdiff   = plat_x - px_q;
  assign ydiff   = plat_y - py_q;
  assign x1_prod = SQ_W'(xdiff) * SQ_W'(xdiff);
  assign y1_prod = SQ_W'(ydiff) * SQ_W'(ydiff);

  delay_line #(.W(2*SQ_W), .N(MUL_LAT)) u_mul_pipe (
    .clk, .rst_n, .d({x1_prod, y1_prod}), .q({x1, y1}));

  assign xy1 = x1 + y1;

  always_ff @(posedge clk) radicant_q <= RAD_W'(xy1 + SQ_W'(Z1));

  square_root #(.IN_W(RAD_W)) u_sqrt (.clk, .radicant(radicant_q), .root);

  assign r = dist_t'({1'b0, root});

  delay_line #(.W($bits(ctrl_t)), .N(LATENCY)) u_ctrl_pipe (
    .clk, .rst_n, .d(ctrl_pp), .q(ctrl_out));
endmodule
