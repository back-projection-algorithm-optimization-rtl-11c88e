// Accumulator: one component (real or imaginary) of the per-pixel sums.
//
//   Accum_{i+1} = Accum_i + Prod_i   over the pulses of a region
// A B3 block RAM of REGION_SIZE 64-bit words holds the partial sum of each
// pixel of the region under construction. pre_valid comes one cycle ahead of
// prod so the stored sum is read in time (see b3_controller). The adder
// (64-bit accumulator plus sign-extended 48-bit product, 20.44 format) is
// registered: one cycle from prod to the result. The result is written back,
// except during the last pulse of a region, when zero is written back and the
// finished value goes out on the AXI-Stream master towards the output FIFO.
// The stream has no back-pressure: the FIFO's fill-level control keeps room
// for every item in flight, and an assertion checks that tready is high
// whenever a value is offered.
// Follows the design; the 64-bit sum width is taken from the memory word size.
module accumulator
  import bp_pkg::*;
#(
  parameter int unsigned REGION_SIZE = 8192,
  parameter int unsigned NPULSES     = 512,
  localparam int unsigned AW = $clog2(REGION_SIZE)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pre_valid,
  input  prod_lane_t prod,
  output acc_t       m_axis_tdata,
  output logic       m_axis_tvalid,
  input  logic       m_axis_tready
);
  logic          rd_en, wr_en, clear, out_valid;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [ACC_W-1:0] accum_1;
  acc_t          accum_2;

  b3_controller #(.REGION_SIZE(REGION_SIZE), .NPULSES(NPULSES)) u_ctl (
    .clk, .rst_n, .pre_valid, .rd_en, .rd_addr, .wr_en, .wr_addr, .clear,
    .out_valid);

  bram_sdp #(.W(ACC_W), .DEPTH(REGION_SIZE)) u_b3 (
    .clk, .we(wr_en), .waddr(wr_addr), .wdata(clear ? '0 : accum_2),
    .re(rd_en), .raddr(rd_addr), .rdata(accum_1));

  always_ff @(posedge clk) accum_2 <= acc_t'(accum_1) + ACC_W'(prod);

  assign m_axis_tdata  = accum_2;
  assign m_axis_tvalid = out_valid;

  always_ff @(posedge clk)
    if (rst_n && m_axis_tvalid) assert (m_axis_tready);
endmodule
