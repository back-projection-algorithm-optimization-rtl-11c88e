// Sample: picks and interpolates the radar sample for each (pixel, pulse).
//
// Pipeline, counted from R entering:
//   1 cycle  WBin: Bin, W1, W2 (and the bin-range test)
//   1 cycle  B2 controller address stage: Bin and Bin+1 (adder) registered
//   1 cycle  B2 read of both addresses in the current pulse's memory
//   3 cycles interpolation
// so the complex sample leaves 6 cycles after R, the latency the design
// reports. A shift register delays W1/W2 by the two cycles of the address
// path. A pair whose bin falls outside [0, NSAMPLES-2] gets both weights set
// to zero, so its sample, and with it its contribution, is zero.
// The control word goes with the addresses to the B2 controller, whose read
// side switches memory after the item flagged sw.
// Structure and latency follow the design; the split of the two middle
// cycles between address register and memory is this implementation's.
module sample
  import bp_pkg::*;
#(
  parameter int unsigned NSAMPLES     = 4096,
  parameter int unsigned TOTAL_PULSES = 16384,
  parameter logic signed [POS_W-1:0] R0 = R0_DEFAULT,
  localparam int unsigned AW = $clog2(NSAMPLES),
  localparam int unsigned CW = $clog2(TOTAL_PULSES + 1) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dist_t             r,
  input  ctrl_t             ctrl_in,
  input  logic [WORD_W-1:0] s_axis_smp_tdata,
  input  logic              s_axis_smp_tvalid,
  output logic              s_axis_smp_tready,
  output logic [CW-1:0]     pulses_loaded,
  output cplx_t             sample_out
);
  logic [13:0] bin;
  logic [25:0] w1, w1_m, w1_q;
  logic [24:0] w2, w2_m, w2_q;
  logic        in_range;
  logic [AW-1:0] addr_a, addr_b;
  ctrl_t       ctrl_a;
  logic [WORD_W-1:0] data_1, data_2;
  logic [CW-1:0] consumed_unused;

  wbin #(.NSAMPLES(NSAMPLES), .R0(R0)) u_wbin (
    .clk, .r, .bin, .w1, .w2, .in_range);

  assign w1_m = in_range ? w1 : '0;
  assign w2_m = in_range ? w2 : '0;

  // address stage of the B2 controller: Bin and Bin + 1
  always_ff @(posedge clk) begin
    addr_a <= bin[AW-1:0];
    addr_b <= AW'(bin + 14'd1);
  end

  delay_line #(.W($bits(ctrl_t)), .N(2)) u_ctrl (
    .clk, .rst_n, .d(ctrl_in), .q(ctrl_a));

  // shift register balancing W1/W2 against the address path
  delay_line #(.W(51), .N(2)) u_wsr (
    .clk, .rst_n, .d({w1_m, w2_m}), .q({w1_q, w2_q}));

  b2_sample_store #(.NSAMPLES(NSAMPLES), .TOTAL_PULSES(TOTAL_PULSES)) u_b2 (
    .clk, .rst_n,
    .s_axis_tdata(s_axis_smp_tdata), .s_axis_tvalid(s_axis_smp_tvalid),
    .s_axis_tready(s_axis_smp_tready),
    .rd_en(ctrl_a.valid), .rd_sw(ctrl_a.sw),
    .rd_addr_a(addr_a), .rd_addr_b(addr_b),
    .dout_a(data_1), .dout_b(data_2),
    .pulses_loaded, .pulses_consumed(consumed_unused));

  interpolation u_interp (
    .clk, .data_1, .data_2, .w1(w1_q), .w2(w2_q), .sample(sample_out));
endmodule
