// Back-projection SAR imaging accelerator.
//
// Forms a complex NPIX_X x (REGION_ROWS*NREGIONS) image from NPULSES radar
// pulses of NSAMPLES complex samples each: every pixel receives, from every
// pulse, the sample interpolated at its range R times exp(j*2ku*R). One
// (pixel, pulse) pair enters the pipeline per clock cycle.
//
// Schedule (pixel regions): the image is built region by region, REGION_ROWS
// rows at a time. Within a region all pulses are processed in turn, each
// pulse visiting every pixel of the region. The partial sums of a region fit
// in on-chip memory (B3), and only two pulses of samples (B2) need to be on
// chip at once, so the sample file is streamed in once per region.
//
// Datapath (latency from issue):
//   distance  (46)  pixel position, B1 positions, squares, square root
//   filter    (44)  matched filter, in parallel with
//   sample    (6)   bin/weights, B2 read, interpolation, fed R delayed 38
//   multc     (3)   complex product
//   accumulator (1) per component, B3 memory, output during last pulse
// so a finished pixel leaves the accumulators 94 cycles after its last
// item is issued. Then an output FIFO and a TLAST framer per component.
//
// Interfaces (AXI-Stream, 64-bit, single clock, active-low synchronous
// reset):
//   s_axis_pos : position file, 2*NPULSES words, X then Y, 24.40 format
//   s_axis_smp : sample file, NSAMPLES words per pulse, re in [31:0] and im
//                in [63:32] (signed 10.22); the whole file once per region
//   m_axis_re / m_axis_im : pixel values (signed 20.44 in 64 bits), pixel
//                order of the schedule, TLAST every TRANSFER_LEN words
// Status: started (inputs ready), halted (output back-pressure), enable
// (issuing this cycle), done (every item issued).
//
// The DMA engines, processor and external memory that feed and drain these
// streams are outside this design.
module bp_accel_top
  import bp_pkg::*;
#(
  parameter int unsigned NPIX_X       = 512,
  parameter int unsigned REGION_ROWS  = 16,
  parameter int unsigned NREGIONS     = 32,
  parameter int unsigned NPULSES      = 512,
  parameter int unsigned NSAMPLES     = 4096,
  parameter int unsigned FIFO_DEPTH   = 2048,
  parameter int unsigned FIFO_PROG_FULL  = FIFO_DEPTH - 256,
  parameter int unsigned FIFO_PROG_EMPTY = FIFO_DEPTH / 2,
  parameter int unsigned TRANSFER_LEN = NPIX_X * REGION_ROWS,
  parameter logic signed [POS_W-1:0] R0   = R0_DEFAULT,
  parameter logic [63:0]             TWO_KU = TWO_KU_DEFAULT,
  parameter logic [SQ_W-2:0]         Z1   = Z1_DEFAULT,
  parameter logic signed [POS_W-1:0] DXDY = DXDY_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] s_axis_pos_tdata,
  input  logic              s_axis_pos_tvalid,
  output logic              s_axis_pos_tready,
  input  logic [WORD_W-1:0] s_axis_smp_tdata,
  input  logic              s_axis_smp_tvalid,
  output logic              s_axis_smp_tready,
  output logic [WORD_W-1:0] m_axis_re_tdata,
  output logic              m_axis_re_tvalid,
  output logic              m_axis_re_tlast,
  input  logic              m_axis_re_tready,
  output logic [WORD_W-1:0] m_axis_im_tdata,
  output logic              m_axis_im_tvalid,
  output logic              m_axis_im_tlast,
  input  logic              m_axis_im_tready,
  output logic              started,
  output logic              halted,
  output logic              enable,
  output logic              done
);
  localparam int unsigned REGION_SIZE  = NPIX_X * REGION_ROWS;
  localparam int unsigned TOTAL_PULSES = NPULSES * NREGIONS;
  localparam int unsigned RW = (NREGIONS > 1) ? $clog2(NREGIONS) : 1;
  localparam int unsigned PW = (NPULSES > 1) ? $clog2(NPULSES) : 1;
  localparam int unsigned CW = $clog2(TOTAL_PULSES + 1) + 1;
  localparam int unsigned FILTER_LAT = 44;
  localparam int unsigned SAMPLE_LAT = 6;

  logic          pos_loaded, smp_ready;
  logic [RW-1:0] region;
  logic [PW-1:0] pulse;
  logic [CW-1:0] pulses_loaded;
  dist_t         r, r_smp;
  ctrl_t         ctrl_r, ctrl_smp, ctrl_pre;
  cplx_t         smp, filt;
  cprod_t        prod;
  acc_t          acc_re, acc_im;
  logic          acc_re_v, acc_im_v, fin_re_rdy, fin_im_rdy;
  logic [WORD_W-1:0] f_re_d, f_im_d;
  logic          f_re_v, f_im_v, f_re_r, f_im_r;
  logic          pf_re, pf_im, pe_re, pe_im;

  // a pulse may start only once its samples are fully stored
  assign smp_ready = (pulses_loaded >
                      CW'(32'(region) * NPULSES + 32'(pulse)));

  system_control u_ctl (
    .clk, .rst_n, .pos_loaded, .first_pulse_loaded(pulses_loaded != '0),
    .smp_ready, .fifo_prog_full(pf_re || pf_im),
    .fifo_prog_empty(pe_re && pe_im), .done, .enable, .started, .halted);

  distance #(
    .NPIX_X(NPIX_X), .REGION_ROWS(REGION_ROWS), .NREGIONS(NREGIONS),
    .NPULSES(NPULSES), .DXDY(DXDY), .Z1(Z1)
  ) u_distance (
    .clk, .rst_n, .ce(enable),
    .s_axis_pos_tdata, .s_axis_pos_tvalid, .s_axis_pos_tready, .pos_loaded,
    .region, .pulse, .done, .r, .ctrl_out(ctrl_r));

  filter #(.TWO_KU(TWO_KU)) u_filter (.clk, .rst_n, .r, .filter_out(filt));

  // shift register between Distance and Sample balancing the Filter path
  delay_line #(.W(POS_W + $bits(ctrl_t)), .N(FILTER_LAT - SAMPLE_LAT)) u_r_sr (
    .clk, .rst_n, .d({r, ctrl_r}), .q({r_smp, ctrl_smp}));

  sample #(.NSAMPLES(NSAMPLES), .TOTAL_PULSES(TOTAL_PULSES), .R0(R0)) u_sample (
    .clk, .rst_n, .r(r_smp), .ctrl_in(ctrl_smp),
    .s_axis_smp_tdata, .s_axis_smp_tvalid, .s_axis_smp_tready,
    .pulses_loaded, .sample_out(smp));

  multc u_multc (.clk, .sample_in(smp), .filter_in(filt), .prod);

  // control word of the item, one cycle ahead of its product
  delay_line #(.W($bits(ctrl_t)), .N(SAMPLE_LAT + 2)) u_ctrl_sr (
    .clk, .rst_n, .d(ctrl_smp), .q(ctrl_pre));

  accumulator #(.REGION_SIZE(REGION_SIZE), .NPULSES(NPULSES)) u_acc_re (
    .clk, .rst_n, .pre_valid(ctrl_pre.valid), .prod(prod.re),
    .m_axis_tdata(acc_re), .m_axis_tvalid(acc_re_v), .m_axis_tready(fin_re_rdy));
  accumulator #(.REGION_SIZE(REGION_SIZE), .NPULSES(NPULSES)) u_acc_im (
    .clk, .rst_n, .pre_valid(ctrl_pre.valid), .prod(prod.im),
    .m_axis_tdata(acc_im), .m_axis_tvalid(acc_im_v), .m_axis_tready(fin_im_rdy));

  axis_data_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH), .PROG_FULL(FIFO_PROG_FULL),
                   .PROG_EMPTY(FIFO_PROG_EMPTY)) u_fifo_re (
    .clk, .rst_n, .s_axis_tdata(acc_re), .s_axis_tvalid(acc_re_v),
    .s_axis_tready(fin_re_rdy), .m_axis_tdata(f_re_d), .m_axis_tvalid(f_re_v),
    .m_axis_tready(f_re_r), .count(), .prog_full(pf_re), .prog_empty(pe_re));
  axis_data_fifo #(.W(WORD_W), .DEPTH(FIFO_DEPTH), .PROG_FULL(FIFO_PROG_FULL),
                   .PROG_EMPTY(FIFO_PROG_EMPTY)) u_fifo_im (
    .clk, .rst_n, .s_axis_tdata(acc_im), .s_axis_tvalid(acc_im_v),
    .s_axis_tready(fin_im_rdy), .m_axis_tdata(f_im_d), .m_axis_tvalid(f_im_v),
    .m_axis_tready(f_im_r), .count(), .prog_full(pf_im), .prog_empty(pe_im));

  fifo_transfer_control #(.W(WORD_W), .TRANSFER_LEN(TRANSFER_LEN)) u_ftc_re (
    .clk, .rst_n, .s_axis_tdata(f_re_d), .s_axis_tvalid(f_re_v),
    .s_axis_tready(f_re_r), .m_axis_tdata(m_axis_re_tdata),
    .m_axis_tvalid(m_axis_re_tvalid), .m_axis_tlast(m_axis_re_tlast),
    .m_axis_tready(m_axis_re_tready));
  fifo_transfer_control #(.W(WORD_W), .TRANSFER_LEN(TRANSFER_LEN)) u_ftc_im (
    .clk, .rst_n, .s_axis_tdata(f_im_d), .s_axis_tvalid(f_im_v),
    .s_axis_tready(f_im_r), .m_axis_tdata(m_axis_im_tdata),
    .m_axis_tvalid(m_axis_im_tvalid), .m_axis_tlast(m_axis_im_tlast),
    .m_axis_tready(m_axis_im_tready));
endmodule
