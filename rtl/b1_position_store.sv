// B1: platform-position memories and their write controller.
//
// Two block RAMs of NPULSES 64-bit words hold the platform X (B1.1) and Y
// (B1.2) coordinate of every pulse. The Z coordinate memory of the original
// plan is left out: the platform height is constant, so its square enters the
// distance computation as a constant.
// Write side: an AXI-Stream slave receives the position file one coordinate
// at a time, all X values first and then all Y values; a word counter forms
// the write address and selects the memory. When all 2*NPULSES words are
// stored, loaded goes high and tready drops for good.
// Read side: rd_addr (pulse number) is applied every cycle; plat_x and plat_y
// appear one cycle later. Stored words are in 24.40 format; the distance
// datapath uses 15.25, taken as bits [54:15] of the word (truncation).
// Memories and controller follow the design; the bit selection and the
// absent Z stream are this implementation's reading of it.
module b1_position_store
  import bp_pkg::*;
#(
  parameter int unsigned NPULSES = 512,
  localparam int unsigned PW = (NPULSES > 1) ? $clog2(NPULSES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  output logic              loaded,
  input  logic [PW-1:0]     rd_addr,
  output dist_t             plat_x,
  output dist_t             plat_y
);
  typedef enum logic [1:0] {S_FILL_X, S_FILL_Y, S_DONE} state_t;
  state_t        state;
  logic [PW-1:0] wcnt;
  logic          wr, last_word;
  logic [WORD_W-1:0] dx, dy;

  assign s_axis_tready = (state != S_DONE);
  assign wr            = s_axis_tvalid && s_axis_tready;
  assign last_word     = (wcnt == PW'(NPULSES - 1));
  assign loaded        = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_FILL_X;
      wcnt  <= '0;
    end else if (wr) begin
      wcnt <= last_word ? '0 : wcnt + 1'b1;
      if (last_word) state <= (state == S_FILL_X) ? S_FILL_Y : S_DONE;
    end
  end

  bram_sdp #(.W(WORD_W), .DEPTH(NPULSES)) u_b1_x (
    .clk, .we(wr && state == S_FILL_X), .waddr(wcnt), .wdata(s_axis_tdata),
    .re(1'b1), .raddr(rd_addr), .rdata(dx));
  bram_sdp #(.W(WORD_W), .DEPTH(NPULSES)) u_b1_y (
    .clk, .we(wr && state == S_FILL_Y), .waddr(wcnt), .wdata(s_axis_tdata),
    .re(1'b1), .raddr(rd_addr), .rdata(dy));

  assign plat_x = dist_t'(dx[54:15]);
  assign plat_y = dist_t'(dy[54:15]);
endmodule
