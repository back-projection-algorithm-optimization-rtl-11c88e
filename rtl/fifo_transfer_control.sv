// FIFO Transfer Control: frames the output stream for the DMA engine.
//
// Sits on the AXI-Stream channel between an output FIFO and the DMA write
// channel. Data, valid and ready pass straight through; a beat counter
// raises TLAST on every TRANSFER_LEN-th accepted word, so each DMA transfer
// programmed by software (default: one region, 16 rows x 512 pixels) ends
// exactly on a packet boundary. The counter advances only on a handshake.
// The purpose (managing TLAST between FIFO and DMA) follows the design; the
// packet length is this implementation's choice. Because only TLAST is
// generated here, all other output bits are wired straight from inputs.
module fifo_transfer_control #(
  parameter int unsigned W            = 64,
  parameter int unsigned TRANSFER_LEN = 8192,
  localparam int unsigned CW = (TRANSFER_LEN > 1) ? $clog2(TRANSFER_LEN) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] s_axis_tdata,
  input  logic         s_axis_tvalid,
  output logic         s_axis_tready,
  output logic [W-1:0] m_axis_tdata,
  output logic         m_axis_tvalid,
  output logic         m_axis_tlast,
  input  logic         m_axis_tready
);
  logic [CW-1:0] beat;
  logic          last;

  assign last          = (beat == CW'(TRANSFER_LEN - 1));
  assign m_axis_tdata  = s_axis_tdata;
  assign m_axis_tvalid = s_axis_tvalid;
  assign s_axis_tready = m_axis_tready;
  assign m_axis_tlast  = last;

  always_ff @(posedge clk) begin
    if (!rst_n)                             beat <= '0;
    else if (s_axis_tvalid && m_axis_tready) beat <= last ? '0 : beat + 1'b1;
  end
endmodule
