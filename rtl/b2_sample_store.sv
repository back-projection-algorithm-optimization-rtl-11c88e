// B2: double-buffered radar-sample memories and their controller.
//
// Two true-dual-port block RAMs (B2.1, B2.2) of NSAMPLES 64-bit words each
// hold the samples of two consecutive pulses: while the pipeline reads pulse
// p from one, the stream from memory fills the other with pulse p+1.
// Write side: an AXI-Stream slave; a word counter forms the write address,
// and after the last sample of a pulse the write side switches memory.
// tready is high while the memory to be filled is free, i.e. while fewer
// than two pulses are stored ahead of the reader (pulses_loaded <
// pulses_consumed + 2), and drops for good after TOTAL_PULSES pulses.
// Read side: every cycle with rd_en both ports of the current read memory are
// read at rd_addr_a and rd_addr_b (Bin and Bin+1); the words appear on
// dout_a / dout_b one cycle later. rd_sw with rd_en marks the last read of a
// pulse: the read side then switches memory and the pulse counts as consumed.
// pulses_loaded counts complete pulses written since reset and lets the
// caller hold the pipeline until the pulse it is about to start is present.
// Memories, ports and the switching flag follow the design; the occupancy
// counters are this implementation's way of guarding the two buffers.
module b2_sample_store
  import bp_pkg::*;
#(
  parameter int unsigned NSAMPLES     = 4096,
  parameter int unsigned TOTAL_PULSES = 16384,
  localparam int unsigned AW = $clog2(NSAMPLES),
  localparam int unsigned CW = $clog2(TOTAL_PULSES + 1) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic              rd_en,
  input  logic              rd_sw,
  input  logic [AW-1:0]     rd_addr_a,
  input  logic [AW-1:0]     rd_addr_b,
  output logic [WORD_W-1:0] dout_a,
  output logic [WORD_W-1:0] dout_b,
  output logic [CW-1:0]     pulses_loaded,
  output logic [CW-1:0]     pulses_consumed
);
  logic [AW-1:0] wcnt;
  logic          wr_bank, rd_bank, rd_bank_q, wr, last_word;
  logic [WORD_W-1:0] da [2];
  logic [WORD_W-1:0] db [2];

  assign s_axis_tready = (pulses_loaded < pulses_consumed + CW'(2)) &&
                         (pulses_loaded < CW'(TOTAL_PULSES));
  assign wr        = s_axis_tvalid && s_axis_tready;
  assign last_word = (wcnt == AW'(NSAMPLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt            <= '0;
      wr_bank         <= 1'b0;
      rd_bank         <= 1'b0;
      rd_bank_q       <= 1'b0;
      pulses_loaded   <= '0;
      pulses_consumed <= '0;
    end else begin
      if (wr) begin
        wcnt <= last_word ? '0 : wcnt + 1'b1;
        if (last_word) begin
          wr_bank       <= !wr_bank;
          pulses_loaded <= pulses_loaded + 1'b1;
        end
      end
      if (rd_en) rd_bank_q <= rd_bank;
      if (rd_en && rd_sw) begin
        rd_bank         <= !rd_bank;
        pulses_consumed <= pulses_consumed + 1'b1;
      end
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic wr_here, rd_here;
    assign wr_here = wr && (wr_bank == 1'(b));
    assign rd_here = rd_en && (rd_bank == 1'(b));
    bram_tdp #(.W(WORD_W), .DEPTH(NSAMPLES)) u_mem (
      .clk,
      .en_a(wr_here || rd_here), .we_a(wr_here),
      .addr_a(wr_here ? wcnt : rd_addr_a), .din_a(s_axis_tdata), .dout_a(da[b]),
      .en_b(rd_here), .we_b(1'b0), .addr_b(rd_addr_b), .din_b('0), .dout_b(db[b]));
  end

  assign dout_a = da[rd_bank_q];
  assign dout_b = db[rd_bank_q];

  // the writer never fills the memory being read
  always_ff @(posedge clk)
    if (rst_n && wr && rd_en) assert (wr_bank != rd_bank);
endmodule
