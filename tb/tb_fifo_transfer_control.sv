// Self-checking test of the FIFO transfer control with a transfer length of
// 5 beats. Random tvalid from the FIFO side and random tready from the DMA
// side: data and valid must pass straight through, tready must follow the
// DMA, and TLAST must be high on exactly every fifth accepted beat.
module tb_fifo_transfer_control;
  localparam int TL = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] sd = '0, md;
  logic sv = 0, sr, mv, ml, mr = 0;
  int checks = 0, failures = 0, beats = 0, nlast = 0;

  fifo_transfer_control #(.W(64), .TRANSFER_LEN(TL)) dut (.clk, .rst_n,
    .s_axis_tdata(sd), .s_axis_tvalid(sv), .s_axis_tready(sr),
    .m_axis_tdata(md), .m_axis_tvalid(mv), .m_axis_tlast(ml), .m_axis_tready(mr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      sv = $urandom_range(0, 1); mr = $urandom_range(0, 1); sd = {$urandom, $urandom};
      #1;
      checks++;
      if (md != sd || mv != sv || sr != mr) begin failures++; $display("FAIL passthrough"); end
      if (sv && mr) begin
        checks++;
        if (ml != ((beats % TL) == TL - 1)) begin failures++; $display("FAIL tlast beat %0d", beats); end
        if (ml) nlast++;
        beats++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (nlast != beats / TL || nlast == 0) begin failures++; $display("FAIL nlast=%0d", nlast); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
