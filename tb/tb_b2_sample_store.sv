// Self-checking test of the double-buffered sample store (16 samples per
// pulse, 6 pulses). A writer streams pulse words w(p, i) = {p, i, ...} with
// random gaps; a reader, when pulse p is loaded, reads all of it at random
// address pairs and flags the last read with rd_sw. Every word read must be
// the one written for that pulse and address, tready must stay low while two
// pulses wait unread (counted: the writer must block at least once), and
// pulses_loaded must count the pulses.
module tb_b2_sample_store;
  import bp_pkg::*;
  localparam int NS = 16, NP = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] tdata;
  logic tvalid = 0, tready;
  logic rd_en = 0, rd_sw = 0;
  logic [3:0] ra = '0, rb = '0;
  logic [63:0] da, db;
  logic [4:0] loaded, consumed;
  int checks = 0, failures = 0, blocked = 0;

  b2_sample_store #(.NSAMPLES(NS), .TOTAL_PULSES(NP)) dut (.clk, .rst_n,
    .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .rd_en, .rd_sw, .rd_addr_a(ra), .rd_addr_b(rb), .dout_a(da), .dout_b(db),
    .pulses_loaded(loaded), .pulses_consumed(consumed));

  function automatic logic [63:0] word(int p, int i);
    return {8'(p), 8'(i), 16'hA5C3, 32'(p * 977 + i * 31)};
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    int p = 0, i = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (p < NP) begin
      tvalid = ($urandom_range(0, 3) != 0);
      tdata  = word(p, i);
      if (tvalid && !tready) blocked++;
      @(posedge clk);
      if (tvalid && tready) begin
        i++;
        if (i == NS) begin i = 0; p++; end
      end
      #1;
    end
    tvalid = 0;
  end

  // reader
  initial begin
    int p = 0;
    logic [3:0] pa, pb;
    bit pend = 0;
    repeat (3) @(posedge clk);
    #1;
    repeat (200) @(posedge clk);   // let the writer run ahead and block
    #1;
    while (p < NP) begin
      if (int'(loaded) > p) begin
        for (int k = 0; k < NS; k++) begin
          rd_en = 1; ra = 4'($urandom); rb = 4'($urandom);
          rd_sw = (k == NS - 1);
          pa = ra; pb = rb;
          @(posedge clk); #1;
          rd_en = 0; rd_sw = 0;
          checks++;
          if (da != word(p, pa) || db != word(p, pb)) begin
            failures++;
            if (failures < 5) $display("FAIL p=%0d a=%0d da=%h", p, pa, da);
          end
        end
        p++;
      end else begin
        @(posedge clk); #1;
      end
    end
    checks++;
    if (blocked == 0 || loaded != 5'(NP) || consumed != 5'(NP)) begin
      failures++; $display("FAIL blocked=%0d loaded=%0d", blocked, loaded);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
