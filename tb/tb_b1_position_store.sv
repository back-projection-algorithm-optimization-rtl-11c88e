// Self-checking test of the B1 position store (8 pulses): the X and Y
// coordinates are streamed in with random valid gaps; tready must drop and
// loaded rise after 16 words, and reading every address must return bits
// [54:15] of the word written for it, one cycle after the address.
module tb_b1_position_store;
  import bp_pkg::*;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] tdata;
  logic tvalid = 0, tready, loaded;
  logic [2:0] rd_addr = '0;
  dist_t plat_x, plat_y;
  logic [63:0] words [2*NP];
  int checks = 0, failures = 0;

  b1_position_store #(.NPULSES(NP)) dut (.clk, .rst_n, .s_axis_tdata(tdata),
    .s_axis_tvalid(tvalid), .s_axis_tready(tready), .loaded, .rd_addr, .plat_x, .plat_y);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n = 0;
    for (int i = 0; i < 2*NP; i++) words[i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (n < 2*NP) begin
      chk(!loaded && tready, "ready while filling");
      tvalid = $urandom_range(0, 1);
      tdata  = words[n];
      @(posedge clk);
      if (tvalid) n++;
      #1;
    end
    tvalid = 1; tdata = '1;
    #1 chk(loaded && !tready, "loaded after last word");
    @(posedge clk); #1 tvalid = 0;
    for (int a = 0; a < NP; a++) begin
      rd_addr = 3'(a);
      @(posedge clk); #1;
      chk(plat_x == dist_t'(words[a][54:15]), "x");
      chk(plat_y == dist_t'(words[NP+a][54:15]), "y");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
