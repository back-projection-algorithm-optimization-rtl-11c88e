// Self-checking test of the B3 controller (8 words per region, 3 pulses).
// pre_valid is driven with random gaps over several regions. A model in the
// testbench keeps its own word and pulse counters: the read address must
// follow the word counter, each write must reach the same address two cycles
// after its read, and the clear/output flag must be raised on the writes of
// the last pulse only, once per word.
module tb_b3_controller;
  localparam int RS = 8, NP = 3, NREG = 3, LAT = 2;
  logic clk = 0, rst_n = 0, pre_valid = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en, clear, out_valid;
  logic [2:0] rd_addr, wr_addr;
  int checks = 0, failures = 0, cyc = 0, wcnt = 0, pcnt = 0, nout = 0, nwr = 0;
  typedef struct {int c; int a; bit m;} ev_t;
  ev_t q [$];

  b3_controller #(.REGION_SIZE(RS), .NPULSES(NP)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s at %0d", msg, cyc); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    chk(rd_en == pre_valid, "rd_en");
    if (pre_valid) begin
      chk(int'(rd_addr) == wcnt, "rd_addr");
      q.push_back('{c: cyc + LAT, a: wcnt, m: (pcnt == NP - 1)});
      if (wcnt == RS - 1) begin wcnt = 0; pcnt = (pcnt == NP - 1) ? 0 : pcnt + 1; end
      else wcnt++;
    end
    if (q.size() > 0 && q[0].c == cyc) begin
      ev_t e;
      e = q.pop_front();
      chk(wr_en && int'(wr_addr) == e.a && clear == e.m && out_valid == e.m, "write");
      nwr++;
      if (e.m) nout++;
    end else chk(!wr_en && !out_valid, "idle write");
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < RS * NP * NREG; i++) begin
      pre_valid = 1;
      @(posedge clk); #1;
      pre_valid = 0;
      while ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
    end
    repeat (4) @(posedge clk);
    chk(nwr == RS * NP * NREG && nout == RS * NREG, "totals");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
