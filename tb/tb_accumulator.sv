// Self-checking test of the accumulator lane (B3 memory plus controller),
// 8 words per region and 3 pulses, over 3 regions. Random signed 48-bit
// products are fed one cycle after their pre_valid strobe, as the pipeline
// in front of the lane does. A model adds them per word; on the last pulse of
// each region every word must leave on the output two cycles after its
// strobe with the full sum, and the next region must start again from zero.
module tb_accumulator;
  import bp_pkg::*;
  localparam int RS = 8, NP = 3, NREG = 3, LAT = 2;
  logic clk = 0, rst_n = 0, pre_valid = 0;
  always #5 clk = ~clk;
  prod_lane_t prod = '0, prod_next = '0;
  acc_t tdata;
  logic tvalid;
  longint model [RS];
  int checks = 0, failures = 0, cyc = 0, wcnt = 0, pcnt = 0, nout = 0;
  typedef struct {int c; longint v;} ev_t;
  ev_t q [$];

  accumulator #(.REGION_SIZE(RS), .NPULSES(NP)) dut (.clk, .rst_n, .pre_valid, .prod,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(1'b1));

  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) prod <= prod_next;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (pre_valid) begin
      model[wcnt] += longint'(prod_next);
      if (pcnt == NP - 1) begin
        q.push_back('{c: cyc + LAT, v: model[wcnt]});
        model[wcnt] = 0;
      end
      if (wcnt == RS - 1) begin wcnt = 0; pcnt = (pcnt == NP - 1) ? 0 : pcnt + 1; end
      else wcnt++;
    end
    if (q.size() > 0 && q[0].c == cyc) begin
      ev_t e;
      e = q.pop_front();
      checks++;
      if (!tvalid || longint'(tdata) != e.v) begin
        failures++;
        if (failures < 8) $display("FAIL got %0d exp %0d valid %b", tdata, e.v, tvalid);
      end
      nout++;
    end else begin
      checks++;
      if (tvalid) begin failures++; $display("FAIL unexpected output at %0d", cyc); end
    end
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < RS * NP * NREG; i++) begin
      pre_valid = 1;
      prod_next = prod_lane_t'({$urandom, $urandom});
      @(posedge clk); #1;
      pre_valid = 0;
      while ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (nout != RS * NREG) begin failures++; $display("FAIL nout=%0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
