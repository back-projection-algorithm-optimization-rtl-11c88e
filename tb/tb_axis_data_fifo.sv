// Self-checking test of the first-word-fall-through AXI-Stream FIFO at depth
// 16 (programmable full 12, programmable empty 4). Random pushes and pops,
// with bursts that fill and drain it, are checked against a queue model:
// output data and order, fill count, tready (low only when full), tvalid and
// both programmable flags, every cycle.
module tb_axis_data_fifo;
  localparam int D = 16, PF = 12, PE = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] sd = '0, md;
  logic sv = 0, sr, mv, mr = 0, pf, pe;
  logic [4:0] count;
  logic [63:0] q [$];
  int checks = 0, failures = 0, nfull = 0, npf = 0;

  axis_data_fifo #(.W(64), .DEPTH(D), .PROG_FULL(PF), .PROG_EMPTY(PE)) dut (.clk, .rst_n,
    .s_axis_tdata(sd), .s_axis_tvalid(sv), .s_axis_tready(sr),
    .m_axis_tdata(md), .m_axis_tvalid(mv), .m_axis_tready(mr),
    .count, .prog_full(pf), .prog_empty(pe));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s size=%0d", msg, q.size()); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int phase = (i / 200) % 3;   // fill, drain, mixed
      chk(int'(count) == q.size(), "count");
      chk(sr == (q.size() < D), "tready");
      chk(mv == (q.size() > 0), "tvalid");
      chk(pf == (q.size() >= PF) && pe == (q.size() <= PE), "flags");
      if (q.size() > 0) chk(md == q[0], "data");
      if (q.size() == D) nfull++;
      if (pf) npf++;
      sv = (phase == 0) ? ($urandom_range(0, 3) != 0) : (phase == 1) ? ($urandom_range(0, 3) == 0)
                                                                     : $urandom_range(0, 1);
      sv = sv && sr;
      mr = (phase == 0) ? ($urandom_range(0, 3) == 0) : (phase == 1) ? ($urandom_range(0, 3) != 0)
                                                                     : $urandom_range(0, 1);
      sd = {$urandom, $urandom};
      @(posedge clk);
      if (mv && mr) void'(q.pop_front());
      if (sv && sr) q.push_back(sd);
      #1;
    end
    chk(nfull > 0 && npf > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
