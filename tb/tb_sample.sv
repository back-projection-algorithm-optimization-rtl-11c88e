// Self-checking test of the Sample module (16 samples per pulse, 4 pulses,
// 12 items per pulse). All pulses are streamed into B2 (the store takes two
// at a time), ranges are chosen at random around R0 so that bins fall inside
// and outside [0, 14]. Each complex sample, taken 6 cycles after its range,
// must equal the truncated linear interpolation of that pulse's samples at
// Bin and Bin+1 computed in the testbench, or zero outside the valid bins.
module tb_sample;
  import bp_pkg::*;
  localparam int NS = 16, NP = 4, NI = 12, LAT = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dist_t r = '0;
  ctrl_t ctrl_in = '0;
  logic [63:0] tdata;
  logic tvalid = 0, tready;
  logic [3:0] loaded;
  cplx_t s;
  logic [63:0] mem [NP][NS];
  longint dv [NP*NI];
  int checks = 0, failures = 0, cyc = 0, nout = 0, nout_range = 0;
  int issue_cyc [NP*NI];

  sample #(.NSAMPLES(NS), .TOTAL_PULSES(NP)) dut (.clk, .rst_n, .r, .ctrl_in,
    .s_axis_smp_tdata(tdata), .s_axis_smp_tvalid(tvalid), .s_axis_smp_tready(tready),
    .pulses_loaded(loaded), .sample_out(s));

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint fl(longint d, longint w);
    return (d * w) >>> 25;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < NS; i++) mem[p][i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    #1;
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < NS; i++) begin
        tvalid = 1; tdata = mem[p][i];
        @(posedge clk);
        while (!tready) @(posedge clk);
        #1;
      end
    tvalid = 0;
  end

  // checker: output of item n appears LAT cycles after issue
  int exp_q [$];
  always @(posedge clk) if (rst_n && nout < NP*NI && exp_q.size() > 0 && exp_q[0] == cyc) begin
    int n, p;
    longint d, b, w2, w1, er, ei;
    void'(exp_q.pop_front());
    n = nout; p = n / NI; d = dv[n];
    b = d >>> 20; w2 = (d & 64'hFFFFF) << 5; w1 = (longint'(1) << 25) - w2;
    if (b >= 0 && b <= NS - 2) begin
      er = fl(longint'($signed(mem[p][b][23:0])), w1) + fl(longint'($signed(mem[p][b+1][23:0])), w2);
      ei = fl(longint'($signed(mem[p][b][55:32])), w1) + fl(longint'($signed(mem[p][b+1][55:32])), w2);
      er = longint'($signed(er[23:0])); ei = longint'($signed(ei[23:0]));
      nout_range++;
    end else begin
      er = 0; ei = 0;
    end
    checks++;
    if (longint'(s.re) != er || longint'(s.im) != ei) begin
      failures++;
      if (failures < 5) $display("FAIL n=%0d b=%0d re=%0d exp=%0d", n, b, s.re, er);
    end
    nout++;
  end

  initial begin
    int n = 0;
    for (int i = 0; i < NP*NI; i++)
      dv[i] = longint'($urandom_range(0, 18 << 20)) - (longint'(1) << 20);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      while (int'(loaded) <= p) begin @(posedge clk); #1; end
      for (int k = 0; k < NI; k++) begin
        r = dist_t'(longint'(R0_DEFAULT) + dv[n]);
        ctrl_in = '{valid: 1'b1, sw: (k == NI - 1)};
        exp_q.push_back(cyc + LAT);
        n++;
        @(posedge clk); #1;
        ctrl_in = '0;
        if ($urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
      end
    end
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (nout != NP*NI || nout_range == 0 || nout_range == NP*NI) begin
      failures++; $display("FAIL nout=%0d in range=%0d", nout, nout_range);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
