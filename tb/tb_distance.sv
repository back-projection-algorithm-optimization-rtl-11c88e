// Self-checking test of the Distance module on a small schedule (8 columns,
// 2 rows per region, 2 regions, 4 pulses). Platform positions (24.40 words)
// are streamed in, then items are issued with ce toggled at random. For every
// item leaving the module, R must satisfy R^2 <= rad < (R+1)^2 with
//   rad = trunc78((x_k - px)^2 + (y_k - py)^2 + Z1)
// computed in the testbench from the schedule, the sw flag must match, and
// the item must leave exactly 46 cycles after it was issued.
module tb_distance;
  import bp_pkg::*;
  localparam int NX = 8, RR = 2, NR = 2, NP = 4, LAT = 46;
  localparam longint D = 64'd1 << 23;
  logic clk = 0, rst_n = 0, ce = 0;
  always #5 clk = ~clk;
  logic [63:0] tdata;
  logic tvalid = 0, tready, pos_loaded, done;
  logic region;
  logic [1:0] pulse;
  dist_t r;
  ctrl_t ctrl_out;
  logic [63:0] words [2*NP];
  longint issue_cyc [NX*RR*NR*NP];
  int checks = 0, failures = 0, cyc = 0, nin = 0, nout = 0;

  distance #(.NPIX_X(NX), .REGION_ROWS(RR), .NREGIONS(NR), .NPULSES(NP)) dut (
    .clk, .rst_n, .ce, .s_axis_pos_tdata(tdata), .s_axis_pos_tvalid(tvalid),
    .s_axis_pos_tready(tready), .pos_loaded, .region, .pulse, .done, .r, .ctrl_out);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && ctrl_out.valid) begin
    int n, ix, iy, p, rg;
    logic [79:0] dx2, dy2, rad, r0, r1;
    longint px, py, xk, yk;
    n = nout; ix = n % NX; iy = (n / NX) % RR; p = (n / (NX*RR)) % NP; rg = n / (NX*RR*NP);
    px = (2*ix - (NX-1)) * D / 2;
    py = (2*(rg*RR + iy) - (RR*NR-1)) * D / 2;
    xk = longint'($signed(words[p][54:15]));
    yk = longint'($signed(words[NP+p][54:15]));
    dx2 = 80'((xk - px) * (xk - px));
    dy2 = 80'((yk - py) * (yk - py));
    rad = 80'(78'(dx2 + dy2 + 80'(Z1_DEFAULT)));
    r0 = 80'(r) * 80'(r);
    r1 = (80'(r) + 1) * (80'(r) + 1);
    checks++;
    if (!(r0 <= rad && rad < r1) || ctrl_out.sw != (ix == NX-1 && iy == RR-1) ||
        longint'(cyc) - issue_cyc[n] != LAT) begin
      failures++;
      if (failures < 5) $display("FAIL n=%0d r=%h lat=%0d", n, r, longint'(cyc) - issue_cyc[n]);
    end
    nout++;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      words[p]    = 64'(longint'($urandom_range(6900, 7100)) << 40) + 64'($urandom);
      words[NP+p] = 64'((longint'($urandom_range(0, 800)) - 400) <<< 40) + 64'($urandom);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2*NP; i++) begin
      tvalid = 1; tdata = words[i];
      @(posedge clk); #1;
    end
    tvalid = 0;
    checks++;
    if (!pos_loaded) failures++;
    while (!done) begin
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin issue_cyc[nin] = longint'(cyc); nin++; end
      @(posedge clk); #1;
    end
    ce = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (nout != NX*RR*NR*NP) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
