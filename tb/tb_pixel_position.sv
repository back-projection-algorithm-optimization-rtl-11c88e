// Self-checking test of the Pixel Position counters on a small image
// (8 columns, 2 rows per region, 3 regions, 3 pulses). ce is toggled at
// random; every issued item's coordinates, position address and switch flag
// are compared with the schedule computed independently in the testbench,
// and done must rise exactly after the last item.
module tb_pixel_position;
  import bp_pkg::*;
  localparam int NX = 8, RR = 2, NR = 3, NP = 3;
  localparam longint D = 64'd1 << 23;
  logic clk = 0, rst_n = 0, ce = 0;
  always #5 clk = ~clk;
  dist_t px, py;
  logic [1:0] pos_addr, region, pulse;
  ctrl_t ctrl;
  logic done;
  int checks = 0, failures = 0, n = 0;

  pixel_position #(.NPIX_X(NX), .REGION_ROWS(RR), .NREGIONS(NR), .NPULSES(NP))
    dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s item %0d", what, n); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (n < NX*RR*NR*NP) begin
      ce = ($urandom_range(0, 3) != 0);
      #1;
      if (ce) begin
        int ix, iy, p, rg;
        longint ex, ey;
        ix = n % NX; iy = (n / NX) % RR; p = (n / (NX*RR)) % NP; rg = n / (NX*RR*NP);
        ex = (2*ix - (NX-1)) * D / 2;
        ey = (2*(rg*RR + iy) - (RR*NR-1)) * D / 2;
        chk(ctrl.valid, "valid");
        chk(longint'(px) == ex, "px");
        chk(longint'(py) == ey, "py");
        chk(int'(pos_addr) == p && int'(pulse) == p, "pulse");
        chk(int'(region) == rg, "region");
        chk(ctrl.sw == (ix == NX-1 && iy == RR-1), "sw");
        chk(!done, "done early");
        n++;
      end else chk(!ctrl.valid, "valid without ce");
      @(posedge clk);
      #1;
    end
    ce = 1; #1;
    chk(done && !ctrl.valid, "done at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
