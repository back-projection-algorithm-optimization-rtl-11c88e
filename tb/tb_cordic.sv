// Self-checking test of the CORDIC: random angles over [-pi, pi] (signed
// 2.22 radians), one per cycle. Each cos/sin pair, taken 28 cycles after its
// angle, must match $cos/$sin within 6 LSBs of the 1.22 output format.
module tb_cordic;
  localparam int N = 500, LAT = 28;
  localparam real PI = 3.14159265358979;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [24:0] phase;
  logic signed [23:0] c, s;
  real ang [N+LAT];
  int checks = 0, failures = 0;

  cordic dut (.clk, .phase, .cos_o(c), .sin_o(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N + LAT; i++)
      ang[i] = (real'($urandom_range(0, 2000000)) / 1000000.0 - 1.0) * PI * 0.9999;
    ang[0] = 0.0; ang[1] = PI/2; ang[2] = -PI/2; ang[3] = 3.0; ang[4] = -3.0;
    for (int k = 0; k < N + LAT; k++) begin
      phase = 25'($rtoi(ang[k] * 4194304.0));
      @(posedge clk);
      #1;
      if (k >= LAT - 1 && k - LAT + 1 < N) begin
        real a, ec, es;
        a  = real'($rtoi(ang[k-LAT+1] * 4194304.0)) / 4194304.0;
        ec = $cos(a) * 4194304.0;
        es = $sin(a) * 4194304.0;
        checks++;
        if ((real'(c) - ec) > 6.0 || (ec - real'(c)) > 6.0 ||
            (real'(s) - es) > 6.0 || (es - real'(s)) > 6.0) begin
          failures++;
          if (failures < 5) $display("FAIL a=%f cos=%0d exp=%f sin=%0d exp=%f", a, c, ec, s, es);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
