// Self-checking test of the matched-filter module: random ranges between
// 9900 m and 10100 m, one per cycle. Each output, taken 44 cycles after its
// range, must match cos/sin(2*pi*frac(R*2ku)) computed in floating point,
// within 8 LSBs of the 1.22 format; all four quadrants must be exercised.
module tb_filter;
  import bp_pkg::*;
  localparam int N = 600, LAT = 44;
  localparam real TWO_PI_R = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  dist_t r;
  cplx_t f;
  dist_t rv [N+LAT];
  int checks = 0, failures = 0;
  int quad_seen [4] = '{0, 0, 0, 0};

  filter dut (.clk, .rst_n, .r, .filter_out(f));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ku2;
    ku2 = real'(TWO_KU_DEFAULT[63:11]) / real'(64'd1 << 46);
    for (int i = 0; i < N + LAT; i++)
      rv[i] = dist_t'((64'd9900 << 25) + ((64'($urandom) << 1) % (64'd200 << 25)));
    @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < N + LAT; k++) begin
      r = rv[k];
      @(posedge clk);
      #1;
      if (k >= LAT - 1 && k - LAT + 1 < N) begin
        real laps, ph, ec, es;
        laps = real'(rv[k-LAT+1]) / 33554432.0 * ku2;
        laps = laps - $floor(laps);
        quad_seen[int'($floor(laps * 4.0))]++;
        ph = laps * TWO_PI_R;
        ec = $cos(ph) * 4194304.0;
        es = $sin(ph) * 4194304.0;
        checks++;
        if ((real'(f.re) - ec) > 8.0 || (ec - real'(f.re)) > 8.0 ||
            (real'(f.im) - es) > 8.0 || (es - real'(f.im)) > 8.0) begin
          failures++;
          if (failures < 5) $display("FAIL laps=%f re=%0d exp=%f im=%0d exp=%f", laps, f.re, ec, f.im, es);
        end
      end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_seen[q] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
