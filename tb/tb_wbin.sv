// Self-checking test of WBin: random ranges around R0 (also below R0 and
// beyond the last bin) plus exact bin boundaries; one cycle later Bin, W1,
// W2 and the range flag must equal floor((R-R0)*32), the fraction in 0.25
// format, 1 - W2, and 0 <= Bin <= NSAMPLES-2, computed in 64-bit integers.
module tb_wbin;
  import bp_pkg::*;
  localparam int N = 400;
  logic clk = 0;
  always #5 clk = ~clk;
  dist_t r;
  logic [13:0] bin;
  logic [25:0] w1;
  logic [24:0] w2;
  logic in_range;
  int checks = 0, failures = 0;

  wbin #(.NSAMPLES(4096)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint rr, d, eb, ew;
    for (int k = 0; k < N; k++) begin
      d  = longint'($urandom_range(0, 1 << 30)) * 8 - (longint'(4) << 25);
      if (k == 0) d = 0;
      if (k == 1) d = longint'(4094) << 20;
      if (k == 2) d = longint'(4095) << 20;
      if (k == 3) d = -1;
      rr = longint'(R0_DEFAULT) + d;
      r  = dist_t'(rr);
      @(posedge clk);
      #1;
      eb = d >>> 20;
      ew = (d & 64'hFFFFF) << 5;
      checks++;
      if (bin != 14'(eb) || longint'(w2) != ew || longint'(w1) != (longint'(1) << 25) - ew ||
          in_range != (eb >= 0 && eb <= 4094)) begin
        failures++;
        if (failures < 5) $display("FAIL d=%0d bin=%0d exp=%0d w2=%0d exp=%0d ir=%0d", d, bin, eb, w2, ew, in_range);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
