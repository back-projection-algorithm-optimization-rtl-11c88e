// Self-checking test of the complex multiplier: random 2.22 operands, plus
// the extreme values, one pair per cycle; each product, taken 3 cycles
// later, is compared with the exact complex product computed in 64-bit
// integers.
module tb_multc;
  import bp_pkg::*;
  localparam int N = 300, LAT = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  cplx_t a, b;
  cprod_t p;
  cplx_t av [N+LAT], bv [N+LAT];
  int checks = 0, failures = 0;

  multc dut (.clk, .sample_in(a), .filter_in(b), .prod(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N + LAT; i++) begin
      av[i] = cplx_t'($urandom);  bv[i] = cplx_t'({$urandom, $urandom});
    end
    av[0] = '{re: 24'sh7FFFFF, im: 24'sh800000};
    bv[0] = '{re: 24'sh800000, im: 24'sh7FFFFF};
    for (int k = 0; k < N + LAT; k++) begin
      a = av[k]; b = bv[k];
      @(posedge clk);
      #1;
      if (k >= LAT - 1 && k - LAT + 1 < N) begin
        longint er, ei;
        cplx_t x, y;
        x = av[k-LAT+1]; y = bv[k-LAT+1];
        er = longint'(x.re) * longint'(y.re) - longint'(x.im) * longint'(y.im);
        ei = longint'(x.re) * longint'(y.im) + longint'(x.im) * longint'(y.re);
        checks++;
        if (longint'(p.re) != er || longint'(p.im) != ei) begin
          failures++;
          if (failures < 5) $display("FAIL k=%0d re=%0d exp=%0d im=%0d exp=%0d", k, p.re, er, p.im, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
