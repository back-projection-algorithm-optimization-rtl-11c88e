// Self-checking test of the interpolation module: random sample words and
// weights (W1 = 2^25 - W2 as WBin produces them, including W2 = 0), one set
// per cycle; each result, taken 3 cycles later, is compared with
// floor(d1*W1/2^25) + floor(d2*W2/2^25) per component, computed in 64-bit
// integers from the word fields re = [23:0], im = [55:32].
module tb_interpolation;
  import bp_pkg::*;
  localparam int N = 300, LAT = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [63:0] d1, d2;
  logic [25:0] w1;
  logic [24:0] w2;
  cplx_t s;
  logic [63:0] d1v [N+LAT], d2v [N+LAT];
  logic [24:0] wv [N+LAT];
  int checks = 0, failures = 0;

  interpolation dut (.clk, .data_1(d1), .data_2(d2), .w1, .w2, .sample(s));

  function automatic longint fl(longint d, longint w);
    return (d * w) >>> 25;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N + LAT; i++) begin
      d1v[i] = {$urandom, $urandom}; d2v[i] = {$urandom, $urandom};
      wv[i]  = 25'($urandom);
    end
    wv[0] = '0; wv[5] = '0;
    for (int k = 0; k < N + LAT; k++) begin
      d1 = d1v[k]; d2 = d2v[k]; w2 = wv[k]; w1 = 26'(1 << 25) - 26'(wv[k]);
      @(posedge clk);
      #1;
      if (k >= LAT - 1 && k - LAT + 1 < N) begin
        int j;
        longint ww1, ww2, er, ei;
        j = k - LAT + 1;
        ww2 = longint'(wv[j]); ww1 = (64'd1 << 25) - ww2;
        er = fl(longint'($signed(d1v[j][23:0])), ww1) + fl(longint'($signed(d2v[j][23:0])), ww2);
        ei = fl(longint'($signed(d1v[j][55:32])), ww1) + fl(longint'($signed(d2v[j][55:32])), ww2);
        er = longint'($signed(er[23:0])); ei = longint'($signed(ei[23:0]));
        checks++;
        if (longint'(s.re) != er || longint'(s.im) != ei) begin
          failures++;
          if (failures < 5) $display("FAIL j=%0d re=%0d exp=%0d im=%0d exp=%0d", j, s.re, er, s.im, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
