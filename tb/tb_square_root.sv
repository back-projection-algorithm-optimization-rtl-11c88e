// Self-checking test of the pipelined square root: random 78-bit radicands
// plus corner values, one per cycle; each result, taken exactly 39 cycles
// after its input, must satisfy root^2 <= x < (root+1)^2.
module tb_square_root;
  localparam int N = 400, LAT = 39;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [77:0] x;
  logic [38:0] root;
  logic [77:0] vec [N+LAT];
  int checks = 0, failures = 0;

  square_root #(.IN_W(78)) dut (.clk, .radicant(x), .root);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N + LAT; i++)
      vec[i] = {$urandom, $urandom, $urandom} >> ($urandom_range(0, 60));
    vec[0] = '0; vec[1] = 78'd1; vec[2] = 78'd3; vec[3] = 78'd4;
    vec[4] = '1; vec[5] = 78'(64'd1 << 50);
    for (int c = 0; c < N + LAT; c++) begin
      x = vec[c];
      @(posedge clk);
      #1;
      if (c >= LAT) begin
        logic [79:0] r0, r1, xv;
        r0 = 80'(root) * 80'(root);
        r1 = (80'(root) + 1) * (80'(root) + 1);
        xv = 80'(vec[c-LAT+1]);
        checks++;
        if (!(r0 <= xv && xv < r1)) begin
          failures++;
          if (failures < 5) $display("FAIL x=%h root=%h", xv, root);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
