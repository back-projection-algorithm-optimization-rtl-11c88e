// Shift register of N stages that delays a W-bit bus by N clock cycles
// (N = 0 gives a plain wire). Used to balance the latencies of parallel
// datapaths. The stages are cleared by the synchronous active-low reset so
// that control bits travelling through it start out invalid.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_sr
    logic [W-1:0] sr [N];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(N); i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < int'(N); i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[N-1];
  end
endmodule
