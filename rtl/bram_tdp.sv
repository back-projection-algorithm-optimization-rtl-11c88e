// True dual-port block RAM: two independent read/write ports on one clock.
// Each port reads with one cycle of latency (registered output); a write on
// a port does not update that port's read data. Contents start at zero.
module bram_tdp #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [W-1:0]  din_a,
  output logic [W-1:0]  dout_a,
  input  logic          en_b,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [W-1:0]  din_b,
  output logic [W-1:0]  dout_b
);
  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en_a) begin
      if (we_a) mem[addr_a] <= din_a;
      else      dout_a      <= mem[addr_a];
    end
    if (en_b) begin
      if (we_b) mem[addr_b] <= din_b;
      else      dout_b      <= mem[addr_b];
    end
  end
endmodule
