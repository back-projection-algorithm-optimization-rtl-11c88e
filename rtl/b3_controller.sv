// B3 controller: addressing and mode of one accumulation memory.
//
// A word counter walks the REGION_SIZE pixel words of the current region, one
// step per valid item, and a pulse counter advances each time the counter
// wraps. Item timing (T = cycle the product reaches the adder):
//   T-1  pre_valid: read of word wcnt is issued (rd_en, rd_addr)
//   T    the stored partial sum is on the memory output, the adder works
//   T+1  wr_en / wr_addr write the adder's registered result back
// Mode 1 (every pulse but the last of a region): the sum is written back.
// Mode 2 (last pulse): zero is written back (clear), clearing the word for
// the next region, and the finished pixel value is handed to the output
// stream (out_valid). Both modes read one port and write the other.
// Follows the design's description of the controller; the counter-based
// mode decision is written from that description. The write and output
// strobes are also gated by reset, so pipeline flags that power up set
// cannot write into B3 before the first reset edge.
module b3_controller #(
  parameter int unsigned REGION_SIZE = 8192,
  parameter int unsigned NPULSES     = 512,
  localparam int unsigned AW = $clog2(REGION_SIZE),
  localparam int unsigned PW = (NPULSES > 1) ? $clog2(NPULSES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pre_valid,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic          clear,
  output logic          out_valid
);
  logic [AW-1:0] wcnt, addr_1, addr_2;
  logic [PW-1:0] pcnt;
  logic          v1, v2, m1, m2, mode2, last_w;

  assign mode2  = (pcnt == PW'(NPULSES - 1));
  assign last_w = (wcnt == AW'(REGION_SIZE - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt <= '0;
      pcnt <= '0;
      v1   <= 1'b0;
      v2   <= 1'b0;
      m1   <= 1'b0;
      m2   <= 1'b0;
    end else begin
      if (pre_valid) begin
        wcnt <= last_w ? '0 : wcnt + 1'b1;
        if (last_w) pcnt <= mode2 ? '0 : pcnt + 1'b1;
      end
      v1 <= pre_valid;
      m1 <= mode2;
      v2 <= v1;
      m2 <= m1;
    end
    addr_1 <= wcnt;
    addr_2 <= addr_1;
  end

  assign rd_en     = pre_valid;
  assign rd_addr   = wcnt;
  assign wr_en     = v2 && rst_n;
  assign wr_addr   = addr_2;
  assign clear     = m2;
  assign out_valid = v2 && m2 && rst_n;
endmodule
