// Pipelined binary restoring square root.
//
// Computes root = floor(sqrt(radicant)) for an unsigned IN_W-bit radicand.
// Each layer of the pipeline brings down the next two radicand bits into the
// partial remainder, forms the test value (root << 2) | 1, compares, and on
// success subtracts it and appends a 1 to the root, otherwise appends a 0.
// One layer is one register stage, so the latency is OUT_W = IN_W/2 cycles
// and a new radicand is accepted every cycle. With the default 78-bit
// radicand (28.50 format) the root is 39 bits (14.25 format) after 39 cycles,
// as the design's square-root module does. The layer structure and the
// latency follow the design; register names mirror its signals
// (rem = Radicant_x, test = Root_test, root = Root_x).
module square_root #(
  parameter int unsigned IN_W = 78,
  localparam int unsigned OUT_W = (IN_W + 1) / 2
) (
  input  logic             clk,
  input  logic [IN_W-1:0]  radicant,
  output logic [OUT_W-1:0] root
);
  localparam int unsigned PAD_W = 2 * OUT_W;   // radicand padded to even width
  localparam int unsigned REM_W = OUT_W + 2;   // partial remainder width

  logic [PAD_W-1:0] left_q [OUT_W+1];  // radicand bits still to be consumed
  logic [REM_W-1:0] rem_q  [OUT_W+1];
  logic [OUT_W-1:0] root_q [OUT_W+1];

  assign left_q[0] = PAD_W'(radicant);
  assign rem_q[0]  = '0;
  assign root_q[0] = '0;

  for (genvar i = 0; i < int'(OUT_W); i++) begin : g_layer
    logic [REM_W+1:0] rem_pre;   // remainder with two new bits
    logic [REM_W+1:0] test;      // (root << 2) | 1
    logic             comp;
    assign rem_pre = (REM_W+2)'({rem_q[i], left_q[i][PAD_W-1 -: 2]});
    assign test    = (REM_W+2)'({root_q[i], 2'b01});
    assign comp    = (rem_pre >= test);
    always_ff @(posedge clk) begin
      left_q[i+1] <= {left_q[i][PAD_W-3:0], 2'b00};
      rem_q[i+1]  <= comp ? REM_W'(rem_pre - test) : REM_W'(rem_pre);
      root_q[i+1] <= {root_q[i][OUT_W-2:0], comp};
    end
  end

  assign root = root_q[OUT_W];
endmodule
