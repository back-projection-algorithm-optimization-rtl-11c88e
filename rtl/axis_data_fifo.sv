// Output FIFO (B4) between an accumulator and the memory-write stream.
//
// DEPTH words of W bits, AXI-Stream slave in and master out, first-word
// fall-through: m_axis_tdata shows the oldest word whenever m_axis_tvalid is
// high. Besides full/empty it offers two programmable flags on the fill
// level: prog_full (count >= PROG_FULL) and prog_empty (count <= PROG_EMPTY).
// The system control halts the pipeline on prog_full and resumes it on
// prog_empty. Writing into a full FIFO is a protocol error and is asserted
// against. Read and write may happen in the same cycle.
// The depth and the two flags follow the design; the thresholds are this
// implementation's defaults (prog_full leaves room for the ~100 items in
// flight in the pipeline), and the storage is a plain array.
module axis_data_fifo #(
  parameter int unsigned W          = 64,
  parameter int unsigned DEPTH      = 2048,
  parameter int unsigned PROG_FULL  = DEPTH - 256,
  parameter int unsigned PROG_EMPTY = DEPTH / 2,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] s_axis_tdata,
  input  logic         s_axis_tvalid,
  output logic         s_axis_tready,
  output logic [W-1:0] m_axis_tdata,
  output logic         m_axis_tvalid,
  input  logic         m_axis_tready,
  output logic [AW:0]  count,
  output logic         prog_full,
  output logic         prog_empty
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          push, pop;

  assign s_axis_tready = (count < (AW+1)'(DEPTH));
  assign m_axis_tvalid = (count != '0);
  assign push = s_axis_tvalid && s_axis_tready;
  assign pop  = m_axis_tvalid && m_axis_tready;
  assign m_axis_tdata = mem[rp];
  assign prog_full  = (count >= (AW+1)'(PROG_FULL));
  assign prog_empty = (count <= (AW+1)'(PROG_EMPTY));

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= s_axis_tdata;
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk)
    if (rst_n && s_axis_tvalid) assert (s_axis_tready);
endmodule
