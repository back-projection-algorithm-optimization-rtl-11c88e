// System control: the enable that lets the pipeline issue new items.
//
// Start (Init): the pipeline may not begin before the memories hold what the
// first iterations need: all platform positions (pos_loaded) and the complete
// first pulse of samples (first_pulse_loaded). started then stays high.
// Output flow: the output FIFOs' fill levels stop and restart issue with
// hysteresis. Issue halts when any FIFO reports prog_full, which leaves room
// for the items already in flight, and resumes once all FIFOs report
// prog_empty, before they run dry.
// Sample availability: issue also waits while the samples of the pulse
// about to be started are not yet stored (smp_ready low).
//   enable = started & !halted & smp_ready & !done
// The enable is the valid bit injected at the head of the pipeline and
// travels with every item down to the accumulators.
// Start condition and FIFO-flag hysteresis follow the design; the
// sample-availability term is this implementation's addition.
module system_control (
  input  logic clk,
  input  logic rst_n,
  input  logic pos_loaded,
  input  logic first_pulse_loaded,
  input  logic smp_ready,
  input  logic fifo_prog_full,
  input  logic fifo_prog_empty,
  input  logic done,
  output logic enable,
  output logic started,
  output logic halted
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      started <= 1'b0;
      halted  <= 1'b0;
    end else begin
      if (pos_loaded && first_pulse_loaded) started <= 1'b1;
      if (fifo_prog_full)        halted <= 1'b1;
      else if (fifo_prog_empty)  halted <= 1'b0;
    end
  end

  assign enable = started && !halted && smp_ready && !done;
endmodule
