// Self-checking test of the system control. Random inputs are applied for
// many cycles and compared with a model: started latches once positions and
// the first pulse are both loaded, halted is set by a programmable-full flag
// and cleared only by programmable-empty, and enable is the AND of started,
// not halted, sample-ready and not done. Halt set and halt release must each
// be seen.
module tb_system_control;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pos_loaded = 0, first_pulse_loaded = 0, smp_ready = 0, fifo_prog_full = 0,
        fifo_prog_empty = 1, done = 0, enable, started, halted;
  bit m_started = 0, m_halted = 0;
  int checks = 0, failures = 0, nset = 0, nclr = 0;

  system_control dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      pos_loaded = (i > 20) ? 1'b1 : $urandom_range(0, 3) == 0 && i > 10;
      first_pulse_loaded = (i > 15) && $urandom_range(0, 1);
      smp_ready = $urandom_range(0, 7) != 0;
      fifo_prog_full = $urandom_range(0, 15) == 0;
      fifo_prog_empty = !fifo_prog_full && $urandom_range(0, 3) == 0;
      done = (i > 1900);
      #1;
      checks++;
      if (started != m_started || halted != m_halted ||
          enable != (m_started && !m_halted && smp_ready && !done)) begin
        failures++;
        if (failures < 8) $display("FAIL cycle %0d", i);
      end
      @(posedge clk);
      if (pos_loaded && first_pulse_loaded) m_started = 1;
      if (fifo_prog_full) begin if (!m_halted) nset++; m_halted = 1; end
      else if (fifo_prog_empty) begin if (m_halted) nclr++; m_halted = 0; end
      #1;
    end
    checks++;
    if (nset == 0 || nclr == 0) begin failures++; $display("FAIL halt not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
