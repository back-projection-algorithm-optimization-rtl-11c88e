// End-to-end test of the back-projection accelerator at reduced size:
// a 16 x 16 image in 4 regions of 4 rows, 4 pulses, 4096 samples per pulse,
// FIFOs of 256 words (programmable full 128, empty 32).
//
// The testbench plays the part of the DMA engine. It streams the platform
// positions (all X words, then all Y words, 24.40 fixed point), then the
// sample file once per region (the accelerator consumes every pulse again
// for every region), and receives the real and imaginary image streams.
// Positions and samples come from a hash, so nothing is read from files.
//
// The reference image is computed independently in floating point:
// R = sqrt(dx^2 + dy^2 + Z1) (truncated to 25 fraction bits), the range
// sample is linearly interpolated at (R - R0) * 32 with truncation, and it
// is multiplied by exp(j*2*pi*frac(R * 2ku)) and summed over the pulses.
// Each output word must be within 2 LSBs of Q1.22 per pulse of that sum (the
// CORDIC and the truncating multipliers cost well under one LSB per pulse).
//
// The image receiver holds tready low at the start until the FIFOs have
// halted the pipeline, then accepts at random. The test counts, and fails
// on any count of zero: sample-ready stalls, halts and resumes, B2 bank
// switches (pulses consumed), mode-2 outputs of the B3 controller, and
// TLAST beats. Totals of the last three are also checked exactly.
module tb_bp_accel_top;
  import bp_pkg::*;
  localparam int NPIX_X = 16, REGION_ROWS = 4, NREGIONS = 4, NPULSES = 4, NSAMPLES = 4096;
  localparam int FIFO_DEPTH = 256, PROG_FULL = 128, PROG_EMPTY = 32;
  localparam int TRANSFER_LEN = NPIX_X * REGION_ROWS;
  localparam int NROWS = REGION_ROWS * NREGIONS;
  localparam int NPIX = NPIX_X * NROWS;
  localparam int TOTAL_PULSES = NPULSES * NREGIONS;
  localparam longint WATCHDOG = 400000;
  localparam real TOL = real'(NPULSES) * 2.0**23 + 2.0**22;   // 2 LSB of Q1.22 per pulse

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [63:0] pos_tdata = '0, smp_tdata = '0, re_tdata, im_tdata;
  logic pos_tvalid = 0, pos_tready, smp_tvalid = 0, smp_tready;
  logic re_tvalid, re_tlast, im_tvalid, im_tlast, out_tready = 0;
  logic started, halted, enable, done;

  bp_accel_top #(
    .NPIX_X(NPIX_X), .REGION_ROWS(REGION_ROWS), .NREGIONS(NREGIONS), .NPULSES(NPULSES),
    .NSAMPLES(NSAMPLES), .FIFO_DEPTH(FIFO_DEPTH), .FIFO_PROG_FULL(PROG_FULL),
    .FIFO_PROG_EMPTY(PROG_EMPTY)
  ) dut (
    .clk, .rst_n,
    .s_axis_pos_tdata(pos_tdata), .s_axis_pos_tvalid(pos_tvalid), .s_axis_pos_tready(pos_tready),
    .s_axis_smp_tdata(smp_tdata), .s_axis_smp_tvalid(smp_tvalid), .s_axis_smp_tready(smp_tready),
    .m_axis_re_tdata(re_tdata), .m_axis_re_tvalid(re_tvalid), .m_axis_re_tlast(re_tlast),
    .m_axis_re_tready(out_tready),
    .m_axis_im_tdata(im_tdata), .m_axis_im_tvalid(im_tvalid), .m_axis_im_tlast(im_tlast),
    .m_axis_im_tready(out_tready),
    .started, .halted, .enable, .done);

  // ---------------------------------------------------------------- stimulus
  function automatic logic [31:0] hash(int unsigned a, int unsigned b);
    logic [31:0] h = a * 32'h9E37_79B1 ^ (b + 32'h7F4A_7C15) * 32'h85EB_CA6B;
    h ^= h >> 15; h *= 32'h2C1B_3C6D; h ^= h >> 12; h *= 32'h297A_2D39; h ^= h >> 15;
    return h;
  endfunction

  // sample word: re in bits [23:0], im in bits [55:32], both within +-2^21
  function automatic logic [63:0] smp_word(int p, int i);
    logic signed [23:0] re, im;
    re = 24'(signed'(hash(p, 2 * i)) >>> 11);
    im = 24'(signed'(hash(p, 2 * i + 1)) >>> 11);
    return {8'(0), im, 8'(0), re};
  endfunction

  // platform position of pulse p in meters * 2^25: x near -7030 m, y near 0
  function automatic longint pos_x(int p);
    return -(longint'(7030) << 25) + (longint'(signed'(hash(p, 32'hABCD))) >>> 2);
  endfunction
  function automatic longint pos_y(int p);
    return longint'(signed'(hash(p, 32'h1234))) >>> 2;
  endfunction

  // ---------------------------------------------------------------- reference
  real ref_re [NPIX], ref_im [NPIX];

  task automatic build_reference();
    real z1, two_ku, dx, dy, r, phi;
    longint rq, d, b, w2, w1, off_x, off_y, dxdy, sr, si;
    dxdy  = longint'(DXDY_DEFAULT);
    off_x = -((longint'(NPIX_X) - 1) * dxdy) / 2;
    off_y = -((longint'(NROWS) - 1) * dxdy) / 2;
    z1     = real'(longint'(Z1_DEFAULT >> 25)) / 2.0**25;
    two_ku = real'(longint'(TWO_KU_DEFAULT >> 7)) / 2.0**50;
    for (int row = 0; row < NROWS; row++)
      for (int ix = 0; ix < NPIX_X; ix++) begin
        int k = row * NPIX_X + ix;
        ref_re[k] = 0.0; ref_im[k] = 0.0;
        for (int p = 0; p < NPULSES; p++) begin
          dx = real'(pos_x(p) - (off_x + ix * dxdy)) / 2.0**25;
          dy = real'(pos_y(p) - (off_y + row * dxdy)) / 2.0**25;
          r  = $sqrt(dx * dx + dy * dy + z1);
          rq = longint'($floor(r * 2.0**25));
          d  = rq - longint'(R0_DEFAULT);
          b  = d >>> 20;
          w2 = (d & 64'hF_FFFF) << 5;
          w1 = (longint'(1) << 25) - w2;
          if (b >= 0 && b <= NSAMPLES - 2) begin
            logic [63:0] s0, s1;
            s0 = smp_word(p, int'(b)); s1 = smp_word(p, int'(b) + 1);
            sr = ((longint'(signed'(s0[23:0])) * w1) >>> 25) + ((longint'(signed'(s1[23:0])) * w2) >>> 25);
            si = ((longint'(signed'(s0[55:32])) * w1) >>> 25) + ((longint'(signed'(s1[55:32])) * w2) >>> 25);
          end else begin
            sr = 0; si = 0;
          end
          phi = real'(rq) / 2.0**25 * two_ku;
          phi = 2.0 * 3.14159265358979323846 * (phi - $floor(phi));
          ref_re[k] += (real'(sr) * $cos(phi) - real'(si) * $sin(phi)) * 2.0**22;
          ref_im[k] += (real'(sr) * $sin(phi) + real'(si) * $cos(phi)) * 2.0**22;
        end
      end
  endtask

  // ---------------------------------------------------------------- checking
  int checks = 0, failures = 0;
  longint cyc = 0;
  int n_re = 0, n_im = 0, n_tlast = 0, n_stall = 0, n_halt = 0, n_resume = 0;
  int n_bank = 0, n_mode2 = 0;
  real max_err = 0.0;
  logic stall_q = 0, halted_q = 0;
  logic [31:0] consumed_q = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s (cycle %0d)", msg, cyc);
    end
  endtask

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      logic stall;
      stall = started && !done && !halted && !dut.smp_ready;
      if (stall && !stall_q) n_stall++;
      stall_q <= stall;
      if (halted && !halted_q) n_halt++;
      if (!halted && halted_q) n_resume++;
      halted_q <= halted;
      if (32'(dut.u_sample.u_b2.pulses_consumed) != consumed_q) n_bank++;
      consumed_q <= 32'(dut.u_sample.u_b2.pulses_consumed);
      if (dut.acc_re_v) n_mode2++;
      if (re_tvalid && out_tready) begin
        chk(n_re < NPIX, "too many real words");
        if (n_re < NPIX) begin
          if (absr(real'(signed'(re_tdata)) - ref_re[n_re]) > max_err) max_err = absr(real'(signed'(re_tdata)) - ref_re[n_re]);
          chk(absr(real'(signed'(re_tdata)) - ref_re[n_re]) <= TOL,
              $sformatf("re pixel %0d got %0d expected %0.0f", n_re, signed'(re_tdata), ref_re[n_re]));
          chk(re_tlast == ((n_re % TRANSFER_LEN) == TRANSFER_LEN - 1), "re TLAST position");
        end
        if (re_tlast) n_tlast++;
        n_re++;
      end
      if (im_tvalid && out_tready) begin
        if (n_im < NPIX) begin
          chk(absr(real'(signed'(im_tdata)) - ref_im[n_im]) <= TOL,
              $sformatf("im pixel %0d got %0d expected %0.0f", n_im, signed'(im_tdata), ref_im[n_im]));
          chk(im_tlast == ((n_im % TRANSFER_LEN) == TRANSFER_LEN - 1), "im TLAST position");
        end
        n_im++;
      end
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: re=%0d im=%0d words", n_re, n_im);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // position stream: X words of all pulses, then Y words
  initial begin
    @(posedge rst_n); @(posedge clk); #1;
    for (int k = 0; k < 2 * NPULSES; k++) begin
      longint v;
      v = (k < NPULSES) ? pos_x(k) : pos_y(k - NPULSES);
      pos_tvalid = 1; pos_tdata = 64'(v) << 15;
      @(posedge clk);
      while (!pos_tready) @(posedge clk);
      #1;
    end
    pos_tvalid = 0;
  end

  // sample stream: the whole file once per region, with occasional gaps
  initial begin
    @(posedge rst_n); @(posedge clk); #1;
    for (int q = 0; q < TOTAL_PULSES; q++)
      for (int i = 0; i < NSAMPLES; i++) begin
        if (i == 0 && q % 3 == 2) begin smp_tvalid = 0; repeat (300) @(posedge clk); #1; end
        smp_tvalid = 1; smp_tdata = smp_word(q % NPULSES, i);
        @(posedge clk);
        while (!smp_tready) @(posedge clk);
        #1;
      end
    smp_tvalid = 0;
  end

  // image receiver: blocked until the pipeline halts, then random
  initial begin
    @(posedge rst_n);
    while (!halted) begin @(posedge clk); #1; end
    repeat (200) @(posedge clk);
    forever begin
      #1 out_tready = $urandom_range(0, 3) != 0;
      @(posedge clk);
    end
  end

  initial begin
    build_reference();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (n_re < NPIX || n_im < NPIX) @(posedge clk);
    repeat (50) @(posedge clk);
    chk(n_re == NPIX && n_im == NPIX, "word totals");
    chk(n_tlast == NPIX / TRANSFER_LEN, $sformatf("TLAST count %0d", n_tlast));
    chk(n_bank == TOTAL_PULSES, $sformatf("bank switches %0d", n_bank));
    chk(n_mode2 == NPIX, $sformatf("mode-2 outputs %0d", n_mode2));
    chk(n_stall > 0, "no sample-ready stall seen");
    chk(n_halt > 0 && n_resume > 0, "no FIFO halt and resume seen");
    chk(done, "done not raised");
    $display("largest real-part error: %0.1f LSB of 2^-44 (%0.2f LSB of Q1.22 per pulse)", max_err, max_err / 2.0**22 / NPULSES);
    $display("mechanisms: stalls=%0d halts=%0d resumes=%0d bank_switches=%0d mode2_outputs=%0d tlast=%0d cycles=%0d",
             n_stall, n_halt, n_resume, n_bank, n_mode2, n_tlast, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
