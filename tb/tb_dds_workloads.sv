// tb_dds_workloads: runs the synthesizer through the two modulation measurements reported
// for the chip, at full size.
//
// Chirp: the FCW is a ramp that rises by one every clock from 0x000000 to 0x00AD9C (44,445
// clocks). The accumulator must then hold sum(0..0xAD9C) mod 2^24, every intermediate phase
// must match a running model, and the number of output periods must equal that sum / 2^24.
//
// Phase step: FCW = 7 (1.251 kHz at a 3 GHz clock) for one full output period,
// ceil(2^24 / 7) = 2,396,746 clocks, with the PCW toggled between 0 and 0x800 at each quarter
// of the period (four toggles, the first at the positive peak). At each step the DAC code
// must jump to its mirror image (code' = 1023 - code, a 180 degree shift),
// and every sample must match the floating-point reference. Dither is off in both runs so
// the expected phase is exact.
module tb_dds_workloads;
  import tb_dds_ref_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 0;
  logic        rst;
  logic [23:0] fcw;
  logic [11:0] pcw;
  logic        dither_en;
  logic [9:0]  dac_code;
  logic [10:0] phase_word;
  logic [23:0] acc_phase;
  logic        acc_wrap;
  logic        prbs;

  always #5 clk = ~clk;

  dds_top dut (.clk(clk), .rst(rst), .fcw(fcw), .pcw(pcw), .dither_en(dither_en),
               .dac_code(dac_code), .phase_word(phase_word), .acc_phase(acc_phase),
               .acc_wrap(acc_wrap), .prbs(prbs));

  int unsigned m_acc;
  int          errs_shown = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (errs_shown++ < 20) $display("FAIL %s at %0t: acc=%h model=%h", what, $time, acc_phase, m_acc);
    end
  endtask

  initial begin
    repeat (2600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint total;
    int wraps, pw, code_before;
    int unsigned n_period;
    int n_steps = 0;
    dither_en = 0; pcw = 0; fcw = 0;
    rst = 1; @(posedge clk); #1 rst = 0;

    // ---- chirp ----
    m_acc = 0; total = 0; wraps = 0;
    for (int f = 0; f <= 'hAD9C; f++) begin
      fcw = 24'(f);
      #1;
      if (acc_wrap) wraps++;
      if (f % 16 == 0) begin
        chk(acc_phase == 24'(m_acc), "chirp accumulator");
        pw = int'(m_acc >> 13);
        chk(int'(dac_code) == ref_code(pw), "chirp dac code");
      end
      @(posedge clk); #1;
      m_acc = (m_acc + f) & 32'hFFFFFF;
      total += f;
    end
    $display("chirp: %0d clocks, %0d output periods, phase sum %0d", 'hAD9C + 1, wraps, total);
    chk(acc_phase == 24'(total % (64'd1 << 24)), "chirp closed-form phase");
    chk(longint'(wraps) == total / (64'd1 << 24), "chirp output periods");

    // ---- 180 degree phase step at FCW = 7 ----
    rst = 1; @(posedge clk); #1 rst = 0;
    fcw = 24'd7; pcw = 0; m_acc = 0; wraps = 0;
    n_period = ((32'd1 << 24) + 6) / 7;
    for (int unsigned n = 0; n < n_period; n++) begin
      if (n != 0 && n % (n_period / 4) == 0) begin
        code_before = int'(dac_code);
        pcw = pcw ^ 12'h800;
        n_steps++;
        #1 chk(int'(dac_code) == 1023 - code_before, "180 degree step mirrors the output");
        $display("phase step %0d at clock %0d: code %0d -> %0d", n_steps, n, code_before, dac_code);
      end
      #1;
      if (acc_wrap) wraps++;
      if (n % 64 == 0) begin
        chk(acc_phase == 24'(m_acc), "pm accumulator");
        pw = int'(((m_acc >> 12) + int'(pcw)) % 4096 / 2);
        chk(int'(dac_code) == ref_code(pw), "pm dac code");
      end
      @(posedge clk); #1;
      m_acc = (m_acc + 7) & 32'hFFFFFF;
    end
    $display("fcw=7: %0d wrap(s) in %0d clocks", wraps, n_period);
    chk(wraps == 1, "one output period in ceil(2^24/7) clocks");
    chk(n_steps == 4, "four phase toggles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
