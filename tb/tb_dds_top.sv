// tb_dds_top: end-to-end test of the synthesizer at its full size (24-bit FCW, 12-bit PCW,
// 13-bit PRBS, 10-bit DAC; the top has no parameters).
//
// A cycle-by-cycle model in the testbench (its own accumulator, its own PRBS register and the
// floating-point DAC reference of tb_dds_ref_pkg) predicts the phase word and the DAC code
// every clock while the stimulus walks through the mechanisms of the design:
//   - constant FCW 0x180800 (469.36 MHz at a 5 GHz clock), dither off, then on
//   - FCW 0x3FCFE7 (1.246 GHz at 5 GHz), with PCW steps of 0x800 (180 degree phase jumps)
//   - a frequency ramp: FCW incremented every clock (direct frequency modulation / chirp)
//   - random FCW and PCW every clock, and a reset in mid-run
// It also counts output periods (rising crossings of the MSB) over a fixed window and
// compares them with window * FCW / 2^24, the output frequency law. Each mechanism is counted
// and a mechanism that never occurred counts as a failure.
module tb_dds_top;
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

  // reference state
  logic [23:0] m_acc;
  logic [12:0] m_lfsr;

  // mechanism counters
  int n_wrap = 0, n_dither_carry = 0, n_dither_off = 0, n_fm = 0, n_pm_step = 0;
  int n_quad = 0, n_mirror = 0, n_reset = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t: pw=%h code=%0d acc=%h model acc=%h", what, $time, phase_word,
                 dac_code, acc_phase, m_acc);
    end
  endtask

  // compare outputs with the model (called after the inputs of this cycle have settled)
  task automatic compare();
    int d, pw;
    d  = (dither_en && m_lfsr[12]) ? 1 : 0;
    pw = ((int'(m_acc) >> 12) + int'(pcw) + d) % 4096 / 2;
    chk(acc_phase == m_acc, "accumulator");
    chk(prbs == m_lfsr[12], "prbs");
    chk(int'(phase_word) == pw, "phase word");
    chk(int'(dac_code) == ref_code(pw), "dac code");
    if (dither_en && m_lfsr[12]) n_dither_carry++;
    if (!dither_en) n_dither_off++;
    if (pw[9]) n_quad++;
    if (pw[10]) n_mirror++;
  endtask

  // one clock: check, then advance the model with the inputs in force
  task automatic step();
    #1 compare();
    if (({1'b0, m_acc} + {1'b0, fcw}) > 25'hFFFFFF) n_wrap++;
    chk(acc_wrap == (({1'b0, m_acc} + {1'b0, fcw}) > 25'hFFFFFF), "carry out");
    @(posedge clk);
    #1;  // inputs change only after the edge has been sampled
    if (rst) begin
      m_acc  = '0;
      m_lfsr = 13'h1FFF;
    end else begin
      m_acc  = m_acc + fcw;
      m_lfsr = {m_lfsr[11:0], m_lfsr[12] ^ m_lfsr[11] ^ m_lfsr[9] ^ m_lfsr[8]};
    end
  endtask

  task automatic do_reset();
    rst = 1;
    step();
    rst = 0;
    n_reset++;
  endtask

  // count output periods over a window with a constant fcw
  task automatic freq_check(input logic [23:0] f, input int window);
    int edges;
    logic last_msb;
    longint expect_edges;
    fcw = f; pcw = 0;
    step();
    last_msb = phase_word[10];
    edges = 0;
    for (int i = 0; i < window; i++) begin
      step();
      if (!phase_word[10] && last_msb) edges++;  // falling MSB = one full turn
      last_msb = phase_word[10];
    end
    expect_edges = (longint'(window) * longint'(f)) >> 24;
    $display("fcw=%h: %0d periods in %0d clocks, expected %0d", f, edges, window, expect_edges);
    chk(edges >= expect_edges - 1 && edges <= expect_edges + 1, "output frequency");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fcw = 24'h180800; pcw = 0; dither_en = 0;
    // first reset: nothing is compared before the registers are defined
    rst = 1;
    @(posedge clk);
    #1 rst = 0;
    m_acc = '0; m_lfsr = 13'h1FFF;
    n_reset++;
    // 469.36 MHz case, dither off then on
    for (int i = 0; i < 3000; i++) step();
    dither_en = 1;
    for (int i = 0; i < 3000; i++) step();
    freq_check(24'h180800, 20000);
    // 1.246 GHz case with 180 degree phase steps
    fcw = 24'h3FCFE7;
    for (int i = 0; i < 4000; i++) begin
      if (i % 250 == 0) begin
        logic [10:0] pw_before;
        #1 pw_before = phase_word;
        pcw = (pcw == 12'h000) ? 12'h800 : 12'h000;
        n_pm_step++;
        // the step shows at once, without a clock: only the MSB of the phase word flips
        #1 chk(phase_word == (pw_before ^ 11'h400), "phase step");
      end
      step();
    end
    freq_check(24'h3FCFE7, 20000);
    // frequency ramp: the FCW changes every clock
    dither_en = 0; pcw = 0; fcw = 24'd1;
    for (int i = 0; i < 20000; i++) begin
      step();
      fcw = fcw + 24'd1;
      n_fm++;
    end
    // random words every clock, and a reset in the middle
    dither_en = 1;
    for (int i = 0; i < 20000; i++) begin
      fcw = 24'($urandom); pcw = 12'($urandom);
      n_fm++;
      if (i == 10000) do_reset();
      else step();
    end
    $display("mechanisms: wraps=%0d dither_carries=%0d dither_off_cycles=%0d fm_changes=%0d",
             n_wrap, n_dither_carry, n_dither_off, n_fm);
    $display("            pm_steps=%0d quadrant_complement=%0d mirror=%0d resets=%0d",
             n_pm_step, n_quad, n_mirror, n_reset);
    chk(n_wrap > 0, "accumulator wrap-around happened");
    chk(n_dither_carry > 0, "dither carry happened");
    chk(n_dither_off > 0, "dither-off mode happened");
    chk(n_fm > 0, "frequency modulation happened");
    chk(n_pm_step > 0, "phase step happened");
    chk(n_quad > 0, "quadrant complement happened");
    chk(n_mirror > 0, "mirroring happened");
    chk(n_reset > 1, "mid-run reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
