// tb_phase_accumulator: drives the 24-bit accumulator with a new random frequency word every
// clock and checks phase(n+1) = phase(n) + fcw(n) mod 2^24 cycle by cycle (one clock from
// fcw to phase), the carry out on wrap-around, the reset, and that a constant word 0x180800
// brings the phase back to zero after exactly 8192 clocks (0x180800 = 0x301 * 2^11, so
// its phase sequence has period 2^24 / 2^11).
module tb_phase_accumulator;
  int checks = 0, failures = 0;
  int wraps = 0;

  logic        clk = 0;
  logic        rst;
  logic [23:0] fcw;
  logic [23:0] phase;
  logic        wrap;
  logic [23:0] model;

  always #5 clk = ~clk;

  phase_accumulator dut (.clk(clk), .rst(rst), .fcw(fcw), .phase(phase), .wrap(wrap));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: phase=%h model=%h fcw=%h", what, phase, model, fcw);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; fcw = 24'h123456;
    @(posedge clk); @(posedge clk);
    #1 chk(phase == 24'd0, "reset");
    rst = 0; model = 0;
    // random modulation: a new word each clock
    for (int i = 0; i < 3000; i++) begin
      fcw = (i % 3 == 0) ? 24'($urandom) : 24'h7FFFFF + 24'($urandom_range(0, 2));
      #1;
      chk(wrap == (({1'b0, model} + {1'b0, fcw}) > 25'hFFFFFF), "carry out");
      if (wrap) wraps++;
      @(posedge clk);
      model = model + fcw;
      #1 chk(phase == model, "accumulate");
    end
    // fixed word of the 469.36 MHz measurement: period of the phase sequence
    rst = 1; @(posedge clk); #1; rst = 0;
    fcw = 24'h180800;
    for (int i = 1; i <= 8192; i++) begin
      @(posedge clk); #1;
      if (i < 8192) chk(phase != 24'd0, "no early return to 0");
    end
    chk(phase == 24'd0, "return to 0 after 8192 clocks");
    chk(wraps > 100, "wrap-around exercised");
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
