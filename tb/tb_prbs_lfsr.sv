// tb_prbs_lfsr: checks that the 13-bit PRBS repeats after exactly 2^13 - 1 = 8191 clocks and
// not earlier, that one period holds 4096 ones and 4095 zeros (a maximal-length sequence),
// that every non-zero state occurs once, that the output is the last stage and its complement
// the other output, and that reset reloads the seed.
module tb_prbs_lfsr;
  int checks = 0, failures = 0;

  logic        clk = 0;
  logic        rst;
  logic        prbs, prbs_n;
  logic [12:0] state;
  bit          seen [8192];

  always #5 clk = ~clk;

  prbs_lfsr dut (.clk(clk), .rst(rst), .prbs(prbs), .prbs_n(prbs_n), .state(state));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: state=%h", what, state);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, zeros, period;
    logic [12:0] start;
    logic [12:0] prev;
    rst = 1;
    @(posedge clk); @(posedge clk); #1;
    chk(state == 13'h1FFF, "reset seed");
    rst = 0;
    start = state;
    ones = 0; zeros = 0; period = 0;
    for (int i = 0; i < 8192; i++) seen[i] = 0;
    do begin
      chk(prbs == state[12] && prbs_n == ~state[12], "output is last stage");
      chk(!seen[state], "state unique within period");
      seen[state] = 1;
      if (prbs) ones++; else zeros++;
      prev = state;
      @(posedge clk); #1;
      chk(state[12:1] == prev[11:0], "shift");
      period++;
    end while (state != start && period < 9000);
    $display("period=%0d ones=%0d zeros=%0d", period, ones, zeros);
    chk(period == 8191, "period 8191");
    chk(ones == 4096 && zeros == 4095, "balance");
    chk(!seen[0], "all-zero state never reached");
    repeat (37) @(posedge clk);
    rst = 1; @(posedge clk); #1; rst = 0;
    chk(state == 13'h1FFF, "reset reloads seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
