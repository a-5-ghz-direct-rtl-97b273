// tb_phase_modulator: checks the 12-bit phase modulation adder: the DAC word is the top 11
// bits of acc[23:12] + pcw + dither, the dither acts as a carry in, and a pcw of 0x800 flips
// only the MSB of the DAC word (a 180 degree shift).
module tb_phase_modulator;
  int checks = 0, failures = 0;

  logic [23:0] acc;
  logic [11:0] pcw;
  logic        dither;
  logic [11:0] pm_sum;
  logic [10:0] pw;

  phase_modulator dut (.acc_phase(acc), .pcw(pcw), .dither(dither), .pm_sum(pm_sum),
                       .phase_word(pw));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: acc=%h pcw=%h d=%0d sum=%h pw=%h", what, acc, pcw, dither, pm_sum, pw);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    logic [10:0] pw0;
    for (int i = 0; i < 3000; i++) begin
      acc = 24'($urandom); pcw = 12'($urandom); dither = 1'($urandom);
      #1;
      e = (int'(acc) / 4096 + int'(pcw) + int'(dither)) % 4096;
      chk(int'(pm_sum) == e, "sum");
      chk(int'(pw) == e / 2, "truncation to 11 bits");
    end
    // dither carry into an all-ones truncated phase
    acc = 24'hFFF000; pcw = 12'h000; dither = 1; #1;
    chk(pm_sum == 12'h000 && pw == 11'h000, "dither carry ripples and wraps");
    // 180 degree step
    for (int i = 0; i < 200; i++) begin
      acc = 24'($urandom); dither = 1'($urandom); pcw = 12'h000; #1;
      pw0 = pw;
      pcw = 12'h800; #1;
      chk(pw == (pw0 ^ 11'h400), "pcw 0x800 flips the MSB only");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
