// tb_ripple_carry_adder: checks the 24-bit and the 12-bit ripple carry adder against the
// integer sum a + b + cin, on corner values (carry through every bit) and random operands.
module tb_ripple_carry_adder;
  int checks = 0, failures = 0;

  logic [23:0] a24, b24, s24;
  logic        c24, co24;
  logic [11:0] a12, b12, s12;
  logic        c12, co12;

  ripple_carry_adder #(.WIDTH(24)) dut24 (.a(a24), .b(b24), .cin(c24), .sum(s24), .cout(co24));
  ripple_carry_adder #(.WIDTH(12)) dut12 (.a(a12), .b(b12), .cin(c12), .sum(s12), .cout(co12));

  // compares both adders with the integer sums of their current inputs
  function automatic void check();
    logic [24:0] e24;
    logic [12:0] e12;
    e24 = {1'b0, a24} + {1'b0, b24} + {24'd0, c24};
    e12 = {1'b0, a12} + {1'b0, b12} + {12'd0, c12};
    checks += 2;
    if ({co24, s24} !== e24) begin
      failures++;
      $display("FAIL 24: %h + %h + %0d = %h, expected %h", a24, b24, c24, {co24, s24}, e24);
    end
    if ({co12, s12} !== e12) begin
      failures++;
      $display("FAIL 12: %h + %h + %0d = %h, expected %h", a12, b12, c12, {co12, s12}, e12);
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // carry ripples through every bit
    a24 = 24'hFFFFFF; b24 = 24'h000000; c24 = 1; a12 = 12'hFFF; b12 = 12'h000; c12 = 1;
    #1 check();
    a24 = 24'hFFFFFF; b24 = 24'hFFFFFF; c24 = 1; a12 = 12'hFFF; b12 = 12'hFFF; c12 = 1;
    #1 check();
    a24 = 24'h800000; b24 = 24'h800000; c24 = 0; a12 = 12'h800; b12 = 12'h800; c12 = 0;
    #1 check();
    a24 = 24'h000000; b24 = 24'h000000; c24 = 0; a12 = 12'h000; b12 = 12'h000; c12 = 0;
    #1 check();
    for (int i = 0; i < 2000; i++) begin
      a24 = 24'($urandom); b24 = 24'($urandom); c24 = 1'($urandom);
      a12 = 12'($urandom); b12 = 12'($urandom); c12 = 1'($urandom);
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
