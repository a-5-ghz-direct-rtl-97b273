// therm_decoder: binary to thermometer decoder (the 3-7 decoders of the DAC).
//
// A BITS-bit binary code n turns on the first n of the 2^BITS - 1 outputs:
// therm[i] = (n > i). The DAC's row and column decoders are four of these, each turning a
// 3-bit field into 7 thermometer lines. Combinational.
//
// Interface: bin (BITS bits), therm (2^BITS - 1 bits).
module therm_decoder #(
  parameter int BITS = 3
) (
  input  logic [BITS-1:0]        bin,
  output logic [(1<<BITS)-2:0]   therm
);
  always_comb begin
    for (int i = 0; i < (1 << BITS) - 1; i++) begin
      therm[i] = (int'(bin) > i);
    end
  end
endmodule
