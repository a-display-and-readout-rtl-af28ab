// SN74141-style BCD-to-decimal Nixie driver.
//
// Turns on the one cathode (of ten) named by the BCD input. Codes 10 to 15
// turn every cathode off, which blanks the tube; the system sends code 10 for
// a suppressed leading zero. Output bit k is 1 when cathode k conducts.
// Combinational.
module nixie_driver_74141 (
  input  logic [3:0] bcd,
  output logic [9:0] cathode
);

  always_comb begin
    cathode = '0;
    if (bcd <= 4'd9) cathode[bcd] = 1'b1;
  end

endmodule
