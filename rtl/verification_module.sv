// CAMAC verification module: a quad scaler with known contents.
//
// Sits in a crate station and answers a read (F0..F7) like a four-channel
// scaler, with Q = 1 for subaddresses 0..3 and Q = 0 above, so the Q-scan
// moves on after channel 3:
//   A0     all 24 bits 0     A1     all 24 bits 1
//   A2, A3 the 24-bit code set on the front-panel switches
// A0 and A1 exercise both logic levels of every data path (Dataway, crate
// controller, binary-to-BCD conversion); the switch code checks wiring for
// shorts and swaps. While the Dataway clear line C is asserted all data
// outputs are off, so a cleared system shows zero everywhere; Q still answers.
// That the clear leaves Q alone and that any read function is answered are
// this design's choices. Combinational, positive-logic Dataway side.
module verification_module
  import scaler_pkg::*;
(
  input  logic              n_sel,      // this station's N line
  input  logic [A_W-1:0]    a,
  input  logic [F_W-1:0]    f,
  input  logic              c,
  input  logic [DATA_W-1:0] switches,
  output logic [DATA_W-1:0] r,
  output logic              q
);

  always_comb begin
    q = n_sel && is_read(f) && a < A_W'(4);
    r = '0;
    if (q && !c) begin
      unique case (a[1:0])
        2'd0: r = '0;
        2'd1: r = '1;
        default: r = switches;
      endcase
    end
  end

endmodule
