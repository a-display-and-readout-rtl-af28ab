// Behavioural model of a commercial CAMAC blind scaler (quad, 24 bit), for
// testbenches only. Counts one per clock while `count_in[ch]` is 1 and the
// Dataway inhibit I is 0. Dataway behaviour:
//   F(0)  read, subaddress 0..CHANNELS-1, Q = 1; Q = 0 at higher subaddresses
//   F(25) at S1 with its N line: every channel counts one (test increment)
//   C with S2: every channel clears
// Only the parts the readout system uses are modelled.
module camac_scaler_model
  import scaler_pkg::*;
#(
  parameter int unsigned CHANNELS = 4
) (
  input  logic                    clk,
  input  logic                    n_sel,
  input  dataway_cmd_t            dw,
  input  logic [CHANNELS-1:0]     count_in,
  output logic [DATA_W-1:0]       r,
  output logic                    q,
  output logic [DATA_W-1:0]       count [CHANNELS]
);

  logic s1_d;

  initial begin
    for (int ch = 0; ch < CHANNELS; ch++) count[ch] = '0;
    s1_d = 1'b0;
  end

  always @(posedge clk) begin
    s1_d <= dw.s1;
    for (int ch = 0; ch < CHANNELS; ch++) begin
      if (dw.c && dw.s2) count[ch] <= '0;
      else if (!dw.i) begin
        if (n_sel && dw.f == F_TEST_INCR && dw.s1 && !s1_d)
          count[ch] <= count[ch] + DATA_W'(1) + DATA_W'(count_in[ch]);
        else if (count_in[ch])
          count[ch] <= count[ch] + DATA_W'(1);
      end
    end
  end

  always_comb begin
    q = n_sel && dw.f == F_READ && int'(dw.a) < CHANNELS;
    r = q ? count[dw.a[1:0]] : '0;
  end

endmodule
