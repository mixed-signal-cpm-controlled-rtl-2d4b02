// digital_load: the digital test load IC, an array of N_MAC multiply-
// accumulate units (12 in the paper) whose mix of switching and leakage
// current stands in for a processor or DSP core whose supply and body bias
// are being optimised. All units receive the same X_in/Y_in vectors and the
// same clock.
// The chip has a single 16-bit output P_MAC[15:0] (as in the paper). How
// the twelve units reach it is not described; this design outputs the sum,
// modulo 2**16, of all unit accumulators, so that a timing error in any unit
// shows at the pin. Since every unit adds X*Y per clock, the output advances
// by N_MAC*X*Y per clock, which the MAC controller's ideal model predicts.
// Timing: the sum is combinational from the unit registers, so P_MAC changes
// one clk_mac edge after the vectors are captured.
module digital_load
  import mippt_pkg::XY_W, mippt_pkg::P_W;
#(
  parameter int unsigned N_MAC = 12
) (
  input  logic            clk_mac,
  input  logic [XY_W-1:0] x_in,
  input  logic [XY_W-1:0] y_in,
  output logic [P_W-1:0]  p_mac
);

  logic [P_W-1:0] p_unit [N_MAC];

  for (genvar u = 0; u < N_MAC; u++) begin : g_mac
    mac_unit u_mac (.clk(clk_mac), .x(x_in), .y(y_in), .p(p_unit[u]));
  end

  always_comb begin
    p_mac = '0;
    for (int u = 0; u < N_MAC; u++) p_mac += p_unit[u];
  end

endmodule
