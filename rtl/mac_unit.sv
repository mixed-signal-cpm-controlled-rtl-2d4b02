// mac_unit: one multiply-accumulate unit of the digital test load.
// Each rising clock edge adds the 8x8 unsigned product X*Y to a 16-bit
// accumulator, which wraps modulo 2**16; the accumulator is the output P.
// The paper names the unit and gives the 8-bit inputs and 16-bit output;
// unsigned operands, wrap-around and the absence of a clear input are this
// design's choices (a checker can predict P from its previous value).
// Timing: P changes one clock after X and Y are captured.
module mac_unit
  import mippt_pkg::XY_W, mippt_pkg::P_W;
(
  input  logic            clk,
  input  logic [XY_W-1:0] x,
  input  logic [XY_W-1:0] y,
  output logic [P_W-1:0]  p
);

  always_ff @(posedge clk) begin
    p <= p + P_W'(x) * P_W'(y);
  end

endmodule
