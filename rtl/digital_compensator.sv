// digital_compensator: the digital voltage loop of the mixed-signal current
// programmed mode controller. Once per switching cycle (`tick`) it turns the
// windowed-ADC output error e[n] into a differential current reference
// delta_ic[n] and updates the current reference i_c[n] = i_c[n-1] +
// delta_ic[n], which sets the peak inductor current of the next cycle.
//
// The paper gives the signals (e[n], delta i_c[n], i_c[n]) and their use;
// the control law is this design's choice: an incremental PI law
//     delta_ic[n] = KI*e[n] + KP*(e[n] - e[n-1]),
// with i_c[n] saturated to [0, IC_MAX]. delta_ic is the increment actually
// applied after saturation, so an integrating current DAC fed with it stays
// equal to i_c.
// Timing: e[n] is sampled on a tick; i_c and delta_ic update on that clock
// edge and hold until the next tick.
module digital_compensator
  import mippt_pkg::E_W, mippt_pkg::IC_W, mippt_pkg::DIC_W;
#(
  parameter int              KP     = 8,
  parameter int              KI     = 1,
  parameter logic [IC_W-1:0] IC_MAX = '1,
  parameter logic [IC_W-1:0] IC_INIT = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tick,
  input  logic signed [E_W-1:0]   e_n,
  output logic signed [DIC_W-1:0] delta_ic,
  output logic [IC_W-1:0]         i_c
);

  localparam int unsigned W = IC_W + 8;  // headroom for the PI sum

  logic signed [E_W-1:0] e_prev;
  logic signed [W-1:0]   d_raw, ic_next;

  always_comb begin
    d_raw   = W'(KI) * W'(e_n) + W'(KP) * (W'(e_n) - W'(e_prev));
    ic_next = $signed(W'({1'b0, i_c})) + d_raw;
    if (ic_next < 0)                          ic_next = '0;
    else if (ic_next > $signed(W'(IC_MAX)))   ic_next = W'(IC_MAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev   <= '0;
      i_c      <= IC_INIT;
      delta_ic <= '0;
    end else begin
      if (tick) begin
        e_prev   <= e_n;
        i_c      <= ic_next[IC_W-1:0];
        delta_ic <= DIC_W'(ic_next - $signed(W'({1'b0, i_c})));
      end
    end
  end

endmodule
