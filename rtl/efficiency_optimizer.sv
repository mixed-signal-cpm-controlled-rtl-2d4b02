// efficiency_optimizer: picks, from the current reference i_c[n], the power-
// stage configuration that trades conduction against switching loss best.
//
// Following the paper: at heavy load all power-transistor segments are on
// and the number of segments falls with the load; at medium-to-light load a
// single segment is on and the gate-drive voltage swing is scaled down; at
// still lighter load the converter runs in pulse-frequency mode (PFM). The
// optimizer only reconfigures while `en` is high, which the MiPPT controller
// holds high while both MAC chips pass; otherwise it keeps its setting.
// This design's choices: the thresholds (in i_c codes, roughly 1 mA per code
// so that the regions fall where the measured efficiency curves show gains:
// segments above about 50 mA, gate swing between about 15 and 50 mA, PFM
// below), the thermometer segment code seg_sl (001, 011, 111), a gate-swing
// code gssc_sl from 1 (lowest swing) to 7 (full swing) rising linearly with
// i_c between TH_PFM and TH_GSS, full swing on one segment in PFM, no
// hysteresis, and a reset state of all segments at full swing in PWM.
// Timing: outputs update on the clock edge of a `tick` with en high.
module efficiency_optimizer
  import mippt_pkg::IC_W, mippt_pkg::SL_W;
#(
  parameter logic [IC_W-1:0] TH_SEG3 = IC_W'(200),
  parameter logic [IC_W-1:0] TH_SEG2 = IC_W'(100),
  parameter logic [IC_W-1:0] TH_GSS  = IC_W'(50),
  parameter logic [IC_W-1:0] TH_PFM  = IC_W'(15)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic            tick,
  input  logic [IC_W-1:0] i_c,
  output logic [SL_W-1:0] seg_sl,
  output logic [SL_W-1:0] gssc_sl,
  output logic            pfm
);

  localparam logic [SL_W-1:0] SWING_FULL = '1;

  // threshold of gate-swing level k (k = 2..6) in the gate-swing region
  function automatic logic [IC_W-1:0] swing_th(int k);
    return IC_W'(int'(TH_PFM) + ((k - 1) * (int'(TH_GSS) - int'(TH_PFM))) / 6);
  endfunction

  logic [SL_W-1:0] seg_n, gssc_n;
  logic            pfm_n;

  always_comb begin
    pfm_n  = 1'b0;
    gssc_n = SWING_FULL;
    if (i_c >= TH_SEG3)      seg_n = 3'b111;
    else if (i_c >= TH_SEG2) seg_n = 3'b011;
    else                     seg_n = 3'b001;
    if (i_c < TH_PFM) begin
      pfm_n = 1'b1;
    end else if (i_c < TH_GSS) begin
      gssc_n = SL_W'(1);
      for (int k = 2; k <= 6; k++)
        if (i_c >= swing_th(k)) gssc_n = SL_W'(k);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg_sl  <= 3'b111;
      gssc_sl <= SWING_FULL;
      pfm     <= 1'b0;
    end else if (en && tick) begin
      seg_sl  <= seg_n;
      gssc_sl <= gssc_n;
      pfm     <= pfm_n;
    end
  end

endmodule
