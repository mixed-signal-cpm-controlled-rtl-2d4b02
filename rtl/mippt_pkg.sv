// mippt_pkg: widths, codes and types shared by the minimum-power-point
// tracking system (digital CPM controller side, MiPPT/ABB controllers and
// the MAC test load).
//
// Code widths are this design's choice except where noted:
//   - X_in/Y_in are 8 bits and P_MAC is 16 bits, as printed on the system
//     block diagram (X_in[7:0], Y_in[7:0], P_MAC[15:0]).
//   - seg_sl and gssc_sl are 3 bits, as printed (seg_sl<2:0>, gssc_sl<2:0>);
//     there are three power-transistor segments (P_en[1..3], N_en[1..3]).
//   - V_ref[n] is an 8-bit code (the recorded V_ref[n] values 0x44..0x4A fit
//     in 8 bits), V_BB[n] a 6-bit offset-binary code whose zero-body-bias
//     point is code 20 (the ABB loop trace starts at 20 and ends at 10 after
//     a 0 V -> -0.3 V move in 30 mV steps).
//   - e[n] is a 4-bit signed windowed-ADC error, i_c[n] a 10-bit unsigned
//     current code: both are assumptions.
package mippt_pkg;

  localparam int unsigned VREF_W = 8;    // V_ref[n] code
  localparam int unsigned VBB_W  = 6;    // V_BB[n] code
  localparam int unsigned E_W    = 4;    // windowed ADC error e[n]
  localparam int unsigned IC_W   = 10;   // current reference i_c[n]
  localparam int unsigned DIC_W  = 10;   // differential current reference
  localparam int unsigned XY_W   = 8;    // MAC input vectors
  localparam int unsigned P_W    = 16;   // MAC output
  localparam int unsigned NSEG   = 3;    // power-stage segments
  localparam int unsigned SL_W   = 3;    // seg_sl / gssc_sl width

  localparam logic [VBB_W-1:0] VBB_ZBB = VBB_W'(20);  // zero body bias

  // Direction of the supply-voltage search (Fig. 5 branches)
  typedef enum logic {DIR_DOWN = 1'b0, DIR_UP = 1'b1} vdd_dir_e;

  // Power-stage configuration chosen by the efficiency optimizer
  typedef struct packed {
    logic [SL_W-1:0] seg_sl;   // thermometer code of active segments
    logic [SL_W-1:0] gssc_sl;  // gate-swing level, 7 = full swing
    logic            pfm;      // 1 = pulse-frequency mode, 0 = normal PWM
  } pstage_cfg_t;

endpackage
