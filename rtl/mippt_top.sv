// mippt_top: digital part of a minimum-power-point tracking system in which
// a current-mode dc-dc converter both supplies a digital load and, through
// its own control variables, measures the load's power.
//
// Blocks and connections follow the paper's system diagram:
//   - digital_compensator: windowed-ADC error e[n] -> delta_ic[n], i_c[n]
//   - sigma_delta_dac:     V_ref[n] -> one-bit reference stream for the ADC
//   - cpm_modulator:       SR-latch PWM/PFM, segment enables, gate swing
//   - efficiency_optimizer: i_c[n] -> seg_sl, gssc_sl, pfm/nom, enabled
//                          while Pass and Pass_aux are high
//   - mippt_controller:    perturb-and-observe search of V_ref[n], with the
//                          ABB loop (V_BB[n]) and the power meter inside
//   - mac_controller:      clk_MAC, PRBS vectors, Pass and Pass_aux
//   - two digital_load chips (main and auxiliary), 12 MAC units each
// The analog parts are outside: the windowed ADC delivers e_n, the current
// comparator delivers cmp, the current DAC takes i_c/delta_ic, the ABB DAC
// takes vbb (V_BBN = V_BB, V_BBP = V_DD - V_BB, 30 mV per code), the power
// stage takes the gate and enable signals. The load chips' outputs leave as
// p_mac_load/p_mac_aux_load and come back to the MAC controller as
// p_mac_in/p_mac_aux_in: on the board these are wires, and keeping them apart
// lets a test bench model the timing failures that low V_DD or V_BB cause.
// The auxiliary chip's supply sits one V_ref LSB below the main chip's; that
// offset is made in the analog domain. Everything runs on one clock `clk`;
// a switching cycle is CYCLE_CLKS clocks and clk_mac is clk/(2*MAC_HALF).
module mippt_top
  import mippt_pkg::*;
#(
  parameter int unsigned N_VEC      = 1024,
  parameter int unsigned AVG_LOG2   = 8,
  parameter int unsigned CYCLE_CLKS = 12,
  parameter int unsigned MAC_HALF   = 1,
  parameter int unsigned N_MAC      = 12,
  parameter int unsigned SKIP       = 1,
  localparam int unsigned PWR_W     = VREF_W + IC_W + AVG_LOG2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_optim,
  input  logic [VREF_W-1:0]       vref_init,
  // converter analog interface
  input  logic signed [E_W-1:0]   e_n,
  input  logic                    cmp,
  output logic                    sd_ref,
  output logic signed [DIC_W-1:0] delta_ic,
  output logic [IC_W-1:0]         i_c,
  output logic                    p_gate,
  output logic                    n_gate,
  output logic [NSEG-1:0]         p_en,
  output logic [NSEG-1:0]         n_en,
  output logic [SL_W-1:0]         gssc_sl,
  output logic                    pfm,
  output logic                    sw_tick,
  // MiPPT status and ABB DAC code
  output logic [VREF_W-1:0]       vref,
  output logic [VBB_W-1:0]        vbb,
  output logic                    freq_lock,
  output logic                    at_fbb_limit,
  output logic                    optim_done,
  output vdd_dir_e                dir,
  output logic [PWR_W-1:0]        power,
  output logic                    power_valid,
  // MAC test loads
  output logic                    clk_mac,
  output logic [XY_W-1:0]         x_in,
  output logic [XY_W-1:0]         y_in,
  output logic [P_W-1:0]          p_mac_load,
  output logic [P_W-1:0]          p_mac_aux_load,
  input  logic [P_W-1:0]          p_mac_in,
  input  logic [P_W-1:0]          p_mac_aux_in,
  output logic                    pass,
  output logic                    pass_aux,
  output logic                    verdict
);

  logic            tick, eff_en;
  logic [SL_W-1:0] seg_cfg, gssc_cfg;
  logic            pfm_cfg;

  assign sw_tick = tick;

  digital_compensator u_comp (
    .clk, .rst_n, .tick, .e_n, .delta_ic, .i_c
  );

  sigma_delta_dac #(.N(VREF_W)) u_sd (
    .clk, .rst_n, .din(vref), .bit_out(sd_ref)
  );

  efficiency_optimizer u_eff (
    .clk, .rst_n, .en(eff_en), .tick, .i_c,
    .seg_sl(seg_cfg), .gssc_sl(gssc_cfg), .pfm(pfm_cfg)
  );

  cpm_modulator #(.CYCLE_CLKS(CYCLE_CLKS)) u_cpm (
    .clk, .rst_n, .cmp, .e_n, .pfm(pfm_cfg), .seg_sl(seg_cfg), .gssc_sl(gssc_cfg),
    .tick, .p_gate, .n_gate, .p_en, .n_en, .gssc_out(gssc_sl), .pfm_out(pfm)
  );

  mippt_controller #(.AVG_LOG2(AVG_LOG2), .SKIP(SKIP)) u_mippt (
    .clk, .rst_n, .en_optim, .vref_init, .tick, .i_c, .vref,
    .verdict, .pass, .pass_aux, .vbb, .freq_lock, .at_fbb_limit,
    .optim_done, .eff_en, .dir, .power, .power_valid
  );

  mac_controller #(.N_VEC(N_VEC), .MAC_HALF(MAC_HALF), .N_MAC(N_MAC)) u_macc (
    .clk, .rst_n, .clk_mac, .x_in, .y_in,
    .p_mac(p_mac_in), .p_mac_aux(p_mac_aux_in), .pass, .pass_aux, .verdict
  );

  digital_load #(.N_MAC(N_MAC)) u_load_main (
    .clk_mac, .x_in, .y_in, .p_mac(p_mac_load)
  );

  digital_load #(.N_MAC(N_MAC)) u_load_aux (
    .clk_mac, .x_in, .y_in, .p_mac(p_mac_aux_load)
  );

endmodule
