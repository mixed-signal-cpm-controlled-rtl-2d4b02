// cpm_modulator: the digital part of the peak current programmed mode (CPM)
// modulator of the dc-dc converter, between the analog current comparator
// and the segmented power stage.
//
// Following the paper: an SR latch turns the high-side switch on at the
// start of each switching cycle and the comparator resets it when the
// inductor (sense-FET) current reaches the analog current reference made
// from i_c[n]; P_en[n]/N_en[n] enable the active transistor segments chosen
// by seg_sl; gssc_sl selects the gate swing; in PFM the converter skips
// switching cycles.
// This design's choices: a switching cycle is CYCLE_CLKS system clocks
// (`tick` marks its first clock and is the sampling strobe of the digital
// loop); the latch sets one clock after the cycle starts, after the low-side
// gate has been turned off (one clock of dead time on both edges); a maximum
// on-time of DMAX_CLKS clocks resets the latch if the comparator has not;
// the comparator is ignored in the first on-clock (leading-edge blanking);
// in PFM a cycle fires only when the sampled error e[n] is positive (output
// below reference) and the low-side switch stays off (no zero-current
// detection is described). Segment and gate-swing selections are applied at
// cycle start so they never change within a pulse.
module cpm_modulator
  import mippt_pkg::E_W, mippt_pkg::SL_W, mippt_pkg::NSEG;
#(
  parameter int unsigned CYCLE_CLKS = 12,
  parameter int unsigned DMAX_CLKS  = 10
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cmp,       // 1: inductor current >= reference
  input  logic signed [E_W-1:0] e_n,
  input  logic                  pfm,
  input  logic [SL_W-1:0]       seg_sl,
  input  logic [SL_W-1:0]       gssc_sl,
  output logic                  tick,
  output logic                  p_gate,
  output logic                  n_gate,
  output logic [NSEG-1:0]       p_en,
  output logic [NSEG-1:0]       n_en,
  output logic [SL_W-1:0]       gssc_out,
  output logic                  pfm_out
);

  localparam int unsigned CW = $clog2(CYCLE_CLKS);

  logic [CW-1:0] cnt;
  logic [CW-1:0] on_cnt;
  logic          fire;      // this cycle produces a pulse
  logic          pulse_end; // latch reset condition

  assign tick      = (cnt == '0);
  assign pulse_end = p_gate && ((cmp && on_cnt != '0) || on_cnt == CW'(DMAX_CLKS-1)
                                || cnt == CW'(CYCLE_CLKS-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      on_cnt   <= '0;
      fire     <= 1'b0;
      p_gate   <= 1'b0;
      n_gate   <= 1'b0;
      p_en     <= '0;
      n_en     <= '0;
      gssc_out <= '1;
      pfm_out  <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(CYCLE_CLKS-1)) ? '0 : cnt + 1'b1;
      if (tick) begin
        fire     <= !pfm || (e_n > 0);
        p_en     <= NSEG'(seg_sl);
        n_en     <= NSEG'(seg_sl);
        gssc_out <= gssc_sl;
        pfm_out  <= pfm;
        n_gate   <= 1'b0;              // dead time before the set
      end else if (cnt == CW'(1) && fire) begin
        p_gate <= 1'b1;                // S of the SR latch
        on_cnt <= '0;
      end else if (pulse_end) begin
        p_gate <= 1'b0;                // R of the SR latch
      end else begin
        if (p_gate) on_cnt <= on_cnt + 1'b1;
        n_gate <= !p_gate && !pfm_out && (cnt != CW'(CYCLE_CLKS-1));
      end
    end
  end

  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n) !(p_gate && n_gate));

endmodule
