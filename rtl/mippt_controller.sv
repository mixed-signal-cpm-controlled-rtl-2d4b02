// mippt_controller: minimum power point tracking (MiPPT) of the digital load.
// At a fixed target clock it searches the supply voltage V_DD (through the
// converter's voltage reference V_ref[n]) and, at every supply step, lets
// the ABB loop set the body bias V_BB[n] to the highest threshold voltage
// that still meets the clock; it keeps stepping V_DD while the measured
// power falls, and stops at the minimum.
//
// The algorithm follows the paper's flowchart (perturb and observe):
//   1. On enable: zero body bias, run the ABB loop, measure power P.
//   2. Perturb: V_ref -= 1, run the ABB loop, measure. If P fell, the search
//      direction is down, otherwise up.
//   3. Optimise: keep the last point, step V_ref one LSB in the search
//      direction, run the ABB loop, measure. While P falls, repeat. At the
//      first rise, put back the previous V_ref and V_BB and raise optim_done.
// In the "up" case the first step returns V_ref to its starting value and
// is compared with the perturbed point, as the flowchart's right branch does.
// Power is measured by the embedded power_meter from i_c[n] and V_ref[n];
// the ABB loop is the embedded abb_loop.
// This design's choices: equal powers count as a rise; the search also stops
// at VREF_MIN/VREF_MAX; while disabled V_ref follows vref_init; the efficiency
// optimiser enable eff_en is Pass AND Pass_aux, as the paper states.
// Timing: every step costs one ABB-loop run (SKIP+1 pass/fail windows per
// V_BB step) plus one power measurement (2**AVG_LOG2 switching cycles).
module mippt_controller
  import mippt_pkg::VREF_W, mippt_pkg::VBB_W, mippt_pkg::IC_W, mippt_pkg::VBB_ZBB,
         mippt_pkg::vdd_dir_e, mippt_pkg::DIR_DOWN, mippt_pkg::DIR_UP;
#(
  parameter int unsigned        AVG_LOG2  = 8,
  parameter logic [VREF_W-1:0]  VREF_MIN  = VREF_W'(30),
  parameter logic [VREF_W-1:0]  VREF_MAX  = VREF_W'(100),
  parameter logic [VBB_W-1:0]   VBB_MAX   = VBB_W'(40),
  parameter int unsigned        SKIP      = 1,
  localparam int unsigned       PWR_W     = VREF_W + IC_W + AVG_LOG2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_optim,
  input  logic [VREF_W-1:0] vref_init,
  // converter side
  input  logic              tick,
  input  logic [IC_W-1:0]   i_c,
  output logic [VREF_W-1:0] vref,
  // MAC controller side
  input  logic              verdict,
  input  logic              pass,
  input  logic              pass_aux,
  // body bias and status
  output logic [VBB_W-1:0]  vbb,
  output logic              freq_lock,
  output logic              at_fbb_limit,
  output logic              optim_done,
  output logic              eff_en,
  output vdd_dir_e          dir,
  output logic [PWR_W-1:0]  power,
  output logic              power_valid
);

  typedef enum logic [2:0] {S_IDLE, S_ABB_GO, S_ABB_WAIT, S_MEAS_GO, S_MEAS_WAIT, S_DONE} state_e;
  typedef enum logic [1:0] {PH_INIT, PH_PERTURB, PH_OPT} phase_e;

  state_e            state;
  phase_e            phase;
  logic [PWR_W-1:0]  p_prev;
  logic [VREF_W-1:0] prev_vref;
  logic [VBB_W-1:0]  prev_vbb;
  logic              abb_load;
  logic [VBB_W-1:0]  abb_load_val;
  logic              abb_busy, meas_busy;

  logic              abb_start, meas_start;
  assign abb_start  = (state == S_ABB_GO);
  assign meas_start = (state == S_MEAS_GO);
  assign eff_en     = pass && pass_aux;

  abb_loop #(.VBB_MAX(VBB_MAX), .SKIP(SKIP)) u_abb (
    .clk, .rst_n, .start(abb_start), .load(abb_load), .load_val(abb_load_val),
    .verdict, .pass_aux, .vbb, .freq_lock, .at_fbb_limit, .busy(abb_busy)
  );

  power_meter #(.AVG_LOG2(AVG_LOG2)) u_pm (
    .clk, .rst_n, .start(meas_start), .tick, .i_c, .vref,
    .power, .done(power_valid), .busy(meas_busy)
  );

  // next supply code in the search direction, and whether it exists
  function automatic logic step_ok(vdd_dir_e d, logic [VREF_W-1:0] v);
    return (d == DIR_DOWN) ? (v > VREF_MIN) : (v < VREF_MAX);
  endfunction
  function automatic logic [VREF_W-1:0] step(vdd_dir_e d, logic [VREF_W-1:0] v);
    return (d == DIR_DOWN) ? v - 1'b1 : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      phase        <= PH_INIT;
      dir          <= DIR_DOWN;
      vref         <= '0;
      p_prev       <= '0;
      prev_vref    <= '0;
      prev_vbb     <= VBB_ZBB;
      optim_done   <= 1'b0;
      abb_load     <= 1'b0;
      abb_load_val <= VBB_ZBB;
    end else begin
      abb_load <= 1'b0;
      if (!en_optim) begin
        state      <= S_IDLE;
        optim_done <= 1'b0;
        vref       <= vref_init;
      end else begin
        unique case (state)
          S_IDLE: begin                         // start-up: ZBB, then ABB
            abb_load     <= 1'b1;
            abb_load_val <= VBB_ZBB;
            phase        <= PH_INIT;
            dir          <= DIR_DOWN;
            state        <= S_ABB_GO;
          end
          S_ABB_GO:   state <= S_ABB_WAIT;
          S_ABB_WAIT: if (!abb_busy && freq_lock) state <= S_MEAS_GO;
          S_MEAS_GO:  state <= S_MEAS_WAIT;
          S_MEAS_WAIT: if (power_valid) begin
            if (phase == PH_OPT && !(power < p_prev)) begin
              // power rose: back to the previous point, stop
              vref         <= prev_vref;
              abb_load     <= 1'b1;
              abb_load_val <= prev_vbb;
              optim_done   <= 1'b1;
              state        <= S_DONE;
            end else begin
              vdd_dir_e d;
              d = dir;
              if (phase == PH_PERTURB) d = (power < p_prev) ? DIR_DOWN : DIR_UP;
              if (phase == PH_INIT)    d = DIR_DOWN;         // the perturbation
              dir       <= d;
              p_prev    <= power;
              prev_vref <= vref;
              prev_vbb  <= vbb;
              phase     <= (phase == PH_INIT) ? PH_PERTURB : PH_OPT;
              if (step_ok(d, vref)) begin
                vref  <= step(d, vref);
                state <= S_ABB_GO;
              end else begin
                optim_done <= 1'b1;                         // search range end
                state      <= S_DONE;
              end
            end
          end
          S_DONE: ;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  a_meas_after_lock: assert property (@(posedge clk) disable iff (!rst_n)
                                      meas_start |-> freq_lock);
  a_one_at_a_time:   assert property (@(posedge clk) disable iff (!rst_n)
                                      !(meas_busy && abb_busy));

endmodule
