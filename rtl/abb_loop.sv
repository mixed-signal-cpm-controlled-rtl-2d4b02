// abb_loop: adaptive body-bias loop. It finds, at the present supply voltage,
// the lowest body-bias code V_BB[n] (highest threshold voltage, least
// leakage) at which the auxiliary MAC still runs at the target clock.
//
// How it works (following the paper's description of the ABB loop):
//   - `start` begins a run and clears freq_lock. The first Pass_aux verdict
//     decides the direction.
//   - Pass_aux = 1: V_BB is decremented by one LSB (towards reverse body
//     bias) after each passing verdict. At the first failing verdict V_BB is
//     incremented back by one LSB and freq_lock is raised.
//   - Pass_aux = 0: V_BB is incremented (towards forward body bias) after
//     each failing verdict until a verdict passes or V_BB reaches VBB_MAX;
//     then freq_lock is raised (at the limit, at_fbb_limit is also raised).
//   - `load` overwrites V_BB with load_val: the MiPPT controller uses it to
//     apply zero body bias at start-up and to restore a stored V_BB.
// Own choices: a verdict is a `verdict` strobe from the MAC controller at the
// end of each checking window; after any V_BB change (or a start) the next
// SKIP verdicts are ignored, because their window straddled the change. The
// reverse-bias end is bounded by VBB_MIN like the forward end by VBB_MAX.
//
// Timing: V_BB changes one clock after the verdict that causes it; freq_lock
// rises in the same cycle as the final V_BB update.
module abb_loop
  import mippt_pkg::VBB_W, mippt_pkg::VBB_ZBB;
#(
  parameter logic [VBB_W-1:0] VBB_MAX = VBB_W'(40),  // +0.6 V FBB at 30 mV/LSB
  parameter logic [VBB_W-1:0] VBB_MIN = VBB_W'(0),
  parameter int unsigned      SKIP    = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,       // pulse: run the loop once
  input  logic             load,        // pulse: V_BB <= load_val
  input  logic [VBB_W-1:0] load_val,
  input  logic             verdict,     // pulse: pass_aux is a fresh verdict
  input  logic             pass_aux,
  output logic [VBB_W-1:0] vbb,         // V_BB[n] to the ABB DAC
  output logic             freq_lock,
  output logic             at_fbb_limit,
  output logic             busy
);

  typedef enum logic [1:0] {S_IDLE, S_FIRST, S_DOWN, S_UP} state_e;
  state_e state;
  logic [$clog2(SKIP+1)-1:0] skip_cnt;

  // a verdict that counts: one taken after the last change has settled
  logic use_verdict;
  assign use_verdict = verdict && (skip_cnt == '0);
  assign busy        = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      vbb          <= VBB_ZBB;
      freq_lock    <= 1'b0;
      at_fbb_limit <= 1'b0;
      skip_cnt     <= '0;
    end else begin
      if (verdict && skip_cnt != '0) skip_cnt <= skip_cnt - 1'b1;
      if (load) begin
        vbb <= load_val;
      end
      if (start) begin
        state        <= S_FIRST;
        freq_lock    <= 1'b0;
        at_fbb_limit <= 1'b0;
        skip_cnt     <= ($clog2(SKIP+1))'(SKIP);
      end else if (use_verdict) begin
        unique case (state)
          S_IDLE: ;
          S_FIRST, S_DOWN: begin
            if (pass_aux && vbb > VBB_MIN) begin
              vbb      <= vbb - 1'b1;
              state    <= S_DOWN;
              skip_cnt <= ($clog2(SKIP+1))'(SKIP);
            end else if (pass_aux) begin        // reverse-bias end reached
              state     <= S_IDLE;
              freq_lock <= 1'b1;
            end else if (state == S_DOWN) begin // first failure: step back
              vbb       <= vbb + 1'b1;
              state     <= S_IDLE;
              freq_lock <= 1'b1;
            end else if (vbb < VBB_MAX) begin   // failing at start: go FBB
              vbb      <= vbb + 1'b1;
              state    <= S_UP;
              skip_cnt <= ($clog2(SKIP+1))'(SKIP);
            end else begin
              state        <= S_IDLE;
              freq_lock    <= 1'b1;
              at_fbb_limit <= 1'b1;
            end
          end
          S_UP: begin
            if (pass_aux) begin
              state     <= S_IDLE;
              freq_lock <= 1'b1;
            end else if (vbb < VBB_MAX) begin
              vbb      <= vbb + 1'b1;
              skip_cnt <= ($clog2(SKIP+1))'(SKIP);
            end else begin
              state        <= S_IDLE;
              freq_lock    <= 1'b1;
              at_fbb_limit <= 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // a locked code never lies above the forward-bias limit
  a_vbb_range: assert property (@(posedge clk) disable iff (!rst_n)
                                freq_lock |-> vbb <= VBB_MAX || load);

endmodule
