// power_meter: measures the load power from information the converter
// controller already holds, so no sense resistor or power monitor is needed.
//
// The paper's method: the current reference i_c[n] (the peak inductor
// current commanded in each switching cycle) stands for the load current and
// the voltage reference V_ref[n] for the supply voltage; their product is the
// power. This design's choice is to sum i_c[n] over 2**AVG_LOG2 switching
// cycles (one sample per `tick`) and multiply the sum by V_ref[n], which
// averages out the cycle-to-cycle ripple of the current loop. The result is
// therefore V_ref * i_c * 2**AVG_LOG2 in code units; only comparisons between
// measurements are used downstream.
//
// Interface/timing: `start` clears the sum; after 2**AVG_LOG2 ticks `done`
// pulses for one clock with `power` valid, and `power` holds until the next
// measurement ends.
module power_meter
  import mippt_pkg::VREF_W, mippt_pkg::IC_W;
#(
  parameter int unsigned AVG_LOG2 = 8,
  localparam int unsigned SUM_W   = IC_W + AVG_LOG2,
  localparam int unsigned PWR_W   = VREF_W + SUM_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              tick,     // one per switching cycle
  input  logic [IC_W-1:0]   i_c,
  input  logic [VREF_W-1:0] vref,
  output logic [PWR_W-1:0]  power,
  output logic              done,
  output logic              busy
);

  logic [SUM_W-1:0]  sum;
  logic [AVG_LOG2:0] cnt;   // samples still to take

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum   <= '0;
      cnt   <= '0;
      power <= '0;
      done  <= 1'b0;
      busy  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        sum  <= '0;
        cnt  <= (AVG_LOG2+1)'(2**AVG_LOG2);
        busy <= 1'b1;
      end else if (busy && tick) begin
        sum <= sum + SUM_W'(i_c);
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          power <= PWR_W'(vref) * PWR_W'(sum + SUM_W'(i_c));
        end
      end
    end
  end

endmodule
