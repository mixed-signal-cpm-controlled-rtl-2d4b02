// sigma_delta_dac: first-order, one-bit sigma-delta modulator that turns the
// digital voltage reference V_ref[n] into a bit stream; after analog low-pass
// filtering its density, din / 2**N, is the reference of the windowed ADC.
// The paper calls for "a simple" sigma-delta DAC for this reference; the
// first-order error-feedback (accumulator carry) structure is this design's
// choice. One output bit per clock: the accumulator adds din each clock and
// the carry out is the bit, so any 2**N consecutive bits hold exactly din
// ones (within one).
module sigma_delta_dac #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] din,
  output logic         bit_out
);

  logic [N-1:0] acc;
  logic [N:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, din};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      bit_out <= 1'b0;
    end else begin
      acc     <= sum[N-1:0];
      bit_out <= sum[N];
    end
  end

endmodule
