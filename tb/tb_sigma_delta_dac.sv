// tb_sigma_delta_dac: for a set of input codes, counts the ones the
// modulator emits over 2**N clocks (must equal the code) and checks that over
// any window of 16 clocks the count stays within one of 16*code/2**N, the
// evenly spread stream a first-order modulator produces.
module tb_sigma_delta_dac;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] din;
  logic bit_out;
  int checks = 0, failures = 0;
  logic hist [$];

  sigma_delta_dac #(.N(N)) dut (.clk, .rst_n, .din, .bit_out);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int codes [6] = '{0, 1, 69, 128, 200, 255};
    din = '0;
    repeat (3) @(posedge clk);
    foreach (codes[c]) begin
      int ones;
      rst_n = 1'b0; din = N'(codes[c]);
      @(posedge clk); #1 rst_n = 1'b1;
      @(posedge clk);            // first output bit appears after one clock
      ones = 0; hist.delete();
      for (int i = 0; i < 2**N; i++) begin
        @(negedge clk);
        ones += int'(bit_out);
        hist.push_back(bit_out);
        @(posedge clk);
      end
      checks++;
      if (ones != codes[c]) begin
        failures++;
        $display("code %0d: %0d ones in %0d clocks", codes[c], ones, 2**N);
      end
      for (int s = 0; s + 16 <= hist.size(); s += 16) begin
        int w;
        w = 0;
        for (int k = 0; k < 16; k++) w += int'(hist[s+k]);
        checks++;
        if (w * (2**N) < 16 * codes[c] - (2**N) || w * (2**N) > 16 * codes[c] + (2**N)) begin
          failures++;
          $display("code %0d: window at %0d has %0d ones", codes[c], s, w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
