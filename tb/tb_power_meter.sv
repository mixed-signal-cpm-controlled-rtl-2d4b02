// tb_power_meter: feeds random current codes, one per switching-cycle tick
// (a tick every 12 clocks), and checks that `done` comes exactly after
// 2**AVG_LOG2 ticks and that `power` equals V_ref times the sum of the
// sampled currents. Runs at the default AVG_LOG2 = 8.
module tb_power_meter;
  localparam int AVG = 8;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, tick = 1'b0;
  logic [9:0] i_c;
  logic [7:0] vref;
  logic [25:0] power;
  logic done, busy;
  int checks = 0, failures = 0;

  power_meter dut (.clk, .rst_n, .start, .tick, .i_c, .vref, .power, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_c = '0; vref = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int m = 0; m < 6; m++) begin
      longint sum, expect_p;
      int nticks;
      vref = 8'($urandom_range(255, 40));
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      sum = 0; nticks = 0;
      while (1) begin
        repeat (11) begin
          @(negedge clk);
          if (done) break;
        end
        if (done) break;
        i_c = (m == 5) ? 10'h3FF : 10'($urandom);
        tick = 1'b1;
        @(negedge clk);
        tick = 1'b0;
        sum += longint'(i_c); nticks++;
        if (done) break;
        if (nticks > 2**AVG + 5) break;
      end
      expect_p = sum * vref;
      checks++;
      if (nticks != 2**AVG) begin
        failures++;
        $display("measurement %0d: done after %0d ticks", m, nticks);
      end
      checks++;
      if (longint'(power) != expect_p) begin
        failures++;
        $display("measurement %0d: power=%0d expected %0d", m, power, expect_p);
      end
      checks++;
      if (busy) begin failures++; $display("still busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
