// tb_digital_compensator: feeds random windowed-ADC errors, one per tick,
// and checks i_c and delta_ic against an independent model of the
// incremental PI law delta = KI*e[n] + KP*(e[n]-e[n-1]) with i_c saturated to
// 0..1023. Long runs of one sign drive i_c into both limits. Also checks that
// outputs hold between ticks.
module tb_digital_compensator;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic signed [3:0] e_n;
  logic signed [9:0] delta_ic;
  logic [9:0] i_c;
  int checks = 0, failures = 0;
  int m_ic, m_eprev, m_d, hit_lo, hit_hi;

  digital_compensator dut (.clk, .rst_n, .tick, .e_n, .delta_ic, .i_c);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e_n = '0; m_ic = 0; m_eprev = 0; hit_lo = 0; hit_hi = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int e, nx;
      // biased random walk so that both saturation limits are reached
      if (i < 1000)      e = int'($urandom_range(10, 0)) - 3;
      else if (i < 2000) e = int'($urandom_range(10, 0)) - 7;
      else               e = int'($urandom_range(14, 0)) - 7;
      if (e > 7) e = 7;
      if (e < -8) e = -8;
      @(negedge clk);
      e_n = 4'(e); tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      nx = m_ic + 1 * e + 8 * (e - m_eprev);
      if (nx < 0) begin nx = 0; hit_lo++; end
      if (nx > 1023) begin nx = 1023; hit_hi++; end
      m_d = nx - m_ic; m_ic = nx; m_eprev = e;
      checks++;
      if (int'(i_c) != m_ic || int'(delta_ic) != m_d) begin
        failures++;
        $display("step %0d: i_c=%0d d=%0d expected %0d %0d", i, i_c, delta_ic, m_ic, m_d);
      end
      e_n = 4'($urandom);   // not sampled without a tick
      @(negedge clk);
      checks++;
      if (int'(i_c) != m_ic) begin
        failures++;
        $display("step %0d: i_c moved without a tick", i);
      end
    end
    checks++;
    if (hit_lo == 0 || hit_hi == 0) begin
      failures++;
      $display("saturation not exercised: lo=%0d hi=%0d", hit_lo, hit_hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
