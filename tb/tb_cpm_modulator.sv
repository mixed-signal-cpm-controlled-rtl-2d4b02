// tb_cpm_modulator: closes the analog current loop with a simple model (the
// sensed current rises one unit per clock while the high-side switch is on,
// the comparator trips at a chosen level L) and checks, cycle by cycle:
// the switching period (12 clocks), the high-side turn-on two clocks after
// the cycle strobe, a pulse width of L+1 clocks capped at the 10-clock
// maximum on-time, the dead time and absence of overlap between the gates,
// pulse skipping in PFM (a pulse only when e[n] > 0, low side kept off), and
// that segment/gate-swing selections appear at the next cycle start.
module tb_cpm_modulator;
  logic clk = 1'b0, rst_n = 1'b0, cmp = 1'b0, pfm = 1'b0;
  logic signed [3:0] e_n;
  logic [2:0] seg_sl, gssc_sl;
  logic tick, p_gate, n_gate, pfm_out;
  logic [2:0] p_en, n_en, gssc_out;
  int checks = 0, failures = 0;
  int level, hc;
  int n_cmp_end = 0, n_max_end = 0, n_skip = 0, n_pfm_pulse = 0;

  cpm_modulator dut (.clk, .rst_n, .cmp, .e_n, .pfm, .seg_sl, .gssc_sl, .tick,
                     .p_gate, .n_gate, .p_en, .n_en, .gssc_out, .pfm_out);

  always #5 clk = ~clk;

  // current-sense model
  always @(posedge clk) begin
    if (p_gate) hc <= hc + 1;
    else        hc <= 0;
  end
  always @(negedge clk) cmp = p_gate && (hc >= level);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cycle(input int lvl, input logic mode_pfm, input logic signed [3:0] e,
                           input logic [2:0] seg, input logic [2:0] sw);
    int width, rise_at, last_tick;
    logic prev_p, prev_n;
    // wait for the cycle strobe, present inputs for it
    level = lvl; pfm = mode_pfm; e_n = e; seg_sl = seg; gssc_sl = sw;
    while (!tick) @(negedge clk);
    width = 0; rise_at = -1; prev_p = p_gate; prev_n = n_gate;
    for (int c = 1; c <= 12; c++) begin
      @(negedge clk);
      if (p_gate && rise_at < 0) rise_at = c;
      if (p_gate) width++;
      checks++;
      if (p_gate && n_gate) begin failures++; $display("gate overlap"); end
      if ((p_gate && prev_n) || (n_gate && prev_p)) begin
        failures++; $display("no dead time at cycle offset %0d", c);
      end
      if (c == 12) begin
        checks++;
        if (!tick) begin failures++; $display("period is not 12 clocks"); end
      end
      if (c == 1) begin
        checks++;
        if (p_en !== seg || n_en !== seg || gssc_out !== sw || pfm_out !== mode_pfm) begin
          failures++; $display("segment/swing selection not applied at cycle start");
        end
      end
      if (mode_pfm && n_gate) begin failures++; $display("low side on in PFM"); end
      prev_p = p_gate; prev_n = n_gate;
    end
    checks++;
    if (!mode_pfm || e > 0) begin
      int w_exp;
      w_exp = (lvl + 1 < 10) ? lvl + 1 : 10;
      if (rise_at != 2 || width != w_exp) begin
        failures++;
        $display("t=%0t level %0d: pulse at %0d width %0d, expected at 2 width %0d", $time, lvl, rise_at, width, w_exp);
      end
      if (w_exp == 10) n_max_end++; else n_cmp_end++;
      if (mode_pfm) n_pfm_pulse++;
    end else begin
      if (width != 0) begin failures++; $display("PFM cycle not skipped"); end
      n_skip++;
    end
  endtask

  initial begin
    e_n = '0; seg_sl = 3'b111; gssc_sl = 3'd7; level = 4; hc = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    repeat (2) run_cycle(4, 1'b0, 4'sd0, 3'b111, 3'd7);       // settle
    for (int i = 0; i < 200; i++) begin
      logic m; logic signed [3:0] e;
      m = (i % 4 == 3);
      e = 4'($urandom_range(15, 0));
      run_cycle($urandom_range(12, 1), m, e, 3'($urandom_range(7, 0)), 3'($urandom_range(7, 1)));
    end
    checks++;
    if (n_cmp_end == 0 || n_max_end == 0 || n_skip == 0 || n_pfm_pulse == 0) begin
      failures++; $display("a case was never reached");
    end
    $display("comparator-ended=%0d max-duty=%0d pfm-skipped=%0d pfm-pulses=%0d", n_cmp_end, n_max_end, n_skip, n_pfm_pulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
