// tb_mippt_top: end-to-end test of the whole system at its default sizes
// (1024-vector pass/fail windows, 256-cycle power averaging, 12-clock
// switching cycle, 12 MAC units per load chip).
//
// Behavioural models around the design:
//   - converter output: each switching cycle the output voltage (in 1/256
//     V_ref LSB) moves by i_c - i_load; the windowed ADC returns
//     e[n] = clamp((256*V_ref - v)/32, -7, 7)
//   - inductor current sense: rises 64 codes per clock while P_gate is on;
//     the comparator trips when it reaches i_c
//   - load current: i_load = 300 + 6*min((V-73)^2, 100) + 3*(V_BB - (95-V)), V
//     the regulated supply (V_ref code), so the minimum power point along the
//     pass/fail boundary is V = 73 (0x49)
//   - timing failures: the auxiliary chip misbehaves while V_BB + V < 95, the
//     main chip (one LSB higher supply) while V_BB + V < 94, V again the
//     regulated supply code; a failing chip's
//     output pin is corrupted on its way back to the MAC controller
// Runs: start below the optimum (0x45), above it (0x52 and 0x5B), then forced
// load currents that must select three segments, two, one with scaled gate
// swing, and PFM. Every mechanism is counted and must occur.
module tb_mippt_top;
  import mippt_pkg::*;
  localparam int BND = 95;

  logic clk = 1'b0, rst_n = 1'b0, en_optim = 1'b0;
  logic [7:0] vref_init;
  logic signed [3:0] e_n;
  logic cmp;
  logic sd_ref, p_gate, n_gate, pfm, sw_tick;
  logic signed [9:0] delta_ic;
  logic [9:0] i_c;
  logic [2:0] p_en, n_en, gssc_sl;
  logic [7:0] vref;
  logic [5:0] vbb;
  logic freq_lock, at_fbb_limit, optim_done, power_valid;
  vdd_dir_e dir;
  logic [25:0] power;
  logic clk_mac, pass, pass_aux, verdict;
  logic [7:0] x_in, y_in;
  logic [15:0] p_mac_load, p_mac_aux_load, p_mac_in, p_mac_aux_in;

  mippt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int v_fine, on_clk, force_load = -1, locked_once = 0;
  int n_rbb = 0, n_fbb = 0, n_lock = 0, n_up = 0, n_down = 0, n_dir_up = 0, n_done = 0;
  int n_aux_fail = 0, n_main_fail = 0, n_meas = 0, n_cmp_end = 0, n_max_end = 0;
  int n_seg3 = 0, n_seg2 = 0, n_seg1 = 0, n_swing = 0, n_pfm = 0, n_skip = 0;
  int meas_bad = 0;

  function automatic int i_load_of(int v, int b);
    int d2;
    d2 = (v - 73) * (v - 73);
    if (d2 > 100) d2 = 100;      // flat beyond +-10 codes, within the 10-bit range
    return 300 + 6 * d2 + 3 * (b - (BND - v));
  endfunction
  function automatic int vcode();
    return (v_fine + 128) / 256;
  endfunction

  // converter plant and windowed ADC, once per switching cycle
  always @(posedge clk) begin
    if (rst_n && sw_tick) begin
      int il;
      il = (force_load >= 0) ? force_load : i_load_of(int'(vref), int'(vbb));
      v_fine <= v_fine + int'(i_c) - il;
    end
  end
  always_comb begin
    int e;
    e = (256 * int'(vref) - v_fine) / 32;
    if (e > 7) e = 7;
    if (e < -7) e = -7;
    e_n = 4'(e);
  end

  // current sense and comparator
  always @(posedge clk) on_clk <= p_gate ? on_clk + 1 : 0;
  assign cmp = p_gate && (on_clk * 64 >= int'(i_c));

  // load chips: pins pass through unless the chip is too slow
  assign p_mac_aux_in = (int'(vbb) + int'(vref) < BND)     ? p_mac_aux_load ^ 16'h0101 : p_mac_aux_load;
  assign p_mac_in     = (int'(vbb) + int'(vref) + 1 < BND) ? p_mac_load ^ 16'h0101     : p_mac_load;

  // mechanism counters
  logic [5:0] vbb_q; logic [7:0] vref_q; logic lock_q, done_q, pg_q;
  always @(posedge clk) if (rst_n) begin
    if (vbb < vbb_q) n_rbb++;
    if (vbb > vbb_q) n_fbb++;
    if (en_optim && vref > vref_q) n_up++;
    if (en_optim && vref < vref_q) n_down++;
    if (freq_lock && !lock_q) begin n_lock++; if (en_optim) locked_once = 1; end
    if (optim_done && !done_q) n_done++;
    if (verdict && !pass_aux) n_aux_fail++;
    if (verdict && !pass && locked_once != 0 && force_load < 0) n_main_fail++;
    if (dir == DIR_UP && optim_done && !done_q) n_dir_up++;
    if (pg_q && !p_gate) begin if (on_clk >= 10) n_max_end++; else n_cmp_end++; end
    if (sw_tick && pfm && !p_gate) n_skip++;
    if (power_valid) begin
      longint ideal;
      n_meas++;
      ideal = longint'(vref) * i_load_of(int'(vref), int'(vbb)) * 256;
      if (longint'(power) * 100 > ideal * 102 || longint'(power) * 100 < ideal * 98) meas_bad++;
    end
    vbb_q <= vbb; vref_q <= vref; lock_q <= freq_lock; done_q <= optim_done; pg_q <= p_gate;
  end

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic optimise(input int v0);
    longint pbest;
    vref_init = 8'(v0);
    en_optim = 1'b0;
    v_fine = 256 * v0;
    repeat (30000) @(negedge clk);         // let the voltage loop settle
    checks++;
    if (vcode() != v0) begin failures++; $display("output %0d did not settle at %0d", vcode(), v0); end
    locked_once = 0;
    en_optim = 1'b1;
    while (!optim_done) @(negedge clk);
    repeat (2000) @(negedge clk);
    pbest = longint'(73) * i_load_of(73, BND - 73);
    checks++;
    if (longint'(vref) * i_load_of(int'(vref), BND - int'(vref)) * 1000 > pbest * 1005
        || int'(vbb) != BND - int'(vref)) begin
      failures++;
      $display("start %02h: stopped at vref=%02h vbb=%0d, minimum is at 49 / %0d", v0, vref, vbb, BND - 73);
    end
    checks++;
    if (!pass || !pass_aux) begin failures++; $display("load not passing at the end"); end
    $display("start %02h: final vref=%02h vbb=%0d (ABB code), dir=%s", v0, vref, vbb, dir.name());
  endtask

  task automatic force_cfg(input int il, input logic [2:0] seg, input bit want_pfm, input bit scaled);
    force_load = il;
    repeat (12 * 400) @(negedge clk);
    checks++;
    if (p_en !== seg || n_en !== seg || pfm !== want_pfm || ((gssc_sl != 3'd7) != scaled)) begin
      failures++;
      $display("load %0d: seg=%b pfm=%b gssc=%0d", il, p_en, pfm, gssc_sl);
    end
    if (seg == 3'b111) n_seg3++;
    if (seg == 3'b011) n_seg2++;
    if (seg == 3'b001 && !want_pfm) n_seg1++;
    if (scaled) n_swing++;
    if (want_pfm) n_pfm++;
    // the voltage loop still regulates
    checks++;
    if (vcode() < int'(vref) - 1 || vcode() > int'(vref) + 1) begin
      failures++; $display("load %0d: output %0d, reference %0d", il, vcode(), vref);
    end
  endtask

  initial begin
    vref_init = 8'h45; v_fine = 256 * 8'h45; on_clk = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    optimise('h45);
    optimise('h52);
    optimise('h5B);       // about 1.23 V, the high start of the published run
    force_cfg(620, 3'b111, 1'b0, 1'b0);
    force_cfg(150, 3'b011, 1'b0, 1'b0);
    force_cfg(70,  3'b001, 1'b0, 1'b0);
    force_cfg(30,  3'b001, 1'b0, 1'b1);
    force_cfg(8,   3'b001, 1'b1, 1'b0);
    // reference stream density over 256 clocks equals V_ref
    begin
      automatic int ones = 0;
      @(negedge clk);
      for (int k = 0; k < 256; k++) begin @(negedge clk); ones += int'(sd_ref); end
      checks++;
      if (ones < int'(vref) - 1 || ones > int'(vref) + 1) begin
        failures++; $display("sigma-delta density %0d for vref %0d", ones, vref);
      end
    end
    checks++; if (meas_bad != 0) begin failures++; $display("%0d power measurements off by over 2%%", meas_bad); end
    checks++; if (n_main_fail != 0) begin failures++; $display("main MAC failed %0d windows", n_main_fail); end
    $display("ABB RBB steps=%0d FBB steps=%0d freq_locks=%0d", n_rbb, n_fbb, n_lock);
    $display("V_ref steps down=%0d up=%0d, searches ending upwards=%0d, optim_done=%0d", n_down, n_up, n_dir_up, n_done);
    $display("Pass_aux failures=%0d, power measurements=%0d", n_aux_fail, n_meas);
    $display("pulses ended by comparator=%0d by max duty=%0d, PFM skipped cycles=%0d", n_cmp_end, n_max_end, n_skip);
    $display("configs: 3 seg=%0d 2 seg=%0d 1 seg=%0d swing-scaled=%0d PFM=%0d", n_seg3, n_seg2, n_seg1, n_swing, n_pfm);
    begin
      int m [17];
      m = '{n_rbb, n_fbb, n_lock, n_up, n_down, n_dir_up, n_done, n_aux_fail, n_meas,
                     n_cmp_end, n_max_end, n_skip, n_seg3, n_seg2, n_seg1, n_swing, n_pfm};
      foreach (m[k]) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
