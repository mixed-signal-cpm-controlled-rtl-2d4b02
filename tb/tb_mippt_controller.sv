// tb_mippt_controller: runs the MiPPT controller (with its ABB loop and power
// meter) against a behavioural load and converter: the auxiliary MAC passes
// a window when V_BB + V_ref >= 95 held through it (the main MAC needs one
// code less, its supply being one LSB higher), and the converter's current
// reference is i_c = 300 + 6*(V_ref-73)^2 + 3*(V_BB - (95 - V_ref)), so that
// along the pass/fail boundary power has its minimum at V_ref = 73 (0x49).
// An independent model of the perturb-and-observe search gives the expected
// V_ref sequence, final V_ref and V_BB. Starting at 0x45 reproduces the
// recorded sequence 45,44,45,46,47,48,49,4A,49 of the low-start measurement.
// Once the first body-bias lock is reached, the main MAC must never fail.
module tb_mippt_controller;
  localparam int BND = 95, AVG = 4;
  logic clk = 1'b0, rst_n = 1'b0, en_optim = 1'b0, tick = 1'b0, verdict = 1'b0;
  logic pass, pass_aux;
  logic [7:0] vref_init, vref;
  logic [9:0] i_c;
  logic [5:0] vbb;
  logic freq_lock, at_fbb_limit, optim_done, eff_en, power_valid;
  mippt_pkg::vdd_dir_e dir;
  logic [21:0] power;
  int checks = 0, failures = 0;
  int win_min = 255, main_fail = 0, locked_once = 0, n_up = 0, n_down = 0, n_meas = 0;
  int seq [$];

  mippt_controller #(.AVG_LOG2(AVG)) dut (
    .clk, .rst_n, .en_optim, .vref_init, .tick, .i_c, .vref, .verdict, .pass, .pass_aux,
    .vbb, .freq_lock, .at_fbb_limit, .optim_done, .eff_en, .dir, .power, .power_valid);

  always #5 clk = ~clk;

  function automatic int cur(int v, int b);
    return 300 + 6 * (v - 73) * (v - 73) + 3 * (b - (BND - v));
  endfunction
  function automatic longint pwr(int v);   // power at the locked point
    return longint'(v) * cur(v, BND - v) * (2**AVG);
  endfunction

  // behavioural environment
  initial begin
    automatic int c = 0, t = 0;
    forever begin
      @(posedge clk);
      #1;
      if (int'(vbb) + int'(vref) < win_min) win_min = int'(vbb) + int'(vref);
      c++; t++;
      verdict = 1'b0; tick = 1'b0;
      if (t == 12) begin t = 0; tick = 1'b1; end
      i_c = 10'(cur(int'(vref), int'(vbb)));
      if (c == 40) begin
        c = 0;
        pass_aux = (win_min >= BND);
        pass = (win_min + 1 >= BND);
        if (!pass && en_optim && locked_once != 0) begin main_fail++; $display("main fail t=%0t vref=%0d vbb=%0d lock=%b", $time, vref, vbb, freq_lock); end
        verdict = 1'b1;
        win_min = int'(vbb) + int'(vref);
      end
    end
  end

  logic [7:0] vref_q;
  logic       lock_q;
  always @(posedge clk) begin
    if (en_optim && vref != vref_q) begin
      seq.push_back(int'(vref));
      if (vref > vref_q) n_up++; else n_down++;
    end
    vref_q <= vref;
    if (power_valid) n_meas++;
    if (en_optim && freq_lock && !lock_q) locked_once = 1;
    lock_q <= freq_lock;
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int v0);
    int exp_seq [$];
    int v, best, d;
    longint p_prev;
    // independent model of the search
    p_prev = pwr(v0);
    v = v0 - 1; exp_seq.push_back(v);
    d = (pwr(v) < p_prev) ? -1 : 1;
    p_prev = pwr(v);
    forever begin
      int nv;
      nv = v + d;
      exp_seq.push_back(nv);
      if (pwr(nv) < p_prev) begin p_prev = pwr(nv); v = nv; end
      else begin exp_seq.push_back(v); break; end
    end
    best = v;
    // run the controller
    vref_init = 8'(v0);
    en_optim = 1'b0;
    repeat (5) @(negedge clk);
    seq.delete();
    locked_once = 0;
    en_optim = 1'b1;
    while (!optim_done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (int'(vref) != best || int'(vbb) != BND - best) begin
      failures++;
      $display("start %0d: final vref=%0d vbb=%0d expected %0d %0d", v0, vref, vbb, best, BND - best);
    end
    checks++;
    if (seq != exp_seq) begin
      failures++;
      $display("start %0d: vref sequence differs (%0d steps, expected %0d)", v0, seq.size(), exp_seq.size());
      foreach (seq[k]) $display("  got %h", seq[k]);
    end
    checks++;
    if (eff_en !== (pass && pass_aux)) begin failures++; $display("eff_en wrong"); end
    $write("start %02h:", v0);
    foreach (seq[k]) $write(" %02h", seq[k]);
    $display("");
  endtask

  initial begin
    vref_init = 8'd80; pass = 1'b0; pass_aux = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (vref != 8'd80 || optim_done) begin failures++; $display("disabled: vref must follow vref_init"); end
    run('h45);        // below the optimum: direction reversal
    run('h52);        // above the optimum
    run('h49);        // at the optimum
    checks++;
    if (main_fail != 0) begin failures++; $display("main MAC failed %0d windows", main_fail); end
    checks++;
    if (n_up == 0 || n_down == 0 || n_meas == 0) begin failures++; $display("a mechanism never happened"); end
    $display("vref steps up=%0d down=%0d measurements=%0d", n_up, n_down, n_meas);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
