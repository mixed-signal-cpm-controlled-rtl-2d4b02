// tb_abb_loop: runs the body-bias loop against a load model whose auxiliary
// MAC passes a window only if V_BB stayed at or above a boundary code for the
// whole window (a verdict every 20 clocks). Checks the final code (the
// boundary when starting from a passing point, also the boundary when
// starting from a failing one, the forward-bias limit 40 and the reverse
// limit 0 when the boundary lies beyond them), Freq_lock only at the end,
// that V_BB never enters the failing region by more than one LSB while
// searching downwards, and the number of verdicts a run takes (two per used
// verdict with SKIP = 1).
module tb_abb_loop;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, load = 1'b0, verdict = 1'b0, pass_aux;
  logic [5:0] load_val, vbb;
  logic freq_lock, at_fbb_limit, busy;
  int checks = 0, failures = 0;
  int bnd = 0, win_min = 63, n_verd = 0;
  int n_dec = 0, n_inc = 0, n_limit = 0;

  abb_loop dut (.clk, .rst_n, .start, .load, .load_val, .verdict, .pass_aux,
                .vbb, .freq_lock, .at_fbb_limit, .busy);

  always #5 clk = ~clk;

  // load model: pass/fail verdict per 20-clock window
  initial begin
    automatic int c = 0;
    pass_aux = 1'b0;
    forever begin
      @(posedge clk);
      #1;
      if (int'(vbb) < win_min) win_min = int'(vbb);
      c++;
      verdict = 1'b0;
      if (c == 20) begin
        c = 0;
        pass_aux = (win_min >= bnd);
        verdict = 1'b1;
        n_verd++;
        win_min = int'(vbb);
      end
    end
  end

  // count steps
  logic [5:0] vbb_q;
  always @(posedge clk) begin
    if (rst_n && vbb_q != vbb && !load) begin
      if (vbb < vbb_q) n_dec++; else n_inc++;
    end
    vbb_q <= vbb;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int start_code, input int boundary, input bit do_load);
    int v0, exp_v, lowest, nv0, used;
    bit exp_lim;
    if (do_load) begin
      @(negedge clk); load = 1'b1; load_val = 6'(start_code);
      @(negedge clk); load = 1'b0;
    end
    v0 = int'(vbb);
    bnd = boundary;
    win_min = 63;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    win_min = v0; nv0 = n_verd; lowest = v0;
    checks++;
    if (freq_lock) begin failures++; $display("freq_lock not cleared by start"); end
    while (!freq_lock) begin
      @(negedge clk);
      if (int'(vbb) < lowest) lowest = int'(vbb);
    end
    if (v0 >= boundary) begin
      exp_v = (boundary < 0) ? 0 : boundary;
      exp_lim = 0;
      used = (boundary > 0) ? v0 - boundary + 2 : v0 + 1;
    end else begin
      exp_v = (boundary > 40) ? 40 : boundary;
      exp_lim = (boundary > 40);
      used = exp_v - v0 + 1;
    end
    if (exp_lim) n_limit++;
    checks++;
    if (int'(vbb) != exp_v || at_fbb_limit !== exp_lim) begin
      failures++;
      $display("start %0d boundary %0d: locked at %0d (limit %b), expected %0d (limit %b)",
               v0, boundary, vbb, at_fbb_limit, exp_v, exp_lim);
    end
    checks++;
    if (v0 >= boundary && lowest < boundary - 1 && lowest != 0) begin
      failures++; $display("went down to %0d with boundary %0d", lowest, boundary);
    end
    // each used verdict is preceded by one skipped verdict
    checks++;
    if (n_verd - nv0 != 2 * used) begin
      failures++;
      $display("start %0d boundary %0d: took %0d verdicts, expected %0d", v0, boundary, n_verd - nv0, 2 * used);
    end
    checks++;
    if (busy) begin failures++; $display("busy after lock"); end
    repeat (30) @(negedge clk);
    checks++;
    if (int'(vbb) != exp_v || !freq_lock) begin failures++; $display("moved after lock"); end
  endtask

  initial begin
    load_val = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (vbb != 6'd20) begin failures++; $display("reset value is not zero body bias"); end
    run(20, 10, 1);     // RBB search from ZBB to code 10, as in the measured ABB trace
    run(0, 17, 0);      // supply lowered: FBB search from the locked code
    run(0, 45, 0);      // boundary beyond the forward-bias limit
    run(3, -5, 1);      // boundary below the reverse-bias end
    for (int i = 0; i < 20; i++) run($urandom_range(40, 0), $urandom_range(42, 0), 1);
    checks++;
    if (n_dec == 0 || n_inc == 0 || n_limit == 0) begin failures++; $display("case missing"); end
    $display("decrements=%0d increments=%0d limit-stops=%0d", n_dec, n_inc, n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
