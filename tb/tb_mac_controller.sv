// tb_mac_controller: connects the MAC controller to two behavioural load
// chips (accumulators advancing by 12*X*Y per clk_mac edge) and injects
// timing errors window by window: none, every vector of the auxiliary chip,
// one vector of the main chip, or one vector of each. Checks Pass/Pass_aux
// at each verdict against what was injected, the verdict period of
// N_VEC clk_mac periods, vectors that never change at a rising clk_mac edge,
// and that the PRBS vectors take many different values.
module tb_mac_controller;
  localparam int NV = 16, HALF = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clk_mac, pass, pass_aux, verdict;
  logic [7:0] x_in, y_in;
  logic [15:0] acc_main, acc_aux;
  int checks = 0, failures = 0;
  int edge_no = 0, bad_edge_main = -1, bad_edge_aux = -1, aux_all = 0;
  int exp_pass = 1, exp_aux = 1, nverd = 0, last_verd = -1, cyc = 0;
  int n_fail_main = 0, n_fail_aux = 0;
  bit seen [256];

  mac_controller #(.N_VEC(NV), .MAC_HALF(HALF)) dut (
    .clk, .rst_n, .clk_mac, .x_in, .y_in, .p_mac(acc_main), .p_mac_aux(acc_aux),
    .pass, .pass_aux, .verdict);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // behavioural load chips with error injection
  always @(posedge clk_mac) begin
    logic [15:0] inc;
    inc = 16'(12) * 16'(x_in) * 16'(y_in);
    edge_no <= edge_no + 1;
    acc_main <= acc_main + inc + ((edge_no == bad_edge_main) ? 16'd1 : 16'd0);
    acc_aux  <= acc_aux  + inc + ((aux_all != 0 || edge_no == bad_edge_aux) ? 16'd3 : 16'd0);
    seen[x_in] = 1'b1;
  end

  // vectors may only change together with a falling clk_mac
  logic [7:0] x_q;
  logic       cm_q;
  always @(negedge clk) begin
    if (rst_n && x_in != x_q) begin
      checks++;
      if (!(cm_q && !clk_mac)) begin failures++; $display("X changed away from a falling clk_mac"); end
    end
    x_q = x_in; cm_q = clk_mac;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_main = 16'h1234; acc_aux = 16'hBEEF;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (nverd < 60) begin
      @(negedge clk);
      if (verdict) begin
        int mode;
        nverd++;
        if (nverd > 1) begin
          checks++;
          if (pass !== 1'(exp_pass) || pass_aux !== 1'(exp_aux)) begin
            failures++;
            $display("verdict %0d: pass=%b aux=%b expected %0d %0d", nverd, pass, pass_aux, exp_pass, exp_aux);
          end
          checks++;
          if (cyc - last_verd != NV * 2 * HALF) begin
            failures++; $display("verdict period %0d clocks", cyc - last_verd);
          end
        end else begin
          checks++;
          if (!pass || !pass_aux) begin failures++; $display("first window failed"); end
        end
        if (!pass) n_fail_main++;
        if (!pass_aux) n_fail_aux++;
        last_verd = cyc;
        // plan the next window: its vectors are captured at the next NV edges
        mode = nverd % 4;
        aux_all = 0; bad_edge_main = -1; bad_edge_aux = -1;
        exp_pass = 1; exp_aux = 1;
        if (mode == 1) begin aux_all = 1; exp_aux = 0; end
        if (mode == 2 || mode == 3) begin
          bad_edge_main = edge_no + int'($urandom_range(NV - 2, 1)); exp_pass = 0;
        end
        if (mode == 3) begin
          bad_edge_aux = edge_no + int'($urandom_range(NV - 2, 1)); exp_aux = 0;
        end
        // aux_all must stop before the window after this one
        if (mode == 1) fork begin
          int start_edge;
          start_edge = edge_no;
          while (edge_no < start_edge + NV) @(negedge clk);
          aux_all = 0;
        end join_none
      end
    end
    begin
      automatic int distinct = 0;
      foreach (seen[v]) distinct += int'(seen[v]);
      checks++;
      if (distinct < 200) begin failures++; $display("only %0d distinct X values", distinct); end
    end
    checks++;
    if (n_fail_main == 0 || n_fail_aux == 0) begin failures++; $display("no failure detected"); end
    $display("windows=%0d main-fail=%0d aux-fail=%0d", nverd, n_fail_main, n_fail_aux);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
