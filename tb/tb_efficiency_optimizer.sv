// tb_efficiency_optimizer: sweeps the current reference over its whole range
// and checks segment count, gate-swing code and PFM against a table of the
// load regions written out here (>=200: 3 segments; 100..199: 2 segments;
// 50..99: 1 segment, full swing; 15..49: 1 segment, swing 1..6 rising with
// current; <15: PFM). Also checks that nothing changes while `en` is low or
// without a tick, and that reset selects all segments at full swing in PWM.
module tb_efficiency_optimizer;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, tick = 1'b0;
  logic [9:0] i_c;
  logic [2:0] seg_sl, gssc_sl;
  logic pfm;
  int checks = 0, failures = 0;
  int n_pfm = 0, n_seg1 = 0, n_seg2 = 0, n_seg3 = 0, n_swing = 0;

  efficiency_optimizer dut (.clk, .rst_n, .en, .tick, .i_c, .seg_sl, .gssc_sl, .pfm);

  always #5 clk = ~clk;

  function automatic void expected(int i, output logic [2:0] s, output logic [2:0] g,
                                   output logic f);
    f = (i < 15);
    s = (i >= 200) ? 3'b111 : (i >= 100) ? 3'b011 : 3'b001;
    if (i >= 15 && i < 50) begin
      // six equal-width steps of the 15..50 band: 15,20,26,32,38,44
      int lvl;
      lvl = 1;
      if (i >= 20) lvl = 2;
      if (i >= 26) lvl = 3;
      if (i >= 32) lvl = 4;
      if (i >= 38) lvl = 5;
      if (i >= 44) lvl = 6;
      g = 3'(lvl);
    end else g = 3'd7;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] es, eg; logic ef;
    logic [2:0] hs, hg; logic hf;
    i_c = '0;
    repeat (3) @(posedge clk);
    checks++;
    if (seg_sl !== 3'b111 || gssc_sl !== 3'd7 || pfm !== 1'b0) begin
      failures++; $display("reset state wrong");
    end
    #1 rst_n = 1'b1;
    en = 1'b1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); i_c = 10'(i); tick = 1'b1;
      @(negedge clk); tick = 1'b0;
      expected(i, es, eg, ef);
      checks++;
      if (seg_sl !== es || gssc_sl !== eg || pfm !== ef) begin
        failures++;
        $display("i_c=%0d: seg=%b gssc=%0d pfm=%b expected %b %0d %b", i, seg_sl, gssc_sl, pfm, es, eg, ef);
      end
      if (pfm) n_pfm++;
      if (seg_sl == 3'b001 && !pfm) n_seg1++;
      if (seg_sl == 3'b011) n_seg2++;
      if (seg_sl == 3'b111) n_seg3++;
      if (gssc_sl != 3'd7) n_swing++;
      // without a tick the setting holds
      i_c = 10'($urandom);
      @(negedge clk);
      checks++;
      if (seg_sl !== es || gssc_sl !== eg || pfm !== ef) begin
        failures++; $display("changed without tick");
      end
    end
    // disabled: holds whatever the current
    hs = seg_sl; hg = gssc_sl; hf = pfm;
    en = 1'b0;
    for (int k = 0; k < 50; k++) begin
      @(negedge clk); i_c = 10'($urandom_range(30, 0)); tick = 1'b1;
      @(negedge clk); tick = 1'b0;
      checks++;
      if (seg_sl !== hs || gssc_sl !== hg || pfm !== hf) begin
        failures++; $display("changed while disabled");
      end
    end
    checks++;
    if (n_pfm == 0 || n_seg1 == 0 || n_seg2 == 0 || n_seg3 == 0 || n_swing == 0) begin
      failures++; $display("a region was never reached");
    end
    $display("regions: pfm=%0d seg1=%0d seg2=%0d seg3=%0d swing-scaled=%0d", n_pfm, n_seg1, n_seg2, n_seg3, n_swing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
