// tb_mac_unit: drives random 8-bit vectors into one MAC unit and checks that
// every clock the output grows by exactly X*Y modulo 2**16, with the expected
// value kept by the test bench from the first observed output.
module tb_mac_unit;
  logic clk = 1'b0;
  logic [7:0] x, y;
  logic [15:0] p, model;
  int checks = 0, failures = 0;

  mac_unit dut (.clk, .x, .y, .p);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 8'd0; y = 8'd0;
    @(negedge clk);
    model = p;                       // accumulator has no reset
    for (int i = 0; i < 500; i++) begin
      x = 8'($urandom); y = 8'($urandom);
      if (i == 10) begin x = 8'hFF; y = 8'hFF; end
      @(posedge clk); #1;
      model = model + 16'(x) * 16'(y);
      checks++;
      if (p !== model) begin
        failures++;
        $display("mismatch at %0d: p=%h expected %h", i, p, model);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
