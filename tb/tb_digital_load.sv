// tb_digital_load: drives random vectors into the 12-unit load chip and
// checks that the output advances by 12*X*Y modulo 2**16 every clk_mac edge,
// i.e. that all twelve units accumulate and reach the output pin.
module tb_digital_load;
  localparam int N = 12;
  logic clk_mac = 1'b0;
  logic [7:0] x_in, y_in;
  logic [15:0] p_mac, model;
  int checks = 0, failures = 0;

  digital_load dut (.clk_mac, .x_in, .y_in, .p_mac);

  always #5 clk_mac = ~clk_mac;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x_in = '0; y_in = '0;
    @(negedge clk_mac);
    model = p_mac;
    for (int i = 0; i < 400; i++) begin
      x_in = 8'($urandom); y_in = 8'($urandom);
      @(posedge clk_mac); #1;
      model = model + 16'(N) * 16'(x_in) * 16'(y_in);
      checks++;
      if (p_mac !== model) begin
        failures++;
        $display("mismatch at %0d: p=%h expected %h", i, p_mac, model);
      end
      @(negedge clk_mac);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
