// Testbench for prbs_gen: compares the state sequence with an independently
// written model of the polynomial x^32 + x^22 + x^2 + x + 1, checks that the
// state never reaches zero and that the LSB (the swap sign) is balanced.
module tb_prbs_gen;
  logic clk = 0, rst_n = 0;
  logic [31:0] state;
  int checks = 0, failures = 0;

  prbs_gen #(.WIDTH(32), .TAPS(32'h8020_0003), .SEED(32'hDEAD_BEEF)) dut (.clk, .rst_n, .state);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    int ones;
    ones = 0;
    model = 32'hDEAD_BEEF;
    repeat (2) @(posedge clk);
    checks++; if (state !== model) begin failures++; $display("reset state %h", state); end
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk); #1;
      model = {model[30:0], model[31] ^ model[21] ^ model[1] ^ model[0]};
      checks++;
      if (state !== model || state == 0) begin
        failures++;
        if (failures < 5) $display("cycle %0d state %h expected %h", i, state, model);
      end
      ones += int'(state[0]);
    end
    checks++;
    if (ones < 9600 || ones > 10400) begin failures++; $display("unbalanced LSB: %0d ones", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
