// Testbench for delay_line: random words go in, the output must equal the
// word given DEPTH clocks earlier (zero during the first DEPTH clocks after
// reset); a DEPTH = 0 instance must pass its input straight through.
module tb_delay_line;
  logic clk = 0, rst_n = 0;
  logic [7:0] d, q4, q0;
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  delay_line #(.WIDTH(8), .DEPTH(4)) dut4 (.clk, .rst_n, .d, .q(q4));
  delay_line #(.WIDTH(8), .DEPTH(0)) dut0 (.clk, .rst_n, .d, .q(q0));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    repeat (4) hist.push_back(8'h00);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d = 8'($urandom);
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("depth 0: %h vs %h", q0, d); end
      checks++;
      if (q4 !== hist[0]) begin failures++; $display("depth 4 cycle %0d: %h expected %h", i, q4, hist[0]); end
      @(posedge clk);
      void'(hist.pop_front());
      hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
