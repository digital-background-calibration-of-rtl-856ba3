// Fixed-length shift register used to time-align pipeline-stage data.
//
// In a pipelined ADC the digits of one sample leave stage k one clock after
// they leave stage k-1.  Delaying stage k by (number of stages - k) clocks
// brings all digits of a sample, and the swap controls used on it, together.
// DEPTH registers of WIDTH bits; q is d delayed by DEPTH clocks.  DEPTH = 0
// gives a wire.  All registers clear to zero on the asynchronous active-low
// reset.  The alignment scheme is this design's choice.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_shift
    logic [WIDTH-1:0] taps [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < DEPTH; i++) taps[i] <= '0;
      end else begin
        taps[0] <= d;
        for (int unsigned i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
      end
    end
    assign q = taps[DEPTH-1];
  end

endmodule
