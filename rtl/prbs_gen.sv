// Pseudorandom source for the capacitor-swap control of one pipeline stage.
//
// A Fibonacci linear-feedback shift register: every clock the state shifts
// left by one and the new LSB is the XOR of the state bits selected by TAPS.
// With a primitive polynomial the state walks through all 2^WIDTH - 1 nonzero
// values, so its LSB is a balanced bit stream (the +1/-1 swap sign N, which the
// calibration needs to have zero mean) and the whole state can be reduced to a
// uniformly distributed capacitor index.  The default polynomial
// x^32 + x^22 + x^2 + x + 1 is this design's choice; several stages obtain
// uncorrelated streams by using different seeds.
//
// Interface: state is registered; it is SEED after the asynchronous active-low
// reset and advances on every rising clock edge.  SEED must be nonzero.
module prbs_gen #(
  parameter int unsigned      WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS  = 32'h8020_0003,  // bits 31, 21, 1, 0
  parameter logic [WIDTH-1:0] SEED  = 32'h0000_0001
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] state
);

  logic feedback;
  assign feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= SEED;
    else        state <= {state[WIDTH-2:0], feedback};
  end

  initial assert (SEED != '0) else $error("prbs_gen: SEED must be nonzero");

endmodule
