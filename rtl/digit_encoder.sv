// Digit encoder of an (m+1)-bit sub-ADC with one bit of redundancy.
//
// The sub-ADC has 2K = 2^(m+1) - 2 comparators with thresholds at the odd
// multiples of Vref/2^(m+1); therm[j] is the output of the j-th comparator
// counted from the most negative threshold.  The encoder forms K = 2^m - 1
// ternary digits whose sum is the stage's decision D.  Digit D_1 comes from the
// two centre comparators, so it is zero only for inputs within
// +-Vref/2^(m+1); digit D_i comes from the i-th comparator pair counted
// outward:  D_i = therm[K-1+i] - !therm[K-i].  That D_1 is the centre digit
// follows the calibration scheme; the pairing of the outer digits is this
// design's choice.  Purely combinational.
module digit_encoder
  import adc_cal_pkg::*;
#(
  parameter int unsigned M = 2,
  localparam int unsigned K = (1 << M) - 1
) (
  input  logic [2*K-1:0] therm,
  output digit_t         d [K]
);

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      // zero-based digit i is D_(i+1); its pair is therm[K+i] / therm[K-1-i]
      d[i] = digit_t'({1'b0, therm[K+i]}) - digit_t'({1'b0, !therm[K-1-i]});
    end
  end

endmodule
