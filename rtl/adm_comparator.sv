// adm_comparator: the ">B-threshold" comparator of the AdmL1D unit.
//
// The R-to-A ratio arrives as a truncated fixed-point quotient (FRAC_BITS
// fraction bits) plus a flag saying whether the division left a remainder.
// The ratio is greater than the integer threshold when the quotient is above
// the threshold, or equal to it with a non-zero remainder; this makes the test
// exact for any fraction width. gt = 1 means the workload is classified as
// Type-N and the L1D is to be bypassed. Purely combinational.
// The threshold value 3 and the strict "greater than" follow the original proposal.
module adm_comparator #(
  parameter int unsigned QW          = 40,
  parameter int unsigned FRAC_BITS   = 8,
  parameter int unsigned B_THRESHOLD = 3
) (
  input  logic [QW-1:0] ratio,   // fixed point, FRAC_BITS fraction bits
  input  logic          rem_nz,  // true ratio is above 'ratio'
  output logic          gt       // ratio > B_THRESHOLD
);

  localparam logic [QW-1:0] B_FIXED = QW'(B_THRESHOLD) << FRAC_BITS;

  always_comb begin
    gt = (ratio > B_FIXED) || ((ratio == B_FIXED) && rem_nz);
  end

endmodule
