// sparse_encoder: turns a pattern of DIGITS dense digits, each DIGIT_BITS
// wide (a number 0..d-1 with d = 2**DIGIT_BITS), into DIGITS ones on
// DIGITS*d lines: one 1-out-of-d encoder per digit. Digit k occupies bits
// [k*DIGIT_BITS +: DIGIT_BITS] of `dense` and lines [k*d +: d] of
// `sparse`. Every input pattern therefore has exactly DIGITS ones, which
// lets the associative memory use a constant threshold. Combinational.
// The digit-to-line-group coding follows the method; the order of the
// digits and building it from one encoder per digit are this design's.
module sparse_encoder #(
  parameter int unsigned DIGITS     = 1,
  parameter int unsigned DIGIT_BITS = 4,
  localparam int unsigned D         = 1 << DIGIT_BITS
) (
  input  logic [DIGITS*DIGIT_BITS-1:0] dense,
  output logic [DIGITS*D-1:0]          sparse
);

  for (genvar k = 0; k < DIGITS; k++) begin : g_digit
    onehot_encoder #(.D(D), .CW(DIGIT_BITS)) u_enc (
      .code  (dense[k*DIGIT_BITS +: DIGIT_BITS]),
      .lines (sparse[k*D +: D])
    );
  end

endmodule
