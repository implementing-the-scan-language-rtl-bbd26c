// onehot_encoder: 1-out-of-D encoder. A code number c in 0..D-1 on `code`
// drives exactly one '1', on line c of `lines`; a code number >= D drives
// no line. This is the encoder that turns a dense digit into the sparse,
// constant-weight input pattern the binary associative memory needs.
// Purely combinational. The behaviour for out-of-range codes is a choice
// of this design (the encoder is only specified for 0..D-1).
module onehot_encoder #(
  parameter int unsigned D  = 4,                       // number of output lines
  parameter int unsigned CW = scan_pkg::code_bits(D)   // width of the code number
) (
  input  logic [CW-1:0] code,
  output logic [D-1:0]  lines
);

  always_comb begin
    lines = '0;
    for (int unsigned i = 0; i < D; i++)
      lines[i] = (code == CW'(i));
  end

endmodule
