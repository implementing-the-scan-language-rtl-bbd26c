// binary_assoc_matrix: the binary-weight correlation (Willshaw-type)
// memory at the core of the sequencer.
//
// Storage: a tuple (x, y) of binary patterns is stored by OR-ing its outer
// product into the weights, w[i][j] |= y[i] & x[j] (clipped Hebbian rule;
// a weight saturates at its first non-zero contribution). One tuple is
// stored per clock while `learn` is high. `clear` (or reset) sets all
// weights to zero.
//
// Recall: for the input x the activity of output line i is
// z[i] = number of j with w[i][j] & x[j]; the output is y[i] = (z[i] >= THETA).
// With a constant-weight input (|x| ones) and THETA = |x| a stored tuple is
// recalled exactly as long as no cross-talk from other tuples reaches the
// threshold. Recall is combinational from `x`; weights change on the
// clock edge after `learn`.
//
// The storage and recall equations follow the method; the synchronous
// clear, the one-tuple-per-clock learning port and storing weights in
// flip-flops are choices of this design.
module binary_assoc_matrix #(
  parameter int unsigned N_IN  = 20,   // input (sparse) lines
  parameter int unsigned N_OUT = 4,    // output lines
  parameter int unsigned THETA = 2     // recall threshold
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, clears the weights
  input  logic             clear,      // clears the weights
  input  logic             learn,      // store (learn_x, learn_y) this clock
  input  logic [N_IN-1:0]  learn_x,
  input  logic [N_OUT-1:0] learn_y,
  input  logic [N_IN-1:0]  x,          // recall key pattern
  output logic [N_OUT-1:0] y           // recalled pattern
);

  localparam int unsigned ZW = $clog2(N_IN + 1);

  logic [N_OUT-1:0][N_IN-1:0] w;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      w <= '0;
    end else if (learn) begin
      for (int unsigned i = 0; i < N_OUT; i++)
        if (learn_y[i]) w[i] <= w[i] | learn_x;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N_OUT; i++) begin
      logic [ZW-1:0] z;
      z = '0;
      for (int unsigned j = 0; j < N_IN; j++)
        z = z + ZW'(w[i][j] & x[j]);
      y[i] = (32'(z) >= THETA);
    end
  end

endmodule
