// level_divider: the divide-by-n stage of one SCAN level. It counts the
// steps of its level (clock enable `en`) modulo N and raises `done` for
// the step that finishes the level's loop, i.e. while count == N-1 and en
// is high. `done` is the pulse that restarts this level's memory,
// activates its next key and advances the level above. `count` is the
// level's step number in plain raster order (the loop variable of the
// sequential algorithm). Reset clears the count. The counter form and
// synchronous reset are this design's choices.
module level_divider #(
  parameter int unsigned N  = 4,
  localparam int unsigned CW = scan_pkg::code_bits(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic [CW-1:0] count,
  output logic          done
);

  assign done = en && (count == CW'(N - 1));

  always_ff @(posedge clk) begin
    if (rst || done)
      count <= '0;
    else if (en)
      count <= count + 1'b1;
  end

endmodule
