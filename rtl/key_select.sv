// key_select: holds the active scan-pattern number (key) of one level,
// the pattern register that sits in front of each level memory. A new
// number presented on `next_key` becomes active on the clock edge at which
// the level's divider pulses (`load`), so a key change always takes effect
// at the start of a full loop of that level and never in the middle of
// it. Reset copies `next_key` directly. Timing: active_key changes one
// clock after the loop's last step, together with the memory restart.
// Activating the pattern number with the divider pulse follows the
// method; holding it in a plain register, and the reset load, are this
// design's choices.
module key_select #(
  parameter int unsigned KW = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [KW-1:0] next_key,
  output logic [KW-1:0] active_key
);

  always_ff @(posedge clk) begin
    if (rst || load)
      active_key <= next_key;
  end

endmodule
