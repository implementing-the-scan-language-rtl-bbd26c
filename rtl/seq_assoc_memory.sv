// seq_assoc_memory: a sequence generator built from a feedback binary
// associative memory (one stage of the SCAN sequencer).
//
// The input pattern is x = (key, y(t)): the key number goes through a
// 1-out-of-N_KEYS encoder, the fed-back output y(t) is split into DIGITS
// digits of DIGIT_BITS bits and each digit goes through a 1-out-of-d
// encoder, so x always has 1 + DIGITS ones and the threshold is that
// count. The recalled pattern y(t+1) is registered on each clock with
// `step` high and fed back. Storing the tuples (key + y(t), y(t+1)) for a
// cyclic order that starts at index 0 makes the memory replay that order:
// the last index stores nothing (an all-zero target adds no weights),
// recalls 0 and so closes the cycle at y(0) = 0.
//
// Interface and timing:
//   state       registered current index y(t); 0 after reset.
//   step        advance y(t) -> recalled y(t+1) on the next clock edge.
//   restart     load y = 0 instead (takes priority over step).
//   learn       store (learn_key + learn_state, learn_next) on this edge; the
//               encoders then see the learning pattern, so `step` is
//               ignored in that cycle (the state holds).
//   clear       erase all weights.
// Recall is one clock per index, as in the method. The learning port,
// restart, the key-count default and the digit split are this design's
// choices; with one digit (the default) the state code is 1-out-of-2**STATE_BITS.
module seq_assoc_memory #(
  parameter int unsigned N_KEYS     = 4,
  parameter int unsigned STATE_BITS = 4,
  parameter int unsigned DIGIT_BITS = STATE_BITS,
  localparam int unsigned KW        = scan_pkg::code_bits(N_KEYS),
  localparam int unsigned DIGITS    = STATE_BITS / DIGIT_BITS,
  localparam int unsigned N_IN      = N_KEYS + DIGITS * (1 << DIGIT_BITS)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  step,
  input  logic                  restart,
  input  logic [KW-1:0]         key,
  output logic [STATE_BITS-1:0] state,
  input  logic                  clear,
  input  logic                  learn,
  input  logic [KW-1:0]         learn_key,
  input  logic [STATE_BITS-1:0] learn_state,
  input  logic [STATE_BITS-1:0] learn_next
);

  initial begin
    assert (DIGITS * DIGIT_BITS == STATE_BITS)
      else $error("DIGIT_BITS must divide STATE_BITS");
  end

  logic [KW-1:0]         enc_key;
  logic [STATE_BITS-1:0] enc_state;
  logic [N_KEYS-1:0]     key_lines;
  logic [N_IN-N_KEYS-1:0] state_lines;
  logic [N_IN-1:0]       x;
  logic [STATE_BITS-1:0] recalled;

  // One set of encoders serves recall and learning.
  assign enc_key   = learn ? learn_key   : key;
  assign enc_state = learn ? learn_state : state;

  onehot_encoder #(.D(N_KEYS), .CW(KW)) u_key_enc (
    .code  (enc_key),
    .lines (key_lines)
  );

  sparse_encoder #(.DIGITS(DIGITS), .DIGIT_BITS(DIGIT_BITS)) u_state_enc (
    .dense  (enc_state),
    .sparse (state_lines)
  );

  assign x = {state_lines, key_lines};

  binary_assoc_matrix #(
    .N_IN  (N_IN),
    .N_OUT (STATE_BITS),
    .THETA (1 + DIGITS)
  ) u_mem (
    .clk     (clk),
    .rst     (rst),
    .clear   (clear),
    .learn   (learn),
    .learn_x (x),
    .learn_y (learn_next),
    .x       (x),
    .y       (recalled)
  );

  // Output register with feedback.
  always_ff @(posedge clk) begin
    if (rst || restart)
      state <= '0;
    else if (step && !learn)
      state <= recalled;
  end

endmodule
