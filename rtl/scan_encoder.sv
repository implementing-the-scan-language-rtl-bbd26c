// scan_encoder: SCAN pixel-address sequencer for a picture scrambled by a
// SCAN pyramid L1 a1 # L2 a2 # ... # LN aN (default B2#A4#X2: 16x16 pixels).
//
// One stage per pyramid level. Each stage is a feedback binary associative
// memory (seq_assoc_memory) that replays the scan order of its level, one
// pel index per step, and a divide-by-n stage (level_divider, n = a*a)
// that counts those steps. The innermost (last) level steps on every
// pixel-clock enable; each divider's end-of-loop pulse restarts its own
// memory at index 0, activates that level's next scan-pattern number
// (key_select) and steps the level above - the nested loops of the
// sequential algorithm, unrolled into hardware. The index fields of all
// levels are regrouped into the scrambled pixel address
// scan_addr = {rows of all levels, columns of all levels}, that is
// row * side + col with side = A[0]*...*A[NLEVELS-1]. The divider
// counts, regrouped the same way, give raster_addr: the address of the
// same pixel in the level-by-level raster order. To encrypt, read the
// original picture at scan_addr and write it at raster_addr (or send it
// in that order); to decrypt, swap the two.
//
// Interface and timing:
//   pix_en        one pixel step; scan_addr/raster_addr belong to the pixel
//                 of the current cycle and advance on the clock edge.
//   scan_row/col, raster_row/col  the two coordinates of each address.
//   level_done[l] high during the last step of a loop of level l;
//                 frame_done = level_done[0] marks the last pixel.
//   next_key[l]   scan-pattern number to use from the next loop of level l.
//   learn/clear   load the memories: learn stores, in level learn_level,
//                 the association (learn_key, learn_state) -> learn_next;
//                 clear erases that level's weights. The sequencer holds
//                 while either is high. Index values use the low
//                 2*log2(A[l]) bits of learn_state/learn_next.
// One pixel address per clock, as the method requires. The learning port,
// the raster address output and the key count are this design's choices;
// the stage structure, divider chain and address layout follow the method.
module scan_encoder #(
  parameter int unsigned NLEVELS     = 3,
  parameter int unsigned A [NLEVELS] = '{2, 4, 2},
  parameter int unsigned N_KEYS      = 4,
  localparam int unsigned KW         = scan_pkg::code_bits(N_KEYS),
  localparam int unsigned LW         = scan_pkg::code_bits(NLEVELS),
  localparam int unsigned CB         = cb_total(),   // bits of a row / column
  localparam int unsigned AW         = 2 * CB,       // bits of a pixel address
  localparam int unsigned SWM        = sw_max()      // widest level index
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       pix_en,
  input  logic [NLEVELS-1:0][KW-1:0] next_key,
  output logic [NLEVELS-1:0][KW-1:0] active_key,
  input  logic                       learn,
  input  logic                       clear,
  input  logic [LW-1:0]              learn_level,
  input  logic [KW-1:0]              learn_key,
  input  logic [SWM-1:0]             learn_state,
  input  logic [SWM-1:0]             learn_next,
  output logic [AW-1:0]              scan_addr,
  output logic [CB-1:0]              scan_row,
  output logic [CB-1:0]              scan_col,
  output logic [AW-1:0]              raster_addr,
  output logic [CB-1:0]              raster_row,
  output logic [CB-1:0]              raster_col,
  output logic [NLEVELS-1:0]         level_done,
  output logic                       frame_done
);

  function automatic int unsigned cb_total();
    int unsigned s = 0;
    for (int l = 0; l < NLEVELS; l++) s += scan_pkg::coord_bits(A[l]);
    return s;
  endfunction

  function automatic int unsigned cb_below(int l);
    int unsigned s = 0;
    for (int k = l + 1; k < NLEVELS; k++) s += scan_pkg::coord_bits(A[k]);
    return s;
  endfunction

  function automatic int unsigned sw_max();
    int unsigned s = 1;
    for (int l = 0; l < NLEVELS; l++)
      if (scan_pkg::index_bits(A[l]) > s) s = scan_pkg::index_bits(A[l]);
    return s;
  endfunction

  logic               step_en;
  logic [NLEVELS-1:0] en;

  assign step_en = pix_en && !learn && !clear;

  for (genvar l = 0; l < NLEVELS; l++) begin : g_level
    localparam int unsigned LB  = scan_pkg::coord_bits(A[l]);
    localparam int unsigned SB  = 2 * LB;
    localparam int unsigned OFS = cb_below(l);

    logic          sel;
    logic [SB-1:0] state;
    logic [SB-1:0] count;

    // The innermost level follows the pixel clock; every other level is
    // stepped by the end-of-loop pulse of the level below it.
    if (l == NLEVELS - 1) begin : g_inner
      assign en[l] = step_en;
    end else begin : g_outer
      assign en[l] = level_done[l+1];
    end

    assign sel = (learn_level == LW'(l));

    level_divider #(.N(A[l] * A[l])) u_div (
      .clk   (clk),
      .rst   (rst),
      .en    (en[l]),
      .count (count),
      .done  (level_done[l])
    );

    key_select #(.KW(KW)) u_key (
      .clk        (clk),
      .rst        (rst),
      .load       (level_done[l]),
      .next_key   (next_key[l]),
      .active_key (active_key[l])
    );

    seq_assoc_memory #(
      .N_KEYS     (N_KEYS),
      .STATE_BITS (SB)
    ) u_mem (
      .clk         (clk),
      .rst         (rst),
      .step        (en[l]),
      .restart     (level_done[l]),
      .key         (active_key[l]),
      .state       (state),
      .clear       (clear && sel),
      .learn       (learn && sel),
      .learn_key   (learn_key),
      .learn_state (learn_state[SB-1:0]),
      .learn_next  (learn_next[SB-1:0])
    );

    // Address regrouping: a level index is row*a + col, so its high half
    // is the level's row field and its low half the column field. Each
    // goes to its place in the pixel row / column, coarse levels highest.
    assign scan_row[OFS +: LB]   = state[LB +: LB];
    assign scan_col[OFS +: LB]   = state[0  +: LB];
    assign raster_row[OFS +: LB] = count[LB +: LB];
    assign raster_col[OFS +: LB] = count[0  +: LB];
  end

  assign frame_done  = level_done[0];
  assign scan_addr   = {scan_row, scan_col};
  assign raster_addr = {raster_row, raster_col};

endmodule
