// tb_scan_encoder: end-to-end test of the SCAN address sequencer at its
// default size, the B2#A4#X2 pyramid of a 16x16 picture.
//  - The three level memories are loaded through the learning port with
//    the orders B2 (0,1,3,2), A4 and X2 (0,3,1,2) under key 0.
//  - Frame 1 encrypts a random picture: new[raster_addr] = old[scan_addr].
//  - Frame 2 decrypts it: dec[scan_addr] = new[raster_addr]; dec must equal
//    the original and the encrypted picture must differ from it.
//  - During the last level-3 loop of frame 2 the next key of level 3 is set
//    to 1. Between frames level 3 is cleared and the raster order R2 is
//    stored under key 1. Frame 3 must follow B2#A4#R2.
// Every enabled cycle compares scan_addr and raster_addr with the nested-
// loop algorithm (scan_tb_pkg::pixel_index) and level_done/frame_done with
// the loop counters. Random pixel-enable gaps and one learning cycle in
// mid-frame must hold the sequence. A frame must take exactly 256 pixel
// steps. Each mechanism (stall, hold during learning, end of loop of each
// level, frame end, key activation, reload between frames) is counted and
// must occur at least once.
module tb_scan_encoder;
  import scan_tb_pkg::*;

  localparam int NL = 3;
  localparam int AW = 8;

  int checks = 0, failures = 0;
  int n_stall = 0, n_learn_hold = 0, n_frame = 0, n_keyact = 0, n_reload = 0;
  int n_done [NL] = '{0, 0, 0};

  logic clk = 0, rst, pix_en, learn, clear;
  logic [NL-1:0][1:0] next_key, active_key;
  logic [1:0] learn_level, learn_key;
  logic [3:0] learn_state, learn_next;
  logic [AW-1:0] scan_addr, raster_addr;
  logic [3:0] scan_row, scan_col, raster_row, raster_col;
  logic [NL-1:0] level_done;
  logic frame_done;

  scan_encoder dut (.*);

  always #5 clk = ~clk;

  int unsigned sides [$] = '{2, 4, 2};
  order_t ord [NL];
  logic [7:0] oldpic [256], newpic [256], decpic [256];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic load_level(int l, order_t o, logic [1:0] k);
    foreach (o[t]) begin
      learn = 1; learn_level = 2'(l); learn_key = k;
      learn_state = 4'(o[t]);
      learn_next  = 4'(o[(t + 1) % o.size()]);
      @(posedge clk); #1;
    end
    learn = 0;
  endtask

  // mode 0: encrypt, 1: decrypt, 2: addresses only
  task automatic run_frame(int mode, bit key_switch);
    int p = 0;
    bit learned_mid = 0;
    while (p < 256) begin
      automatic int unsigned l0 = p / 64, l1 = (p / 4) % 16, l2 = p % 4;
      automatic int unsigned es, er;
      logic [1:0] k_before;
      if (key_switch && p == 252) next_key[2] = 2'd1;
      // occasional stall, and one learning cycle in mid-frame
      if (p == 100 && !learned_mid) begin
        learned_mid = 1;
        learn = 1; learn_level = 2'd1; learn_key = 2'd0;
        learn_state = 4'(ord[1][3]); learn_next = 4'(ord[1][4]);
        pix_en = 1;
        @(posedge clk); #1;
        learn = 0;
        n_learn_hold++;
        continue;
      end
      if ($urandom_range(0, 9) == 0) begin
        pix_en = 0;
        @(posedge clk); #1;
        n_stall++;
        continue;
      end
      pix_en = 1;
      #1;
      es = pixel_index(sides, '{ord[0][l0], ord[1][l1], ord[2][l2]});
      er = pixel_index(sides, '{l0, l1, l2});
      check(scan_addr == AW'(es), $sformatf("scan_addr p=%0d got %0d exp %0d", p, scan_addr, es));
      check(raster_addr == AW'(er), $sformatf("raster_addr p=%0d got %0d exp %0d", p, raster_addr, er));
      check({scan_row, scan_col} == scan_addr, "scan row/col");
      check({raster_row, raster_col} == raster_addr, "raster row/col");
      check(level_done[2] == (l2 == 3), "level_done[2]");
      check(level_done[1] == (l2 == 3 && l1 == 15), "level_done[1]");
      check(level_done[0] == (p == 255), "level_done[0]");
      check(frame_done == (p == 255), "frame_done");
      for (int l = 0; l < NL; l++) if (level_done[l]) n_done[l]++;
      if (frame_done) n_frame++;
      if (mode == 0) newpic[er] = oldpic[es];
      if (mode == 1) decpic[es] = newpic[er];
      k_before = active_key[2];
      @(posedge clk); #1;
      if (active_key[2] != k_before) n_keyact++;
      p++;
    end
    pix_en = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int diff = 0;
    ord[0] = order_b2();
    ord[1] = order_a(4);
    ord[2] = order_x2();
    foreach (oldpic[i]) oldpic[i] = 8'($urandom);
    rst = 1; pix_en = 0; learn = 0; clear = 0; next_key = '0;
    learn_level = 0; learn_key = 0; learn_state = 0; learn_next = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int l = 0; l < NL; l++) load_level(l, ord[l], 2'd0);

    run_frame(0, 0);
    run_frame(1, 1);
    foreach (oldpic[i]) begin
      check(decpic[i] == oldpic[i], $sformatf("round trip pixel %0d", i));
      if (newpic[i] != oldpic[i]) diff++;
    end
    check(diff > 128, "picture scrambled");
    check(active_key[2] == 2'd1, "level-3 key activated at frame end");

    // synchronisation gap: reload level 3 with R2 under key 1
    learn_level = 2'd2; clear = 1;
    @(posedge clk); #1;
    clear = 0;
    load_level(2, order_r(2), 2'd1);
    ord[2] = order_r(2);
    n_reload++;
    run_frame(2, 0);

    check(n_stall > 0, "stall seen");
    check(n_learn_hold > 0, "learning hold seen");
    check(n_done[2] == 3 * 64, "level 3 loop ends");
    check(n_done[1] == 3 * 4, "level 2 loop ends");
    check(n_done[0] == 3, "level 1 loop ends");
    check(n_frame == 3, "frame ends");
    check(n_keyact == 1, "key activations");
    check(n_reload == 1, "reload");
    $display("stalls=%0d learn_holds=%0d done3=%0d done2=%0d done1=%0d frames=%0d key_activations=%0d reloads=%0d",
             n_stall, n_learn_hold, n_done[2], n_done[1], n_done[0], n_frame, n_keyact, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
