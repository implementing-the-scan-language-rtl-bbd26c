// tb_scan_1m: one full frame of a 1024x1024 picture (2**20 pixel
// addresses, one per clock) through a four-level pyramid A4#A8#X2#R16.
// Every address is compared with the nested-loop algorithm, the 2**20
// scan addresses must form a permutation of the picture, and frame_done
// must come on exactly the 2**20-th pixel clock.
module tb_scan_1m;
  import scan_tb_pkg::*;

  localparam int NL = 4;
  localparam int unsigned SIDES [NL] = '{4, 8, 2, 16};
  localparam int NPIX = 1 << 20;
  int checks = 0, failures = 0;

  logic clk = 0, rst, pix_en, learn, clear;
  logic [NL-1:0][1:0] next_key, active_key;
  logic [1:0] learn_level, learn_key;
  logic [7:0] learn_state, learn_next;
  logic [19:0] scan_addr, raster_addr;
  logic [9:0] scan_row, scan_col, raster_row, raster_col;
  logic [NL-1:0] level_done;
  logic frame_done;

  scan_encoder #(.NLEVELS(NL), .A(SIDES), .N_KEYS(4)) dut (.*);

  always #5 clk = ~clk;

  order_t ord [NL];
  bit seen [NPIX];

  task automatic load_level(int l, order_t o);
    foreach (o[t]) begin
      learn = 1; learn_level = 2'(l); learn_key = 2'd0;
      learn_state = 8'(o[t]);
      learn_next  = 8'(o[(t + 1) % o.size()]);
      @(posedge clk); #1;
    end
    learn = 0;
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int unsigned a [$] = '{4, 8, 2, 16};
    automatic int errs = 0, dups = 0, frames = 0;
    ord[0] = order_a(4);
    ord[1] = order_a(8);
    ord[2] = order_x2();
    ord[3] = order_r(16);
    rst = 1; pix_en = 0; learn = 0; clear = 0; next_key = '0;
    learn_level = 0; learn_key = 0; learn_state = 0; learn_next = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int l = 0; l < NL; l++) load_level(l, ord[l]);
    pix_en = 1;
    for (int p = 0; p < NPIX; p++) begin
      automatic int unsigned l0 = p / (64 * 4 * 256), l1 = (p / (4 * 256)) % 64, l2 = (p / 256) % 4, l3 = p % 256;
      automatic int unsigned es = pixel_index(a, '{ord[0][l0], ord[1][l1], ord[2][l2], ord[3][l3]});
      checks += 2;
      if (scan_addr !== 20'(es)) begin
        errs++;
        failures++;
        if (errs < 10) $display("FAIL p=%0d scan_addr=%0d exp=%0d", p, scan_addr, es);
      end
      if (seen[scan_addr]) dups++;
      seen[scan_addr] = 1'b1;
      if (frame_done !== (p == NPIX - 1)) begin
        errs++;
        failures++;
      end
      if (frame_done) frames++;
      @(posedge clk); #1;
    end
    checks += 2;
    if (dups != 0) failures++;
    if (frames != 1) failures++;
    $display("pixels=%0d address errors=%0d duplicates=%0d frames=%0d", NPIX, errs, dups, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
