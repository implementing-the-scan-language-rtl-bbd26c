// tb_scan_b2r2: the two-level B2#R2 example on a 4x4 picture. With B2
// (0,1,3,2) stored in level 1 and raster order in level 2, the sequencer
// must emit the pixel indices 0,1,4,5, 2,3,6,7, 10,11,14,15, 8,9,12,13,
// one per pixel clock, and repeat them in the next frame; frame_done
// must mark every 16th pixel.
module tb_scan_b2r2;
  import scan_tb_pkg::*;

  localparam int unsigned SIDES [2] = '{2, 2};
  int checks = 0, failures = 0;

  logic clk = 0, rst, pix_en, learn, clear;
  logic [1:0][0:0] next_key, active_key;
  logic [0:0] learn_level, learn_key;
  logic [1:0] learn_state, learn_next;
  logic [3:0] scan_addr, raster_addr;
  logic [1:0] scan_row, scan_col, raster_row, raster_col;
  logic [1:0] level_done;
  logic frame_done;

  scan_encoder #(.NLEVELS(2), .A(SIDES), .N_KEYS(2)) dut (.*);

  always #5 clk = ~clk;

  int unsigned table_b2r2 [16] = '{0, 1, 4, 5, 2, 3, 6, 7, 10, 11, 14, 15, 8, 9, 12, 13};

  task automatic load_level(int l, order_t o);
    foreach (o[t]) begin
      learn = 1; learn_level = 1'(l); learn_key = 1'b0;
      learn_state = 2'(o[t]);
      learn_next  = 2'(o[(t + 1) % o.size()]);
      @(posedge clk); #1;
    end
    learn = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pix_en = 0; learn = 0; clear = 0; next_key = '0;
    learn_level = 0; learn_key = 0; learn_state = 0; learn_next = 0;
    @(posedge clk); #1;
    rst = 0;
    load_level(0, order_b2());
    load_level(1, order_r(2));
    pix_en = 1;
    for (int p = 0; p < 32; p++) begin
      checks += 2;
      if (scan_addr !== 4'(table_b2r2[p % 16])) begin
        failures++;
        $display("FAIL step %0d scan_addr=%0d exp=%0d", p, scan_addr, table_b2r2[p % 16]);
      end
      if (frame_done !== (p % 16 == 15)) failures++;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
