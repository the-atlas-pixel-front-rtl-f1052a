// tb_pixel_config: a chain of four pixel configuration cells, as in a column.
// Random 14 bit configurations are written bit plane by bit plane (shift four
// bits in, pulse write with the cell number), then every cell of every pixel is
// checked, and each bit plane is read back through the chain and compared with
// what was written. Finally a shift without write must leave the cells alone.
module tb_pixel_config;
  import fei_pkg::*;
  localparam int NPIX = 4;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       din, shift = 1'b0, write = 1'b0, read = 1'b0;
  logic [3:0] sel = '0;
  logic [NPIX:0] chain;
  pix_cfg_t   cfg [NPIX];
  logic [13:0] want [NPIX];
  int         checks = 0, failures = 0;

  assign chain[0] = din;
  for (genvar k = 0; k < NPIX; k++) begin : g_px
    pixel_config u (.clk, .rst_n, .sr_in(chain[k]), .shift, .write, .read, .sel,
                    .sr_out(chain[k+1]), .cfg(cfg[k]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int k = 0; k < NPIX; k++) want[k] = 14'($urandom);
      for (int b = 0; b < 14; b++) begin
        // last pixel's bit goes in first
        for (int k = NPIX - 1; k >= 0; k--) begin
          @(negedge clk);
          shift = 1'b1; din = want[k][b];
        end
        @(negedge clk);
        shift = 1'b0; write = 1'b1; sel = 4'(b);
        @(negedge clk);
        write = 1'b0;
      end
      for (int k = 0; k < NPIX; k++) begin
        check(14'(cfg[k]) == want[k], $sformatf("pixel %0d cfg %h exp %h", k, cfg[k], want[k]));
        check(cfg[k].mask == want[k][10] && cfg[k].tdac == want[k][4:0] &&
              cfg[k].fdac == want[k][9:5] && cfg[k].inject == want[k][13], "field order");
      end
      for (int b = 0; b < 14; b++) begin
        @(negedge clk);
        read = 1'b1; sel = 4'(b);
        @(negedge clk);
        read = 1'b0;
        for (int k = NPIX - 1; k >= 0; k--) begin
          check(chain[NPIX] == want[k][b], $sformatf("readback pixel %0d bit %0d", k, b));
          shift = 1'b1; din = 1'b0;
          @(negedge clk);
        end
        shift = 1'b0;
      end
      for (int k = 0; k < NPIX; k++)
        check(14'(cfg[k]) == want[k], "cells kept after readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
