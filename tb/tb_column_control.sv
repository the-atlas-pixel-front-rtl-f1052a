// tb_column_control: drives the column control with a fake pixel and fake EoC
// free flags. Checks the transfer slot rate for the three rate settings (20, 10,
// 5 MHz: one slot every 2, 4, 8 clocks), the written hit (row, column, binary
// leading edge, ToT) for random stamps, the time walk correction in both modes,
// the double write needing two free locations, and the sticky overflow warning.
module tb_column_control;
  import fei_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] xfer_rate = 2'd0;
  twc_mode_e  twc_mode = TWC_OFF;
  logic [7:0] twc_cut = '0, sel_le = '0, sel_te = '0;
  logic [8:0] sel_id = '0;
  logic       scan_any = 1'b0, free1 = 1'b1, free2 = 1'b1, ovf_clr = 1'b0;
  logic       clr, wr0, wr1, ovf;
  eoc_hit_t   wr0_hit, wr1_hit;
  int         checks = 0, failures = 0;

  column_control dut (.clk, .rst_n, .xfer_rate, .twc_mode, .twc_cut, .scan_any,
    .sel_le, .sel_te, .sel_id, .free1, .free2, .clr, .wr0, .wr0_hit, .wr1, .wr1_hit,
    .ovf_clr, .ovf);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic logic [7:0] to_gray(input logic [7:0] b);
    return b ^ (b >> 1);
  endfunction

  // wait for the next cycle with a slot (clr high while scan_any and room)
  task automatic next_slot();
    do @(negedge clk); while (!clr);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    scan_any = 1'b1;
    // slot rate
    for (int r = 0; r < 3; r++) begin
      int n, last, gap_ok;
      xfer_rate = 2'(r);
      next_slot();
      n = 0; last = 0; gap_ok = 1;
      for (int c = 1; c <= 64; c++) begin
        @(negedge clk);
        if (clr) begin
          n++;
          if (c - last != (2 << r)) gap_ok = 0;
          last = c;
        end
      end
      check(n == 64 / (2 << r), $sformatf("rate %0d: %0d transfers in 64 cycles", r, n));
      check(gap_ok == 1, $sformatf("rate %0d: regular spacing", r));
    end
    xfer_rate = 2'd0;
    // hit content and time walk correction
    for (int t = 0; t < 300; t++) begin
      logic [7:0] le_b, te_b, tot, exp_le;
      bit sh;
      twc_mode = twc_mode_e'(t % 3);
      twc_cut  = 8'($urandom_range(20));
      le_b     = 8'($urandom);
      te_b     = le_b + 8'($urandom_range(30));
      sel_le   = to_gray(le_b);
      sel_te   = to_gray(te_b);
      sel_id   = 9'($urandom_range(319));
      tot      = te_b - le_b;
      sh       = (twc_mode != TWC_OFF) && (tot < twc_cut);
      next_slot();
      check(wr0 && wr0_hit.row == sel_id[8:1] && wr0_hit.col == sel_id[0] &&
            wr0_hit.tot == tot, $sformatf("hit content t=%0d", t));
      exp_le = (sh && twc_mode == TWC_CORRECT) ? le_b - 8'd1 : le_b;
      check(wr0_hit.le == exp_le, $sformatf("le %0d exp %0d mode %0d", wr0_hit.le, exp_le, twc_mode));
      check(wr1 == (sh && twc_mode == TWC_DOUBLE), "double write flag");
      if (wr1) check(wr1_hit.le == le_b - 8'd1 && wr1_hit.tot == tot, "corrected copy");
    end
    // double write needs two free locations
    twc_mode = TWC_DOUBLE; twc_cut = 8'd10; sel_le = to_gray(8'd5); sel_te = to_gray(8'd7);
    free2 = 1'b0;
    repeat (8) begin
      @(negedge clk);
      check(!clr && !wr0, "no double write with one free location");
    end
    check(ovf == 1'b1, "overflow warning when pool lacks room");
    free2 = 1'b1;
    next_slot();
    check(wr0 && wr1, "double write once room is back");
    check(ovf == 1'b1, "overflow warning is sticky");
    ovf_clr = 1'b1;
    @(negedge clk);
    ovf_clr = 1'b0;
    check(ovf == 1'b0, "overflow warning cleared");
    twc_mode = TWC_OFF;
    free1 = 1'b0; free2 = 1'b0;
    repeat (4) begin
      @(negedge clk);
      check(!clr, "no transfer when the pool is full");
    end
    check(ovf, "overflow when full");
    scan_any = 1'b0; free1 = 1'b1;
    repeat (4) begin
      @(negedge clk);
      check(!clr, "no transfer without hit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
