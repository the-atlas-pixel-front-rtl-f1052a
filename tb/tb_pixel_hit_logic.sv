// tb_pixel_hit_logic: one pixel driven by a time stamp counter kept in the
// testbench. Checks: leading/trailing edge stamps of pulses of random length,
// hit flag timing, holding of one hit while a second pulse arrives, clearing,
// the mask bit, digital injection through the inject bit, and the hit-bus output.
module tb_pixel_hit_logic;
  import fei_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b0;
  logic            disc = 1'b0, inj_strobe = 1'b0, dig_inject = 1'b0, clr = 1'b0;
  pix_cfg_t        cfg;
  logic [7:0]      tsb = '0;
  logic [7:0]      ts_gray;
  logic            hit, hitbus;
  logic [7:0]      le, te;
  logic [8:0]      id;
  int              checks = 0, failures = 0;

  assign ts_gray = tsb ^ (tsb >> 1);

  pixel_hit_logic #(.PIX_ID(9'd301)) dut (.clk, .rst_n, .disc, .inj_strobe, .dig_inject,
    .cfg, .ts_gray, .clr, .hit, .le, .te, .id, .hitbus);

  always #5 clk = ~clk;
  always @(posedge clk) tsb <= tsb + 8'd1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic logic [7:0] g(input logic [7:0] b);
    return b ^ (b >> 1);
  endfunction

  // pulse high for len samples; returns stamps expected
  task automatic pulse(input int len, output logic [7:0] exp_le, output logic [7:0] exp_te,
                       input bit use_inj = 0);
    @(negedge clk);
    if (use_inj) inj_strobe = 1'b1; else disc = 1'b1;
    exp_le = tsb;                 // sampled at the next edge with this stamp
    #1;
    if (cfg.hitbus_en && !cfg.mask && !dig_inject) check(hitbus == 1'b1, "hitbus follows disc");
    repeat (len) @(negedge clk);
    exp_te = tsb;
    disc = 1'b0; inj_strobe = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] el, et, el2, et2;
    cfg = '0;
    cfg.hitbus_en = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(id == 9'd301, "id rom");
    for (int t = 0; t < 60; t++) begin
      int len;
      len = 1 + $urandom_range(40);
      repeat ($urandom_range(5)) @(negedge clk);
      pulse(len, el, et);
      check(hit == 1'b0, "no hit before falling edge sampled");
      @(negedge clk);
      check(hit == 1'b1, "hit after falling edge");
      check(le == g(el) && te == g(et), $sformatf("stamps le %h/%h te %h/%h", le, g(el), te, g(et)));
      // a second pulse while the hit is held must be ignored
      pulse(3, el2, et2);
      repeat (2) @(negedge clk);
      check(hit && le == g(el) && te == g(et), "second pulse ignored");
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      check(hit == 1'b0, "cleared");
    end
    // mask
    cfg.mask = 1'b1;
    pulse(5, el, et);
    repeat (3) @(negedge clk);
    check(hit == 1'b0, "masked pixel records nothing");
    // digital injection: disc ignored, strobe counts for pixels with inject bit
    dig_inject = 1'b1;
    cfg.inject = 1'b1;
    pulse(4, el, et, 1);
    @(negedge clk);
    check(hit && le == g(el) && te == g(et), "digital injection hit");
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    cfg.inject = 1'b0;
    pulse(4, el, et, 1);
    repeat (2) @(negedge clk);
    check(!hit, "no injection without inject bit");
    dig_inject = 1'b0;
    cfg.mask = 1'b0;
    cfg.hitbus_en = 1'b0;
    @(negedge clk);
    disc = 1'b1;
    #1;
    check(hitbus == 1'b0, "hitbus disabled");
    disc = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
