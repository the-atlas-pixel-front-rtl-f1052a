// tb_global_config: reset defaults, then random register contents shifted in,
// loaded, checked field by field, read back and shifted out bit for bit.
module tb_global_config;
  import fei_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  din = 1'b0, shift = 1'b0, load = 1'b0, read = 1'b0, dout;
  gcfg_t cfg;
  logic [GCFG_W-1:0] v;
  int    checks = 0, failures = 0;

  global_config dut (.clk, .rst_n, .din, .shift, .load, .read, .dout, .cfg);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
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
    check(cfg.latency == 8'd128 && cfg.twc_mode == TWC_OFF && cfg.xfer_rate == 2'd0 &&
          !cfg.selftrig_en && !cfg.dig_inject && cfg.dac_thr == 8'd128, "reset defaults");
    for (int rep = 0; rep < 10; rep++) begin
      for (int i = 0; i < GCFG_W; i += 16) v[i +: 16] = 16'($urandom);
      for (int i = GCFG_W - 1; i >= 0; i--) begin
        @(negedge clk);
        shift = 1'b1; din = v[i];
      end
      @(negedge clk);
      shift = 1'b0;
      check(cfg != gcfg_t'(v), "not applied before load");
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      check(cfg == gcfg_t'(v), "loaded");
      check(cfg.latency == v[GCFG_W-1 -: 8], "latency is the first field");
      check(cfg.dac_vcal == v[7:0], "dac_vcal is the last field");
      // clobber the shift register, then read back
      for (int i = 0; i < GCFG_W; i++) begin
        shift = 1'b1; din = 1'b0;
        @(negedge clk);
      end
      shift = 1'b0;
      read = 1'b1;
      @(negedge clk);
      read = 1'b0;
      for (int i = GCFG_W - 1; i >= 0; i--) begin
        check(dout == v[i], $sformatf("readback bit %0d", i));
        shift = 1'b1;
        @(negedge clk);
      end
      shift = 1'b0;
      check(cfg == gcfg_t'(v), "kept after readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
