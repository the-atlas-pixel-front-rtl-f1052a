// tb_self_trigger: hit-OR pulses at random times; for random delays the trigger
// must appear exactly `delay` cycles after each rising edge (several in flight),
// once per edge, and never while disabled.
module tb_self_trigger;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       en = 1'b1, hitor = 1'b0, trig;
  logic [7:0] delay = '0;
  int         checks = 0, failures = 0;
  int         cyc = 0;
  int         expect_at [$];

  self_trigger #(.MAX_DELAY(256)) dut (.clk, .rst_n, .en, .delay, .hitor, .trig);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ntrig;
    logic prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 12; run++) begin
      delay = (run == 0) ? 8'd0 : (run == 1) ? 8'd255 : 8'($urandom);
      expect_at = {};
      ntrig = 0;
      prev = 1'b0;
      for (int c = 0; c < 600; c++) begin
        @(negedge clk);
        hitor = (c < 300) && ($urandom_range(7) == 0);
        #1;
        if (hitor && !prev) expect_at.push_back(cyc + int'(delay));
        prev = hitor;
        if (expect_at.size() > 0 && expect_at[0] == cyc) begin
          check(trig == 1'b1, $sformatf("trigger due at %0d, delay %0d", cyc, delay));
          void'(expect_at.pop_front());
          ntrig++;
        end else begin
          check(trig == 1'b0, $sformatf("spurious trigger at %0d, delay %0d", cyc, delay));
        end
      end
      check(expect_at.size() == 0 && ntrig > 0, "all triggers seen");
    end
    en = 1'b0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      hitor = ($urandom_range(3) == 0);
      #1;
      check(trig == 1'b0, "disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
