// tb_serializer: random words with random gaps. A receiver in the testbench
// waits for a start bit, collects 24 bits and compares them with the words sent.
// Back-to-back words must take exactly 25 clock cycles each.
module tb_serializer;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        valid = 1'b0, ready, dout;
  logic [23:0] word = '0;
  int          checks = 0, failures = 0;
  logic [23:0] sent [$];
  int          nrx = 0;

  serializer #(.WORD_W(24)) dut (.clk, .rst_n, .valid, .word, .ready, .dout);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // receiver
  initial begin
    logic [23:0] rx;
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (dout) begin
        for (int i = 23; i >= 0; i--) begin
          @(posedge clk);
          rx[i] = dout;
        end
        check(sent.size() > 0 && rx == sent[0], $sformatf("rx %h", rx));
        if (sent.size() > 0) void'(sent.pop_front());
        nrx++;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      valid = 1'b1;
      word  = 24'($urandom);
      while (!ready) @(negedge clk);
      sent.push_back(word);
      @(negedge clk);
      valid = 1'b0;
      repeat ($urandom_range(3) * $urandom_range(1)) @(negedge clk);
    end
    // throughput: 20 back-to-back words
    while (!ready) @(negedge clk);
    t0 = $time;
    for (int n = 0; n < 20; n++) begin
      valid = 1'b1;
      word  = 24'($urandom);
      sent.push_back(word);
      @(negedge clk);
      valid = 1'b0;            // taken at the last edge
      while (!ready) @(negedge clk);
      if (n == 0) t0 = $time;
    end
    valid = 1'b0;
    check(($time - t0) / 10 == 19 * 25, $sformatf("19 words took %0d cycles", ($time - t0) / 10));
    repeat (60) @(negedge clk);
    check(nrx == 120 && sent.size() == 0, $sformatf("received %0d words", nrx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
