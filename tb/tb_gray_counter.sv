// tb_gray_counter: checks the time stamp counter against an independent count.
// For 700 cycles (more than two wraps) the binary output must equal the number of
// clock edges since reset modulo 256, the Gray output must equal b ^ (b >> 1) of
// that count, and consecutive Gray values must differ in exactly one bit.
module tb_gray_counter;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] gray, bin, prev_gray;
  int         checks = 0, failures = 0;
  int         count;

  gray_counter #(.W(8)) dut (.clk, .rst_n, .gray, .bin);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(gray == 8'd0 && bin == 8'd0, "reset value");
    rst_n = 1'b1;
    count = 0;
    prev_gray = gray;
    repeat (700) begin
      @(negedge clk);
      count++;
      check(bin == 8'(count), $sformatf("bin %0d exp %0d", bin, count % 256));
      check(gray == (8'(count) ^ (8'(count) >> 1)), $sformatf("gray %h", gray));
      check($countones(gray ^ prev_gray) == 1, "one bit change");
      prev_gray = gray;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
