// tb_priority_scan: random and directed hit patterns over 320 flags. The
// expected index is found by a downward search from the top flag.
module tb_priority_scan;
  localparam int N = 320;
  logic [N-1:0] req;
  logic         any;
  logic [8:0]   idx;
  int           checks = 0, failures = 0;

  priority_scan #(.N(N)) dut (.req, .any, .idx);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx;
    for (int t = 0; t < 2000; t++) begin
      req = '0;
      if (t < N) req[t] = 1'b1;
      else if (t < 2 * N) begin
        req[t-N] = 1'b1;
        req[$urandom_range(t-N)] = 1'b1;
      end else if (t > 2 * N + 5)
        for (int k = 0; k < $urandom_range(6); k++) req[$urandom_range(N-1)] = 1'b1;
      #1;
      exp_idx = -1;
      for (int i = N - 1; i >= 0; i--)
        if (req[i]) begin
          exp_idx = i;
          break;
        end
      check(any == (exp_idx >= 0), "any");
      if (exp_idx >= 0) check(int'(idx) == exp_idx, $sformatf("idx %0d exp %0d", idx, exp_idx));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
