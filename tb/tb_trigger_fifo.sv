// tb_trigger_fifo: random triggers and pops against a queue model. Checks the
// number given to each accepted trigger (consecutive, modulo 16), the head of
// the pending list, dropping and the overflow flag when 16 triggers are pending,
// and clearing of the flag.
module tb_trigger_fifo;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       trig = 1'b0, pop = 1'b0, ovf_clr = 1'b0;
  logic       trig_acc, pending, ovf;
  logic [3:0] trig_id, head_id;
  int         checks = 0, failures = 0;
  int         model [$];
  int         next_id = 0;
  bit         model_ovf = 0;

  trigger_fifo #(.DEPTH(16), .ID_W(4)) dut (.clk, .rst_n, .trig, .trig_acc, .trig_id,
    .pending, .head_id, .pop, .ovf_clr, .ovf);

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
    int full_seen;
    full_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      int phase;
      phase = (c / 300) % 2;        // alternate heavy-trigger and heavy-pop phases
      trig = ($urandom_range(3) < (phase ? 3 : 1));
      pop  = ($urandom_range(3) < (phase ? 1 : 3));
      ovf_clr = ($urandom_range(50) == 0);
      #1;
      check(pending == (model.size() != 0), "pending");
      if (model.size() != 0) check(int'(head_id) == model[0], $sformatf("head %0d exp %0d", head_id, model[0]));
      check(trig_acc == (trig && model.size() < 16), "accept");
      if (trig_acc) check(int'(trig_id) == next_id, $sformatf("id %0d exp %0d", trig_id, next_id));
      check(ovf == model_ovf, "overflow flag");
      @(posedge clk);
      begin
        bit acc;
        acc = trig && model.size() < 16;
        if (trig && !acc) full_seen++;
        if (ovf_clr) model_ovf = 0;
        else if (trig && !acc) model_ovf = 1;
        if (pop && model.size() != 0) void'(model.pop_front());
        if (acc) begin
          model.push_back(next_id);
          next_id = (next_id + 1) % 16;
        end
      end
      @(negedge clk);
    end
    check(full_seen > 0, "fifo full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
