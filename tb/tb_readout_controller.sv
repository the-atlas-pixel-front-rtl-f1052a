// tb_readout_controller: three column pairs are modelled by queues of tagged
// hits and the trigger FIFO by a queue of trigger numbers. The serializer side
// accepts words with a random ready. For each pending trigger the word stream
// must be: start of event with the trigger number, every hit of that trigger
// (column pair 0 first, in pool order, column = 2*pair + col), end of event with
// the overflow bits and the hit count. Hits of other triggers must stay. The
// overflow warnings must be cleared when the end-of-event word is taken.
module tb_readout_controller;
  import fei_pkg::*;
  localparam int NCP = 3;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              pending, pop, trig_ovf = 1'b0, ovf_clr, valid, ready = 1'b0;
  logic [3:0]        head_id, rd_id;
  logic [NCP-1:0]    rd_match, rd_ack, eoc_ovf = '0;
  eoc_hit_t          rd_hit [NCP];
  logic [23:0]       word;
  int                checks = 0, failures = 0;

  typedef struct { int id; eoc_hit_t h; } tagged_t;
  tagged_t     pool [NCP][$];
  int          trigq [$];
  logic [23:0] expw [$];

  readout_controller #(.N_CP(NCP)) dut (.clk, .rst_n, .pending, .head_id, .pop, .rd_id,
    .rd_match, .rd_hit, .rd_ack, .eoc_ovf, .trig_ovf, .ovf_clr, .valid, .word, .ready);

  always #5 clk = ~clk;

  // models of the EoC pools and the trigger FIFO (combinational side)
  always_comb begin
    pending = trigq.size() != 0;
    head_id = pending ? 4'(trigq[0]) : 4'd0;
    for (int p = 0; p < NCP; p++) begin
      rd_match[p] = 1'b0;
      rd_hit[p]   = '0;
      for (int i = pool[p].size() - 1; i >= 0; i--)
        if (pool[p][i].id == int'(rd_id)) begin
          rd_match[p] = 1'b1;
          rd_hit[p]   = pool[p][i].h;
        end
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // sequential side of the models and the word checker
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NCP; p++)
      if (rd_ack[p]) begin
        int k;
        k = -1;
        for (int i = pool[p].size() - 1; i >= 0; i--) if (pool[p][i].id == int'(rd_id)) k = i;
        if (k >= 0) pool[p].delete(k);
      end
    if (valid && ready) begin
      check(expw.size() > 0 && word == expw[0], $sformatf("word %h exp %h", word, expw.size() ? expw[0] : 24'h0));
      if (expw.size() > 0) void'(expw.pop_front());
    end
    if (pop) begin
      check(valid && ready && word[23:22] == WT_EOE, "pop with the end-of-event word");
      void'(trigq.pop_front());
    end
    if (ovf_clr) begin
      eoc_ovf  <= '0;
      trig_ovf <= 1'b0;
    end
    ready <= ($urandom_range(2) != 0);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int ev = 0; ev < 40; ev++) begin
      int id, n;
      id = ev % 16;
      // fill pools with hits of this trigger and of the next one
      for (int p = 0; p < NCP; p++)
        for (int k = 0; k < $urandom_range(4); k++) begin
          tagged_t t;
          t.id = ($urandom_range(3) == 0) ? (id + 1) % 16 : id;
          t.h  = '{row: 8'($urandom_range(159)), col: 1'($urandom), le: 8'($urandom), tot: 8'($urandom)};
          pool[p].push_back(t);
        end
      if (ev % 5 == 3) eoc_ovf[$urandom_range(NCP-1)] = 1'b1;
      if (ev % 7 == 2) trig_ovf = 1'b1;
      // expected stream
      expw.push_back({WT_SOE, 18'b0, 4'(id)});
      n = 0;
      for (int p = 0; p < NCP; p++)
        foreach (pool[p][i])
          if (pool[p][i].id == id) begin
            expw.push_back({WT_HIT, 1'b0, 5'(2 * p + int'(pool[p][i].h.col)), pool[p][i].h.row, pool[p][i].h.tot});
            n++;
          end
      expw.push_back({WT_EOE, 12'b0, |eoc_ovf, trig_ovf, 8'(n)});
      trigq.push_back(id);
      while (trigq.size() != 0) @(negedge clk);
      check(expw.size() == 0, $sformatf("event %0d: %0d words missing", ev, expw.size()));
      check(eoc_ovf == '0 && trig_ovf == 1'b0, "overflow warnings cleared");
      for (int p = 0; p < NCP; p++)
        foreach (pool[p][i]) check(pool[p][i].id != id, "hit of this trigger left behind");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
