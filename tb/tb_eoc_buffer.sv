// tb_eoc_buffer: EoC pool with the chip's 64 locations and a latency of 20.
// A scoreboard keeps every written hit and every trigger (time stamp, number);
// a hit must be read out under trigger k exactly when trigger k came when the
// hit's age equalled the latency. Random hits and triggers are run, then each
// trigger number is read out and compared; afterwards the pool must be empty
// again (two free locations). Directed parts: filling all 64 locations clears
// free1, the double write stores two hits in one cycle, a late hit is dropped.
module tb_eoc_buffer;
  import fei_pkg::*;
  localparam int DEPTH = 64;
  localparam logic [7:0] LAT = 8'd20;
  logic [7:0] lat = LAT;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] ts = '0;
  logic       trig = 1'b0, wr0 = 1'b0, wr1 = 1'b0, rd_ack = 1'b0;
  logic [3:0] trig_id = '0, rd_id = '0;
  eoc_hit_t   wr0_hit = '0, wr1_hit = '0, rd_hit;
  logic       free1, free2, rd_match;
  int         checks = 0, failures = 0;

  eoc_hit_t   sb_hit [$];
  int         sb_time [$];    // absolute write time of each hit's leading edge
  int         tr_time [$];
  int         tr_id [$];
  int         now = 0;
  eoc_hit_t   exp_q [$];      // hits still expected by read_id

  eoc_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .ts_bin(ts), .latency(lat), .trig, .trig_id,
    .wr0, .wr0_hit, .wr1, .wr1_hit, .free1, .free2, .rd_id, .rd_match, .rd_hit, .rd_ack);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    ts  <= ts + 8'd1;
    now <= now + 1;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // read out every hit of trigger id, compare with the expected list
  task automatic read_id(input logic [3:0] id, input eoc_hit_t exp_in [$]);
    int n;
    n = 0;
    exp_q = exp_in;
    rd_id = id;
    #1;
    while (rd_match) begin
      int found;
      found = -1;
      foreach (exp_q[i]) if (exp_q[i] == rd_hit) found = i;
      check(found >= 0, $sformatf("unexpected hit for trigger %0d: le %0d row %0d col %0d tot %0d", id, rd_hit.le, rd_hit.row, rd_hit.col, rd_hit.tot));

      if (found >= 0) exp_q[found] = '1;   // row 255 marks a hit already seen
      rd_ack = 1'b1;
      @(posedge clk);
      @(negedge clk);
      rd_ack = 1'b0;
      #1;
      n++;
    end
    foreach (exp_q[i]) check(exp_q[i] == '1, $sformatf("trigger %0d: hit row %0d missing", id, exp_q[i].row));
    check(n == exp_in.size(), $sformatf("trigger %0d: %0d hits read, %0d expected", id, n, exp_in.size()));
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nt;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(free1 && free2, "empty after reset");
    // random hits and triggers for 150 cycles
    nt = 0;
    for (int c = 0; c < 150; c++) begin
      @(negedge clk);
      wr0 = 1'b0; trig = 1'b0;
      if (c < 120 && $urandom_range(2) == 0) begin
        int age;
        age = $urandom_range(6);
        wr0 = 1'b1;
        wr0_hit.row = 8'($urandom_range(159));
        wr0_hit.col = 1'($urandom);
        wr0_hit.tot = 8'($urandom);
        wr0_hit.le  = ts - 8'(age);
        sb_hit.push_back(wr0_hit);
        sb_time.push_back(now - age);
      end
      if (c > 20 && nt < 16 && $urandom_range(5) == 0) begin
        trig = 1'b1;
        trig_id = 4'(nt);
        tr_time.push_back(now);
        tr_id.push_back(nt);
        nt++;
      end
    end
    @(negedge clk);
    wr0 = 1'b0; trig = 1'b0;
    repeat (30) @(negedge clk);
    for (int k = 0; k < nt; k++) begin
      eoc_hit_t want [$];
      want = {};
      foreach (sb_hit[i])
        // tagged when the trigger came at leading edge + latency
        if (sb_time[i] + int'(LAT) == tr_time[k])
          want.push_back(sb_hit[i]);
      read_id(4'(tr_id[k]), want);
    end
    check(free1 && free2, "pool empty after readout and latency");
    // fill all locations, with the latency at its maximum so nothing expires
    lat = 8'd255;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr0 = 1'b1; wr0_hit = '0; wr0_hit.le = ts; wr0_hit.row = 8'(i);
    end
    @(negedge clk);
    wr0 = 1'b0;
    check(!free1 && !free2, "full after 64 writes");
    lat = LAT;
    repeat (int'(LAT) + 2) @(negedge clk);
    check(free1 && free2, "untriggered hits freed after the latency");
    // double write in one cycle, then trigger
    @(negedge clk);
    wr0 = 1'b1; wr1 = 1'b1;
    wr0_hit = '{row: 8'd7, col: 1'b1, le: ts, tot: 8'd3};
    wr1_hit = '{row: 8'd7, col: 1'b1, le: ts - 8'd1, tot: 8'd3};
    @(negedge clk);
    wr0 = 1'b0; wr1 = 1'b0;
    repeat (int'(LAT) - 2) @(negedge clk);
    trig = 1'b1; trig_id = 4'd9;      // age of the corrected copy equals LAT
    @(negedge clk);
    trig = 1'b0;
    read_id(4'd9, '{'{row: 8'd7, col: 1'b1, le: wr1_hit.le, tot: 8'd3}});
    repeat (3) @(negedge clk);
    trig = 1'b1; trig_id = 4'd10;     // nominal copy is now past the latency
    @(negedge clk);
    trig = 1'b0;
    read_id(4'd10, '{});
    check(free1 && free2, "nominal copy freed");
    // late hit: written older than the latency, never tagged
    @(negedge clk);
    wr0 = 1'b1; wr0_hit = '{row: 8'd1, col: 1'b0, le: ts - 8'd30, tot: 8'd1};
    @(negedge clk);
    wr0 = 1'b0; trig = 1'b1; trig_id = 4'd11;
    @(negedge clk);
    trig = 1'b0;
    #1;
    check(free1 && free2, "late hit dropped");
    read_id(4'd11, '{});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
