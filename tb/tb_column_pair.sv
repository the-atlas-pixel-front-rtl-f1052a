// tb_column_pair: one full column pair (2 x 160 pixels, 64 EoC locations).
// Steps: load mask and hit-bus planes through the two configuration chains and
// read one back; fire discriminator pulses of known lengths on random pixels,
// trigger after the latency and read the tagged hits back (row, column, ToT,
// leading edge, uppermost pixel first); masked pixels stay silent; untriggered
// hits are discarded; the time walk correction moves short hits one crossing
// earlier; 70 simultaneous hits overflow the 64 locations, raise the overflow
// warning, and the 6 hits left in the pixels follow once locations are free.
module tb_column_pair;
  import fei_pkg::*;
  localparam int NR = 160;
  localparam int NP = 2 * NR;
  localparam logic [7:0] LAT = 8'd100;
  logic            clk = 1'b0, rst_n = 1'b0;
  gcfg_t           gcfg;
  logic [7:0]      tsb = '0, ts_gray;
  logic [NP-1:0]   disc = '0;
  logic            inj_strobe = 1'b0;
  logic [1:0]      pcfg_din = '0, pcfg_dout;
  logic            pcfg_shift = 1'b0, pcfg_write = 1'b0, pcfg_read = 1'b0;
  logic [3:0]      pcfg_sel = '0;
  pix_cfg_t        pix_cfg [NP];
  logic            hitbus, trig = 1'b0, rd_match, rd_ack = 1'b0, ovf_clr = 1'b0, ovf;
  logic [3:0]      trig_id = '0, rd_id = '0;
  eoc_hit_t        rd_hit;
  int              checks = 0, failures = 0;
  eoc_hit_t        got [$];

  assign ts_gray = tsb ^ (tsb >> 1);

  column_pair #(.N_ROWS(NR), .EOC_DEPTH(64)) dut (.clk, .rst_n, .gcfg, .ts_gray, .ts_bin(tsb),
    .disc, .inj_strobe, .pcfg_din, .pcfg_shift, .pcfg_write, .pcfg_read, .pcfg_sel,
    .pcfg_dout, .pix_cfg, .hitbus, .trig, .trig_id, .rd_id, .rd_match, .rd_hit, .rd_ack,
    .ovf_clr, .ovf);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) tsb <= tsb + 8'd1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // write one configuration bit plane: plane[k] for pixel k = 2*row + col
  task automatic write_plane(input int b, input logic [NP-1:0] plane);
    for (int r = NR - 1; r >= 0; r--) begin
      @(negedge clk);
      pcfg_shift = 1'b1;
      pcfg_din   = {plane[2*r+1], plane[2*r]};
    end
    @(negedge clk);
    pcfg_shift = 1'b0; pcfg_write = 1'b1; pcfg_sel = 4'(b);
    @(negedge clk);
    pcfg_write = 1'b0;
  endtask

  // read out every hit of trigger id into got[]
  task automatic read_id(input logic [3:0] id);
    got = {};
    @(negedge clk);
    rd_id = id;
    #1;
    while (rd_match) begin
      got.push_back(rd_hit);
      rd_ack = 1'b1;
      @(posedge clk);
      @(negedge clk);
      rd_ack = 1'b0;
      #1;
    end
  endtask

  // pulse on a set of pixels, pixel k high for len[k] samples starting now;
  // returns the binary time stamp of the leading edge
  task automatic fire(input logic [NP-1:0] sel, input int len [NP], output logic [7:0] le);
    int t;
    @(negedge clk);
    le = tsb;
    disc = sel;
    for (t = 1; t <= 64; t++) begin
      @(negedge clk);
      for (int k = 0; k < NP; k++) if (len[k] == t) disc[k] = 1'b0;
    end
    disc = '0;
  endtask

  task automatic trigger_at(input logic [7:0] when, input logic [3:0] id);
    while (tsb != when) @(negedge clk);
    trig = 1'b1; trig_id = id;
    @(negedge clk);
    trig = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NP-1:0] maskp, hbp, sel;
    int            len [NP];
    logic [7:0]    le;
    int            exp_k [$];
    gcfg = '0;
    gcfg.latency = LAT;
    gcfg.xfer_rate = 2'd0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // configuration: mask every 7th pixel, hit-bus on pixel 33 only
    maskp = '0;
    for (int k = 0; k < NP; k += 7) maskp[k] = 1'b1;
    hbp = '0; hbp[33] = 1'b1;
    write_plane(10, maskp);
    write_plane(11, hbp);
    for (int k = 0; k < NP; k++)
      check(pix_cfg[k].mask == maskp[k] && pix_cfg[k].hitbus_en == hbp[k] && pix_cfg[k].tdac == '0,
            $sformatf("config pixel %0d", k));
    // read back the mask plane through the chains (row NR-1 comes out first)
    @(negedge clk);
    pcfg_read = 1'b1; pcfg_sel = 4'd10;
    @(negedge clk);
    pcfg_read = 1'b0;
    for (int r = NR - 1; r >= 0; r--) begin
      check(pcfg_dout == {maskp[2*r+1], maskp[2*r]}, $sformatf("mask readback row %0d", r));
      pcfg_shift = 1'b1; pcfg_din = 2'b00;
      @(negedge clk);
    end
    pcfg_shift = 1'b0;
    // hit bus
    @(negedge clk);
    disc[33] = 1'b1; #1;
    check(hitbus == 1'b1, "hitbus from enabled pixel");
    disc[33] = 1'b0; disc[34] = 1'b1; #1;
    check(hitbus == 1'b0, "no hitbus from other pixel");
    disc = '0;
    repeat (4) @(negedge clk);
    // triggered hits
    for (int rep = 0; rep < 6; rep++) begin
      sel = '0;
      for (int k = 0; k < NP; k++) len[k] = 0;
      for (int j = 0; j < 12; j++) begin
        int k;
        k = $urandom_range(NP - 1);
        sel[k] = 1'b1;
        len[k] = (rep == 4) ? 5 : 1 + $urandom_range(40);
      end
      fire(sel, len, le);
      exp_k = {};
      for (int k = NP - 1; k >= 0; k--) if (sel[k] && !maskp[k]) exp_k.push_back(k);
      if (rep % 2 == 0) begin
        trigger_at(le + LAT, 4'(rep));
        read_id(4'(rep));
        check(got.size() == exp_k.size(), $sformatf("rep %0d: %0d hits, %0d expected", rep, got.size(), exp_k.size()));
        if (rep == 4) begin
          // equal pulse lengths: all hits are ready together, uppermost goes first
          foreach (got[i]) if (i < exp_k.size())
            check(got[i].row == 8'(exp_k[i] / 2) && got[i].col == 1'(exp_k[i] % 2),
                  $sformatf("order: hit %0d is pixel %0d, exp %0d", i, 2 * got[i].row + got[i].col, exp_k[i]));
        end
        foreach (got[i]) begin
          int k;
          k = 2 * int'(got[i].row) + int'(got[i].col);
          check(k < NP && sel[k] && !maskp[k] && got[i].tot == 8'(len[k]) && got[i].le == le,
                $sformatf("rep %0d hit %0d: row %0d col %0d tot %0d le %0d, exp tot %0d le %0d",
                          rep, i, got[i].row, got[i].col, got[i].tot, got[i].le, len[k], le));
        end
      end else begin
        // no trigger: everything must be discarded after the latency
        repeat (int'(LAT) + 5) @(negedge clk);
        trig = 1'b1; trig_id = 4'(rep);
        @(negedge clk);
        trig = 1'b0;
        read_id(4'(rep));
        check(got.size() == 0, "untriggered hits discarded");
      end
    end
    // time walk correction: ToT below 5 gets leading edge - 1
    gcfg.twc_mode = TWC_CORRECT; gcfg.twc_cut = 8'd5;
    sel = '0;
    for (int k = 0; k < NP; k++) len[k] = 0;
    sel[300] = 1'b1; len[300] = 2;     // short: corrected
    sel[10]  = 1'b1; len[10]  = 20;    // long: nominal
    fire(sel, len, le);
    trigger_at(le - 8'd1 + LAT, 4'd7);
    trigger_at(le + LAT, 4'd8);
    read_id(4'd7);
    check(got.size() == 1 && got[0].row == 8'd150 && got[0].le == le - 8'd1 && got[0].tot == 8'd2,
          "short hit attributed to the previous crossing");
    read_id(4'd8);
    check(got.size() == 1 && got[0].row == 8'd5 && got[0].le == le, "long hit keeps its crossing");
    gcfg.twc_mode = TWC_OFF;
    // overflow: 70 hits into 64 locations, latency long enough to keep them all
    gcfg.latency = 8'd250;
    sel = '0;
    for (int k = 0; k < NP; k++) len[k] = 0;
    for (int k = 1; k <= 70; k++) begin
      int p;
      p = k * 4 + 1;                   // none of these is masked
      if (maskp[p]) p++;
      sel[p] = 1'b1; len[p] = 3;
    end
    fire(sel, len, le);
    repeat (2 * 70) @(negedge clk);
    check(ovf == 1'b1, "overflow warning with 70 hits");
    trigger_at(le + 8'd250, 4'd9);
    read_id(4'd9);
    check(got.size() == 64, $sformatf("64 hits stored, got %0d", got.size()));
    ovf_clr = 1'b1;
    @(negedge clk);
    ovf_clr = 1'b0;
    check(ovf == 1'b0, "overflow warning cleared");
    repeat (100) @(negedge clk);
    check(dut.hit == '0, "remaining hits moved out of the pixels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
