// tb_fei_top: end-to-end test of the whole chip at its full size (18 x 160
// pixels, 9 column pairs, 64 EoC locations each), with no parameter overrides.
// The testbench configures the chip through the global and pixel shift chains,
// drives discriminator pulses, issues level-1 triggers and decodes the serial
// output (start bit + 24 bit words) back into events, which it compares with the
// hits it injected. Each mechanism is counted and must occur at least once:
// triggered readout, discarding of untriggered hits, masking, time walk
// correction (correct and double-write modes), self trigger, digital injection,
// EoC overflow warning, trigger FIFO overflow, configuration read back, several
// pending triggers.
module tb_fei_top;
  import fei_pkg::*;
  localparam int NC = 18;
  localparam int NR = 160;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic [NR-1:0]     disc [NC];
  logic              inj_strobe = 1'b0, lv1 = 1'b0;
  logic              gcfg_din = 1'b0, gcfg_shift = 1'b0, gcfg_load = 1'b0, gcfg_read = 1'b0, gcfg_dout;
  gcfg_t             gcfg;
  logic [NC-1:0]     pcfg_din = '0, pcfg_dout;
  logic              pcfg_shift = 1'b0, pcfg_write = 1'b0, pcfg_read = 1'b0;
  logic [3:0]        pcfg_sel = '0;
  pix_cfg_t          pix_cfg [NC][NR];
  logic              hitbus, dout;
  int                checks = 0, failures = 0;

  fei_top dut (.clk, .rst_n, .disc, .inj_strobe, .lv1, .gcfg_din, .gcfg_shift, .gcfg_load,
    .gcfg_read, .gcfg_dout, .gcfg, .pcfg_din, .pcfg_shift, .pcfg_write, .pcfg_read,
    .pcfg_sel, .pcfg_dout, .pix_cfg, .hitbus, .dout);

  always #5 clk = ~clk;

  // mechanism counters
  int n_events = 0, n_discard = 0, n_mask = 0, n_twc = 0, n_double = 0, n_self = 0;
  int n_diginj = 0, n_eoc_ovf = 0, n_trig_ovf = 0, n_readback = 0, n_multi = 0;
  int next_id = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // ---------------- serial receiver ----------------
  logic [23:0] rxq [$];
  initial begin
    logic [23:0] w;
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (dout) begin
        for (int i = 23; i >= 0; i--) begin
          @(posedge clk);
          w[i] = dout;
        end
        rxq.push_back(w);
      end
    end
  end

  typedef struct packed { logic [4:0] col; logic [7:0] row; logic [7:0] tot; } hit_t;
  typedef struct { int id; hit_t hits [$]; bit eoc_ovf; bit trig_ovf; int count; } event_t;

  task automatic next_word(output logic [23:0] w);
    int guard;
    guard = 0;
    while (rxq.size() == 0 && guard < 20000) begin
      @(negedge clk);
      guard++;
    end
    check(rxq.size() != 0, "word expected on the serial link");
    w = (rxq.size() != 0) ? rxq.pop_front() : 24'h0;
  endtask

  task automatic get_event(output event_t ev);
    logic [23:0] w;
    ev.hits = {};
    next_word(w);
    check(w[23:22] == WT_SOE, $sformatf("start of event expected, got %h", w));
    ev.id = int'(w[3:0]);
    check(ev.id == next_id, $sformatf("trigger number %0d, expected %0d", ev.id, next_id));
    next_id = (next_id + 1) % 16;
    forever begin
      next_word(w);
      if (w[23:22] != WT_HIT) break;
      ev.hits.push_back(hit_t'(w[20:0]));
    end
    check(w[23:22] == WT_EOE, $sformatf("end of event expected, got %h", w));
    ev.eoc_ovf  = w[9];
    ev.trig_ovf = w[8];
    ev.count    = int'(w[7:0]);
    check(ev.count == (ev.hits.size() % 256), "hit count in end-of-event word");
    n_events++;
  endtask

  // compare an event's hits with an expected list (order free)
  task automatic match_hits(input event_t ev, input hit_t exp_h [$], input string what);
    check(ev.hits.size() == exp_h.size(), $sformatf("%s: %0d hits, %0d expected", what, ev.hits.size(), exp_h.size()));
    foreach (ev.hits[i]) begin
      bit found;
      found = 0;
      foreach (exp_h[j]) if (exp_h[j] == ev.hits[i]) found = 1;
      check(found, $sformatf("%s: unexpected hit col %0d row %0d tot %0d", what,
                             ev.hits[i].col, ev.hits[i].row, ev.hits[i].tot));
    end
  endtask

  // ---------------- configuration ----------------
  task automatic write_gcfg(input gcfg_t v);
    for (int i = GCFG_W - 1; i >= 0; i--) begin
      @(negedge clk);
      gcfg_shift = 1'b1; gcfg_din = v[i];
    end
    @(negedge clk);
    gcfg_shift = 1'b0; gcfg_load = 1'b1;
    @(negedge clk);
    gcfg_load = 1'b0;
    check(gcfg == v, "global configuration loaded");
  endtask

  task automatic write_plane(input int b, input logic [NR-1:0] plane [NC]);
    for (int r = NR - 1; r >= 0; r--) begin
      @(negedge clk);
      pcfg_shift = 1'b1;
      for (int c = 0; c < NC; c++) pcfg_din[c] = plane[c][r];
    end
    @(negedge clk);
    pcfg_shift = 1'b0; pcfg_write = 1'b1; pcfg_sel = 4'(b);
    @(negedge clk);
    pcfg_write = 1'b0;
  endtask

  task automatic read_plane(input int b, input logic [NR-1:0] plane [NC]);
    @(negedge clk);
    pcfg_read = 1'b1; pcfg_sel = 4'(b);
    @(negedge clk);
    pcfg_read = 1'b0;
    for (int r = NR - 1; r >= 0; r--) begin
      for (int c = 0; c < NC; c++)
        check(pcfg_dout[c] == plane[c][r], $sformatf("pixel readback col %0d row %0d", c, r));
      pcfg_shift = 1'b1; pcfg_din = '0;
      @(negedge clk);
    end
    pcfg_shift = 1'b0;
    n_readback++;
  endtask

  // ---------------- stimulus ----------------
  // pulse list: pixel (col,row) high for len samples starting at the same cycle
  typedef struct { int col; int row; int len; } pulse_t;

  task automatic fire(input pulse_t p [$], output logic [7:0] le);
    @(negedge clk);
    le = dut.ts_bin;
    foreach (p[i]) disc[p[i].col][p[i].row] = 1'b1;
    for (int t = 1; t <= 64; t++) begin
      @(negedge clk);
      foreach (p[i]) if (p[i].len == t) disc[p[i].col][p[i].row] = 1'b0;
    end
  endtask

  task automatic lv1_at(input logic [7:0] when);
    while (dut.ts_bin != when) @(negedge clk);
    lv1 = 1'b1;
    @(negedge clk);
    lv1 = 1'b0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gcfg_t          g;
    logic [NR-1:0]  maskp [NC], hbp [NC], injp [NC];
    pulse_t         p [$];
    hit_t           exp_h [$], exp_long [$];
    event_t         ev;
    logic [7:0]     le;
    logic [GCFG_W-1:0] rb;

    for (int c = 0; c < NC; c++) disc[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // global configuration and its read back
    g = '0;
    g.latency = 8'd100; g.selftrig_delay = 8'd100; g.twc_cut = 8'd4;
    g.dac_thr = 8'h5a; g.dac_vcal = 8'h33; g.mon_sel = 4'd9;
    write_gcfg(g);
    @(negedge clk);
    gcfg_read = 1'b1;
    @(negedge clk);
    gcfg_read = 1'b0;
    for (int i = GCFG_W - 1; i >= 0; i--) begin
      rb[i] = gcfg_dout;
      gcfg_shift = 1'b1; gcfg_din = 1'b0;
      @(negedge clk);
    end
    gcfg_shift = 1'b0;
    check(rb == g, "global register read back");
    n_readback++;

    // pixel configuration: mask pixel (2*c+1, 3*c) in every column, hit bus on (5,77),
    // inject bit on three pixels
    for (int c = 0; c < NC; c++) begin
      maskp[c] = '0; hbp[c] = '0; injp[c] = '0;
      maskp[c][(3 * c + 11) % NR] = 1'b1;
    end
    hbp[5][77] = 1'b1;
    injp[0][0] = 1'b1; injp[9][100] = 1'b1; injp[17][159] = 1'b1;
    write_plane(10, maskp);
    write_plane(11, hbp);
    write_plane(13, injp);
    check(pix_cfg[5][77].hitbus_en && pix_cfg[9][100].inject && pix_cfg[4][(3*4+11)%NR].mask &&
          !pix_cfg[4][0].mask, "pixel configuration outputs");
    read_plane(10, maskp);

    // A: triggered events with random hits over the whole chip, some masked
    for (int rep = 0; rep < 4; rep++) begin
      bit used [NC][NR];
      p = {}; exp_h = {};
      for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) used[c][r] = 0;
      for (int j = 0; j < 40; j++) begin
        pulse_t q;
        q.col = $urandom_range(NC - 1);
        q.row = (j < 3) ? (3 * q.col + 11) % NR : $urandom_range(NR - 1);
        q.len = 1 + $urandom_range(30);
        if (used[q.col][q.row]) continue;
        used[q.col][q.row] = 1;
        p.push_back(q);
        if (maskp[q.col][q.row]) n_mask++;
        else exp_h.push_back('{col: 5'(q.col), row: 8'(q.row), tot: 8'(q.len)});
      end
      fire(p, le);
      lv1_at(le + 8'd100);
      get_event(ev);
      match_hits(ev, exp_h, $sformatf("event %0d", rep));
      check(!ev.eoc_ovf && !ev.trig_ovf, "no warnings");
    end

    // B: untriggered hits are discarded; a later trigger finds nothing
    p = '{'{col: 3, row: 20, len: 5}, '{col: 12, row: 140, len: 9}};
    fire(p, le);
    lv1_at(le + 8'd105);
    get_event(ev);
    check(ev.hits.size() == 0, "untriggered hits discarded");
    if (ev.hits.size() == 0) n_discard++;

    // C: time walk correction, two pending triggers
    g.twc_mode = TWC_CORRECT;
    write_gcfg(g);
    p = '{'{col: 7, row: 60, len: 2}, '{col: 8, row: 61, len: 20}};
    fire(p, le);
    lv1_at(le - 8'd1 + 8'd100);
    lv1_at(le + 8'd100);
    n_multi++;
    get_event(ev);
    exp_h = '{'{col: 5'd7, row: 8'd60, tot: 8'd2}};
    match_hits(ev, exp_h, "time walk corrected hit");
    get_event(ev);
    exp_long = '{'{col: 5'd8, row: 8'd61, tot: 8'd20}};
    match_hits(ev, exp_long, "uncorrected hit");
    n_twc++;

    // D: double write: the short hit appears under both crossings
    g.twc_mode = TWC_DOUBLE;
    write_gcfg(g);
    p = '{'{col: 15, row: 3, len: 3}};
    fire(p, le);
    lv1_at(le - 8'd1 + 8'd100);
    lv1_at(le + 8'd100);
    exp_h = '{'{col: 5'd15, row: 8'd3, tot: 8'd3}};
    get_event(ev);
    match_hits(ev, exp_h, "double write, corrected copy");
    get_event(ev);
    match_hits(ev, exp_h, "double write, nominal copy");
    n_double++;
    g.twc_mode = TWC_OFF;

    // E: self trigger from the hit bus of pixel (5,77), no external trigger
    g.selftrig_en = 1'b1;
    write_gcfg(g);
    p = '{'{col: 5, row: 77, len: 6}, '{col: 6, row: 2, len: 4}};
    fire(p, le);
    get_event(ev);
    exp_h = '{'{col: 5'd5, row: 8'd77, tot: 8'd6}, '{col: 5'd6, row: 8'd2, tot: 8'd4}};
    match_hits(ev, exp_h, "self triggered event");
    n_self++;
    g.selftrig_en = 1'b0;

    // F: digital injection into the three pixels with the inject bit
    g.dig_inject = 1'b1;
    write_gcfg(g);
    @(negedge clk);
    le = dut.ts_bin;
    inj_strobe = 1'b1;
    disc[1][1] = 1'b1;                 // ignored in digital injection mode
    repeat (4) @(negedge clk);
    inj_strobe = 1'b0;
    disc[1][1] = 1'b0;
    lv1_at(le + 8'd100);
    get_event(ev);
    exp_h = '{'{col: 5'd0, row: 8'd0, tot: 8'd4}, '{col: 5'd9, row: 8'd100, tot: 8'd4},
              '{col: 5'd17, row: 8'd159, tot: 8'd4}};
    match_hits(ev, exp_h, "digital injection");
    n_diginj++;
    g.dig_inject = 1'b0;

    // G: EoC overflow: 70 hits in column pair 4 with a long latency
    g.latency = 8'd250;
    write_gcfg(g);
    p = {};
    for (int j = 0; j < 70; j++) p.push_back('{col: 8 + (j % 2), row: 80 + j / 2, len: 3});
    fire(p, le);
    lv1_at(le + 8'd250);
    get_event(ev);
    check(ev.hits.size() == 64, $sformatf("64 hits kept in an overflowing pool, got %0d", ev.hits.size()));
    check(ev.eoc_ovf, "EoC overflow warning reported");
    if (ev.eoc_ovf) n_eoc_ovf++;
    repeat (300) @(negedge clk);       // the 6 late hits drain and are discarded
    g.latency = 8'd100;
    write_gcfg(g);

    // H: trigger FIFO overflow: 17 triggers in a row, 16 are kept
    @(negedge clk);
    lv1 = 1'b1;
    repeat (17) @(negedge clk);
    lv1 = 1'b0;
    for (int k = 0; k < 16; k++) begin
      get_event(ev);
      check(ev.hits.size() == 0, "empty events");
      if (k == 0) begin
        check(ev.trig_ovf, "trigger FIFO overflow reported");
        if (ev.trig_ovf) n_trig_ovf++;
      end
    end
    n_multi++;
    repeat (100) @(negedge clk);
    check(rxq.size() == 0, "no extra words");

    check(n_events > 0,   "mechanism: triggered readout");
    check(n_discard > 0,  "mechanism: untriggered hits discarded");
    check(n_mask > 0,     "mechanism: masked pixels");
    check(n_twc > 0,      "mechanism: time walk correction");
    check(n_double > 0,   "mechanism: double write");
    check(n_self > 0,     "mechanism: self trigger");
    check(n_diginj > 0,   "mechanism: digital injection");
    check(n_eoc_ovf > 0,  "mechanism: EoC overflow warning");
    check(n_trig_ovf > 0, "mechanism: trigger FIFO overflow");
    check(n_readback > 0, "mechanism: configuration read back");
    check(n_multi > 0,    "mechanism: several pending triggers");
    $display("events %0d discard %0d mask %0d twc %0d double %0d self %0d diginj %0d eoc_ovf %0d trig_ovf %0d readback %0d multi %0d",
             n_events, n_discard, n_mask, n_twc, n_double, n_self, n_diginj, n_eoc_ovf, n_trig_ovf, n_readback, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
