// fei_top: digital part of the FEI pixel front end chip.
//
// 2*N_CP columns x N_ROWS rows of pixels (18 x 160 by default) are read out in
// N_CP column pairs. The analogue pixel front ends are outside this module: their
// discriminator outputs enter on `disc[column][row]` as samples of the 40 MHz bunch
// crossing clock, and the per-pixel trim DAC codes and analogue controls leave on
// `pix_cfg`, the global DAC codes on `gcfg`. Four processes run in parallel:
//  1. an 8 bit Gray counter time-stamps rising and falling discriminator edges in
//     every pixel, which then raises its hit flag;
//  2. each column pair's control logic moves the uppermost hit pixel's data into
//     its 64 location end-of-column (EoC) pool at 5-20 MHz and clears the pixel;
//  3. EoC hits whose age reaches the programmed latency are tagged with the
//     trigger number if a level-1 trigger is present in that cycle, else freed;
//     triggers are counted and queued in the trigger FIFO;
//  4. the readout controller sends, per queued trigger, a start-of-event word,
//     the tagged hits and an end-of-event word through the serializer on `dout`.
// The level-1 trigger is the external `lv1` OR the self trigger (hit-OR delayed by
// a programmable number of cycles). Configuration: a global shift register and
// one pixel shift chain per column (see global_config, pixel_config). The
// structure follows the chip description; word formats, widths of the trigger
// number and FIFO, and the configuration access are this design's choices.
module fei_top
  import fei_pkg::*;
#(
  parameter int N_CP       = 9,
  parameter int N_ROWS     = 160,
  parameter int EOC_DEPTH  = 64,
  parameter int FIFO_DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_ROWS-1:0]   disc [2*N_CP],
  input  logic                inj_strobe,
  input  logic                lv1,
  // global configuration
  input  logic                gcfg_din,
  input  logic                gcfg_shift,
  input  logic                gcfg_load,
  input  logic                gcfg_read,
  output logic                gcfg_dout,
  output gcfg_t               gcfg,
  // pixel configuration
  input  logic [2*N_CP-1:0]   pcfg_din,
  input  logic                pcfg_shift,
  input  logic                pcfg_write,
  input  logic                pcfg_read,
  input  logic [3:0]          pcfg_sel,
  output logic [2*N_CP-1:0]   pcfg_dout,
  output pix_cfg_t            pix_cfg [2*N_CP][N_ROWS],
  // outputs
  output logic                hitbus,
  output logic                dout
);
  logic [TS_W-1:0]   ts_gray, ts_bin;
  logic              self_trig, trig_in, trig_acc, pending, pop, trig_ovf, ovf_clr;
  logic [L1ID_W-1:0] trig_id, head_id, rd_id;
  logic [N_CP-1:0]   rd_match, rd_ack, eoc_ovf, cp_hitbus;
  eoc_hit_t          rd_hit [N_CP];
  logic              ser_valid, ser_ready;
  logic [WORD_W-1:0] ser_word;

  global_config u_gcfg (
    .clk, .rst_n, .din(gcfg_din), .shift(gcfg_shift), .load(gcfg_load),
    .read(gcfg_read), .dout(gcfg_dout), .cfg(gcfg)
  );

  gray_counter #(.W(TS_W)) u_ts (.clk, .rst_n, .gray(ts_gray), .bin(ts_bin));

  for (genvar p = 0; p < N_CP; p++) begin : g_cp
    logic [2*N_ROWS-1:0] disc_pair;
    pix_cfg_t            cfg_pair [2*N_ROWS];
    for (genvar r = 0; r < N_ROWS; r++) begin : g_row
      assign disc_pair[2*r]      = disc[2*p][r];
      assign disc_pair[2*r+1]    = disc[2*p+1][r];
      assign pix_cfg[2*p][r]     = cfg_pair[2*r];
      assign pix_cfg[2*p+1][r]   = cfg_pair[2*r+1];
    end
    column_pair #(.N_ROWS(N_ROWS), .EOC_DEPTH(EOC_DEPTH)) u_cp (
      .clk, .rst_n, .gcfg, .ts_gray, .ts_bin, .disc(disc_pair), .inj_strobe,
      .pcfg_din(pcfg_din[2*p+1:2*p]), .pcfg_shift, .pcfg_write, .pcfg_read,
      .pcfg_sel, .pcfg_dout(pcfg_dout[2*p+1:2*p]), .pix_cfg(cfg_pair),
      .hitbus(cp_hitbus[p]), .trig(trig_acc), .trig_id, .rd_id,
      .rd_match(rd_match[p]), .rd_hit(rd_hit[p]), .rd_ack(rd_ack[p]),
      .ovf_clr, .ovf(eoc_ovf[p])
    );
  end

  assign hitbus = |cp_hitbus;

  self_trigger #(.MAX_DELAY(1 << TS_W)) u_self (
    .clk, .rst_n, .en(gcfg.selftrig_en), .delay(gcfg.selftrig_delay),
    .hitor(hitbus), .trig(self_trig)
  );

  assign trig_in = lv1 || self_trig;

  trigger_fifo #(.DEPTH(FIFO_DEPTH), .ID_W(L1ID_W)) u_trig (
    .clk, .rst_n, .trig(trig_in), .trig_acc, .trig_id, .pending, .head_id,
    .pop, .ovf_clr, .ovf(trig_ovf)
  );

  readout_controller #(.N_CP(N_CP)) u_ro (
    .clk, .rst_n, .pending, .head_id, .pop, .rd_id, .rd_match, .rd_hit, .rd_ack,
    .eoc_ovf, .trig_ovf, .ovf_clr, .valid(ser_valid), .word(ser_word),
    .ready(ser_ready)
  );

  serializer #(.WORD_W(WORD_W)) u_ser (
    .clk, .rst_n, .valid(ser_valid), .word(ser_word), .ready(ser_ready), .dout
  );
endmodule
