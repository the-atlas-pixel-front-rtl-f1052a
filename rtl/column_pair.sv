// column_pair: two pixel columns with their end-of-column logic.
//
// Holds 2 x N_ROWS pixel cells (configuration part and hit logic), the fast
// priority scan over their hit flags, the column control that moves the uppermost
// hit into the EoC pool, and the EoC pool itself. Pixel k = 2*row + col (col = 0
// or 1 within the pair, row 0 next to the periphery). Each column has its own
// configuration shift chain: data enters at row 0 and leaves at row N_ROWS-1.
// `hitbus` is the OR of the hit-bus contributions of the pair. The readout side
// (rd_id / rd_match / rd_hit / rd_ack) and the overflow warning are those of the
// EoC pool and the column control. The grouping in column pairs with 64 buffers
// follows the chip description; the chain direction and numbering are choices.
module column_pair
  import fei_pkg::*;
#(
  parameter int N_ROWS    = 160,
  parameter int EOC_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  gcfg_t             gcfg,
  input  logic [TS_W-1:0]   ts_gray,
  input  logic [TS_W-1:0]   ts_bin,
  input  logic [2*N_ROWS-1:0] disc,
  input  logic              inj_strobe,
  // pixel configuration chains
  input  logic [1:0]        pcfg_din,
  input  logic              pcfg_shift,
  input  logic              pcfg_write,
  input  logic              pcfg_read,
  input  logic [3:0]        pcfg_sel,
  output logic [1:0]        pcfg_dout,
  output pix_cfg_t          pix_cfg [2*N_ROWS],
  output logic              hitbus,
  // trigger and readout
  input  logic              trig,
  input  logic [L1ID_W-1:0] trig_id,
  input  logic [L1ID_W-1:0] rd_id,
  output logic              rd_match,
  output eoc_hit_t          rd_hit,
  input  logic              rd_ack,
  input  logic              ovf_clr,
  output logic              ovf
);
  localparam int NP = 2 * N_ROWS;
  localparam int IW = $clog2(NP);

  logic [NP-1:0]   hit, clr_vec, hb;
  logic [TS_W-1:0] le [NP];
  logic [TS_W-1:0] te [NP];
  logic [ROW_W:0]  id [NP];
  logic [NP-1:0]   sr_q;

  logic            scan_any, clr, wr0, wr1, free1, free2;
  logic [IW-1:0]   scan_idx;
  eoc_hit_t        wr0_hit, wr1_hit;

  for (genvar k = 0; k < NP; k++) begin : g_pix
    localparam int ROW = k / 2;
    localparam int COL = k % 2;
    logic sr_in;
    if (ROW == 0) begin : g_first
      assign sr_in = pcfg_din[COL];
    end else begin : g_next
      assign sr_in = sr_q[k-2];
    end
    pixel_config u_cfg (
      .clk, .rst_n, .sr_in, .shift(pcfg_shift), .write(pcfg_write),
      .read(pcfg_read), .sel(pcfg_sel), .sr_out(sr_q[k]), .cfg(pix_cfg[k])
    );
    pixel_hit_logic #(.PIX_ID((ROW_W+1)'(k))) u_hit (
      .clk, .rst_n, .disc(disc[k]), .inj_strobe, .dig_inject(gcfg.dig_inject),
      .cfg(pix_cfg[k]), .ts_gray, .clr(clr_vec[k]), .hit(hit[k]),
      .le(le[k]), .te(te[k]), .id(id[k]), .hitbus(hb[k])
    );
    assign clr_vec[k] = clr && (scan_idx == IW'(k));
  end

  assign pcfg_dout = {sr_q[NP-1], sr_q[NP-2]};
  assign hitbus    = |hb;

  priority_scan #(.N(NP), .IW(IW)) u_scan (.req(hit), .any(scan_any), .idx(scan_idx));

  column_control u_ctl (
    .clk, .rst_n, .xfer_rate(gcfg.xfer_rate), .twc_mode(gcfg.twc_mode),
    .twc_cut(gcfg.twc_cut), .scan_any, .sel_le(le[scan_idx]), .sel_te(te[scan_idx]),
    .sel_id(id[scan_idx]), .free1, .free2, .clr, .wr0, .wr0_hit, .wr1, .wr1_hit,
    .ovf_clr, .ovf
  );

  eoc_buffer #(.DEPTH(EOC_DEPTH)) u_eoc (
    .clk, .rst_n, .ts_bin, .latency(gcfg.latency), .trig, .trig_id,
    .wr0, .wr0_hit, .wr1, .wr1_hit, .free1, .free2,
    .rd_id, .rd_match, .rd_hit, .rd_ack
  );
endmodule
