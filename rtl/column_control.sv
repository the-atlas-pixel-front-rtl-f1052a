// column_control: moves hits from the pixels of a column pair into the EoC pool.
//
// A transfer slot occurs once every 2, 4 or 8 clock cycles (xfer_rate 0, 1, 2/3:
// 20, 10 or 5 MHz at a 40 MHz clock). In a slot, if the priority scan reports a hit
// pixel, its Gray leading/trailing edge stamps are converted to binary, the ToT
// (trailing - leading, modulo 256) is formed, and the hit is written into a free
// EoC location in the same cycle while `clr` clears the pixel. Digital time walk
// correction: when enabled and ToT < twc_cut the stored leading edge is one less
// (the hit is attributed to the previous bunch crossing); in double mode such a
// hit is written twice, nominal (port 0) and corrected (port 1). If the pool lacks
// room the pixel keeps its hit and the sticky overflow warning `ovf` is set until
// `ovf_clr`. Outputs wr0/wr1/clr are combinational in the slot cycle.
// Rate range, ToT, the correction by one and the double write follow the chip
// description; the slot divider encoding and the overflow rule are choices here.
module column_control
  import fei_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0]      xfer_rate,
  input  twc_mode_e       twc_mode,
  input  logic [TS_W-1:0] twc_cut,
  input  logic            scan_any,
  input  logic [TS_W-1:0] sel_le,      // Gray
  input  logic [TS_W-1:0] sel_te,      // Gray
  input  logic [ROW_W:0]  sel_id,      // {row, column in pair}
  input  logic            free1,
  input  logic            free2,
  output logic            clr,
  output logic            wr0,
  output eoc_hit_t        wr0_hit,
  output logic            wr1,
  output eoc_hit_t        wr1_hit,
  input  logic            ovf_clr,
  output logic            ovf
);
  logic [2:0]      div;
  logic            slot;
  logic [TS_W-1:0] le_b, te_b, tot;
  logic            short_tot, dbl, room;

  always_comb begin
    unique case (xfer_rate)
      2'd0:    slot = div[0];
      2'd1:    slot = &div[1:0];
      default: slot = &div[2:0];
    endcase
  end

  assign le_b  = gray2bin(sel_le);
  assign te_b  = gray2bin(sel_te);
  assign tot   = te_b - le_b;
  assign short_tot = (twc_mode != TWC_OFF) && (tot < twc_cut);
  assign dbl   = short_tot && (twc_mode == TWC_DOUBLE);
  assign room  = dbl ? free2 : free1;

  always_comb begin
    wr0_hit     = '0;
    wr0_hit.row = sel_id[ROW_W:1];
    wr0_hit.col = sel_id[0];
    wr0_hit.tot = tot;
    wr1_hit     = wr0_hit;
    wr0_hit.le  = (short_tot && !dbl) ? le_b - 1'b1 : le_b;
    wr1_hit.le  = le_b - 1'b1;
  end

  assign clr = slot && scan_any && room;
  assign wr0 = clr;
  assign wr1 = clr && dbl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0;
      ovf <= 1'b0;
    end else begin
      div <= div + 1'b1;
      if (ovf_clr) ovf <= 1'b0;
      else if (slot && scan_any && !room) ovf <= 1'b1;
    end
  end

  // the corrected copy is only ever written together with the nominal hit
  a_wr1_with_wr0: assert property (@(posedge clk) disable iff (!rst_n) wr1 |-> wr0 && clr);
endmodule
