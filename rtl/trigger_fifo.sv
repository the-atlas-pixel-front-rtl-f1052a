// trigger_fifo: level-1 trigger counter and list of pending triggers.
//
// Every accepted trigger gets the current value of an ID_W bit trigger counter,
// which is then incremented. In the same cycle that number is offered to the EoC
// pools (`trig_acc`, `trig_id`) and pushed into a DEPTH entry FIFO of pending
// triggers. The readout controller sees the oldest pending number on `head_id`
// while `pending` is high and removes it with `pop`. A trigger that arrives while
// the FIFO is full is dropped (not counted, not tagged) and sets the sticky
// `ovf` flag until `ovf_clr`. With DEPTH = 2^ID_W the pending numbers are always
// distinct. Counting triggers and keeping them in a FIFO follow the chip
// description; widths, depth and the full-FIFO rule are this design's choices.
module trigger_fifo
  import fei_pkg::*;
#(
  parameter int DEPTH = 16,
  parameter int ID_W  = L1ID_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            trig,
  output logic            trig_acc,
  output logic [ID_W-1:0] trig_id,
  output logic            pending,
  output logic [ID_W-1:0] head_id,
  input  logic            pop,
  input  logic            ovf_clr,
  output logic            ovf
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [ID_W-1:0] mem [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic [AW:0]     cnt;
  logic            full, do_pop;

  assign full     = (cnt == (AW+1)'(DEPTH));
  assign pending  = (cnt != '0);
  assign trig_acc = trig && !full;
  assign head_id  = mem[rp];
  assign do_pop   = pop && pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp      <= '0;
      rp      <= '0;
      cnt     <= '0;
      trig_id <= '0;
      ovf     <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (trig_acc) begin
        mem[wp] <= trig_id;
        wp      <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
        trig_id <= trig_id + 1'b1;
      end
      if (do_pop) rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(trig_acc) - (AW+1)'(do_pop);
      if (ovf_clr) ovf <= 1'b0;
      else if (trig && full) ovf <= 1'b1;
    end
  end

  a_count_in_range: assert property (@(posedge clk) disable iff (!rst_n) int'(cnt) <= DEPTH);
endmodule
