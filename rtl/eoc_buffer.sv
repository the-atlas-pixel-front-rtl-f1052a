// eoc_buffer: end-of-column buffer pool of one column pair.
//
// DEPTH locations each hold one hit (row, column in pair, leading edge, ToT) and a
// state: FREE, WAIT or VALID. Every cycle each WAIT location compares its age,
// (current time stamp - leading edge) mod 2^8, with the programmed latency. When
// the age equals the latency the hit's bunch crossing is the one a trigger in this
// cycle refers to: with `trig` the location becomes VALID and keeps `trig_id`,
// without it the location is freed. A hit that arrives older than the latency can
// no longer be triggered and is freed as well (this design's choice).
// Up to two hits can be written per cycle (the second one only for the double
// write of the time walk correction): port 0 takes the lowest free location,
// port 1 the highest; `free1`/`free2` tell whether one/two locations are free.
// For readout, `rd_match`/`rd_hit` show the lowest VALID location whose trigger
// number equals `rd_id`; `rd_ack` frees that location at the clock edge.
// The pool size, the latency comparison and the trigger tagging follow the chip
// description; the allocation order and the exact compare rule are choices here.
module eoc_buffer
  import fei_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TS_W-1:0]   ts_bin,
  input  logic [TS_W-1:0]   latency,
  input  logic              trig,
  input  logic [L1ID_W-1:0] trig_id,
  input  logic              wr0,
  input  eoc_hit_t          wr0_hit,
  input  logic              wr1,
  input  eoc_hit_t          wr1_hit,
  output logic              free1,
  output logic              free2,
  input  logic [L1ID_W-1:0] rd_id,
  output logic              rd_match,
  output eoc_hit_t          rd_hit,
  input  logic              rd_ack
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  loc_state_e        st  [DEPTH];
  eoc_hit_t          hits[DEPTH];
  logic [L1ID_W-1:0] tid [DEPTH];

  logic [AW-1:0] lo_free, hi_free, rd_idx;
  logic          any_free;
  logic [TS_W-1:0] age [DEPTH];   // (current time stamp - leading edge) mod 256

  always_comb
    for (int i = 0; i < DEPTH; i++) age[i] = ts_bin - hits[i].le;

  always_comb begin
    any_free = 1'b0;
    lo_free  = '0;
    hi_free  = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (st[i] == LOC_FREE) lo_free = AW'(i);
    for (int i = 0; i < DEPTH; i++)
      if (st[i] == LOC_FREE) begin
        hi_free  = AW'(i);
        any_free = 1'b1;
      end
  end
  assign free1 = any_free;
  assign free2 = any_free && (lo_free != hi_free);

  always_comb begin
    rd_match = 1'b0;
    rd_idx   = '0;
    for (int i = DEPTH - 1; i >= 0; i--)
      if (st[i] == LOC_VALID && tid[i] == rd_id) begin
        rd_match = 1'b1;
        rd_idx   = AW'(i);
      end
  end
  assign rd_hit = hits[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        st[i]   <= LOC_FREE;
        hits[i] <= '0;
        tid[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (st[i] == LOC_WAIT) begin
          if (age[i] == latency) begin
            if (trig) begin
              st[i]  <= LOC_VALID;
              tid[i] <= trig_id;
            end else begin
              st[i] <= LOC_FREE;
            end
          end else if (age[i] > latency) begin
            st[i] <= LOC_FREE;
          end
        end
      end
      if (rd_ack && rd_match) st[rd_idx] <= LOC_FREE;
      if (wr0 && any_free) begin
        st[lo_free]   <= LOC_WAIT;
        hits[lo_free] <= wr0_hit;
      end
      if (wr1 && free2) begin
        st[hi_free]   <= LOC_WAIT;
        hits[hi_free] <= wr1_hit;
      end
    end
  end

  // readout rule: a location is only acknowledged while a matching hit is shown
  a_ack_needs_match: assert property (@(posedge clk) disable iff (!rst_n) rd_ack |-> rd_match);
endmodule
