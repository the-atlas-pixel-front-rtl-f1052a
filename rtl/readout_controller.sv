// readout_controller: builds one event per pending trigger.
//
// While the trigger FIFO holds a pending trigger, the controller sends a
// start-of-event word carrying its trigger number, then every EoC hit tagged with
// that number, column pair 0 first, then an end-of-event word with status bits,
// and finally pops the trigger. Every word goes to the serializer with a
// valid/ready handshake; a hit is freed in its EoC pool (`rd_ack`) in the cycle
// its word is accepted. Word formats (WORD_W = 24, two type bits first):
//   start of event  {2'b10, 18'b0, l1id[3:0]}
//   hit             {2'b01, 1'b0, column[4:0], row[7:0], tot[7:0]}
//   end of event    {2'b11, 12'b0, eoc_overflow, trigger_overflow, hit_count[7:0]}
// eoc_overflow is the OR of the column pairs' overflow warnings; both warnings are
// cleared (`ovf_clr`) when the end-of-event word is accepted. The order of the
// words and the content of a hit follow the chip description; the bit layout,
// the status bits chosen and the scan order are this design's.
module readout_controller
  import fei_pkg::*;
#(
  parameter int N_CP = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pending,
  input  logic [L1ID_W-1:0] head_id,
  output logic              pop,
  output logic [L1ID_W-1:0] rd_id,
  input  logic [N_CP-1:0]   rd_match,
  input  eoc_hit_t          rd_hit [N_CP],
  output logic [N_CP-1:0]   rd_ack,
  input  logic [N_CP-1:0]   eoc_ovf,
  input  logic              trig_ovf,
  output logic              ovf_clr,
  output logic              valid,
  output logic [WORD_W-1:0] word,
  input  logic              ready
);
  typedef enum logic [1:0] {RO_IDLE, RO_SOE, RO_HITS, RO_EOE} ro_state_e;
  ro_state_e  state;
  logic [7:0] hitcnt;
  logic       any;
  int         cp;

  assign rd_id = head_id;

  always_comb begin
    any = 1'b0;
    cp  = 0;
    for (int i = N_CP - 1; i >= 0; i--)
      if (rd_match[i]) begin
        any = 1'b1;
        cp  = i;
      end
  end

  always_comb begin
    valid   = 1'b0;
    word    = '0;
    rd_ack  = '0;
    pop     = 1'b0;
    ovf_clr = 1'b0;
    unique case (state)
      RO_SOE: begin
        valid = 1'b1;
        word  = {WT_SOE, 18'b0, head_id};
      end
      RO_HITS: if (any) begin
        valid = 1'b1;
        word  = {WT_HIT, 1'b0, COL_W'(2 * cp + int'(rd_hit[cp].col)), rd_hit[cp].row, rd_hit[cp].tot};
        rd_ack[cp] = ready;
      end
      RO_EOE: begin
        valid   = 1'b1;
        word    = {WT_EOE, 12'b0, |eoc_ovf, trig_ovf, hitcnt};
        pop     = ready;
        ovf_clr = ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= RO_IDLE;
      hitcnt <= '0;
    end else begin
      unique case (state)
        RO_IDLE: if (pending) state <= RO_SOE;
        RO_SOE:  if (ready) begin
          state  <= RO_HITS;
          hitcnt <= '0;
        end
        RO_HITS: if (!any) state <= RO_EOE;
                 else if (ready) hitcnt <= hitcnt + 1'b1;
        RO_EOE:  if (ready) state <= RO_IDLE;
        default: state <= RO_IDLE;
      endcase
    end
  end
endmodule
