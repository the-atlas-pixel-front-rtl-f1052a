// self_trigger: turns the fast hit-OR into a delayed level-1 trigger.
//
// A rising edge of `hitor` (the OR of the enabled pixels' discriminator outputs)
// enters a MAX_DELAY stage shift line; `trig` is the edge delayed by `delay`
// clock cycles (delay 0: the same cycle). Several edges can be in flight at once.
// Setting `delay` equal to the trigger latency makes the trigger select exactly
// the bunch crossing of the hit that produced the edge. `en` gates the output.
// Using the delayed hit-OR as a trigger follows the chip description; the shift
// line and the 8 bit delay code are this design's choices.
module self_trigger #(
  parameter int MAX_DELAY = 256,
  parameter int DW        = $clog2(MAX_DELAY)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] delay,
  input  logic          hitor,
  output logic          trig
);
  logic                 hitor_q, edge_now;
  logic [MAX_DELAY-2:0] line;

  assign edge_now = hitor && !hitor_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hitor_q <= 1'b0;
      line    <= '0;
    end else begin
      hitor_q <= hitor;
      line    <= {line[MAX_DELAY-3:0], edge_now};
    end
  end

  always_comb begin
    if (delay == '0) trig = en && edge_now;
    else if (int'(delay) <= MAX_DELAY - 1) trig = en && line[delay - 1'b1];
    else trig = 1'b0;
  end
endmodule
