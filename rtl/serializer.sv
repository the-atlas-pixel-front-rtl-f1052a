// serializer: sends readout words over the single serial link.
//
// The link idles at 0. A word accepted with valid/ready is sent as one start bit
// (1) followed by its WORD_W bits, most significant first, one bit per 40 MHz
// clock: WORD_W + 1 cycles per word, back to back. `ready` is high when the link
// is idle or sending the last bit of a word; a word accepted in that cycle starts
// with its start bit in the next cycle.
// The chip description only says the hits go out serially to the module
// controller; the framing and the one-bit-per-clock rate are this design's.
module serializer #(
  parameter int WORD_W = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid,
  input  logic [WORD_W-1:0] word,
  output logic              ready,
  output logic              dout
);
  logic [WORD_W:0]           sh;
  logic [$clog2(WORD_W+2)-1:0] left;

  assign ready = (left <= 1);
  assign dout  = sh[WORD_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (ready && valid) begin
      sh   <= {1'b1, word};
      left <= ($clog2(WORD_W+2))'(WORD_W + 1);
    end else if (left != '0) begin
      sh   <= {sh[WORD_W-1:0], 1'b0};
      left <= left - 1'b1;
    end else begin
      sh <= '0;
    end
  end

  // handshake rule: once offered, a word stays offered until it is taken
  a_valid_held: assert property (@(posedge clk) disable iff (!rst_n) valid && !ready |=> valid);
endmodule
