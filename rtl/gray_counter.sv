// gray_counter: free-running time stamp counter of the bunch crossing clock.
//
// A binary counter advances once per 40 MHz clock; its Gray-coded value is
// registered and distributed to all pixels, so only one bit of the pixel time
// stamp bus changes per cycle. The binary count is given out too, for the
// end-of-column comparisons. Both outputs are registered and agree in every cycle
// (gray == bin2gray(bin)). Reset clears both to 0. The 8 bit width and the Gray
// code follow the chip description; the binary output is this design's choice.
module gray_counter #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] gray,
  output logic [W-1:0] bin
);
  logic [W-1:0] nxt;
  assign nxt = bin + W'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin  <= '0;
      gray <= '0;
    end else begin
      bin  <= nxt;
      gray <= nxt ^ (nxt >> 1);
    end
  end
endmodule
