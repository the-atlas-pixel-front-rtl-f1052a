// pixel_config: configuration part of one pixel cell.
//
// Each pixel holds one bit of a shift register that runs vertically through its
// column, and 14 configuration cells (two 5 bit trim DAC codes, mask, hit-bus
// enable, amplifier kill, injection enable). With `shift` the bit moves one pixel
// along the chain (sr_in -> sr_out). With `write` the shift register bit is copied
// into the cell chosen by `sel` (0..13, see pix_cfg_t); with `read` the chosen cell
// is copied back into the shift register bit, so that it can be shifted out. All
// actions take effect on the rising clock edge; shift has priority over read, read
// over write. The cells are SEU tolerant DICE latches on the chip; here they are
// plain flip-flops cleared by reset, which is this design's reset choice.
module pixel_config
  import fei_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sr_in,
  input  logic       shift,
  input  logic       write,
  input  logic       read,
  input  logic [3:0] sel,
  output logic       sr_out,
  output pix_cfg_t   cfg
);
  logic                sr;
  logic [N_PIXCFG-1:0] cells;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr    <= 1'b0;
      cells <= '0;
    end else if (shift) begin
      sr <= sr_in;
    end else if (read) begin
      if (int'(sel) < N_PIXCFG) sr <= cells[sel];
    end else if (write) begin
      if (int'(sel) < N_PIXCFG) cells[sel] <= sr;
    end
  end

  assign sr_out = sr;
  assign cfg    = pix_cfg_t'(cells);
endmodule
