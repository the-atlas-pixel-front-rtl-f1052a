// pixel_hit_logic: digital readout part of one pixel cell.
//
// The discriminator output (sampled with the 40 MHz clock) is gated by the mask
// bit; in digital-injection mode the injection strobe of pixels whose inject bit
// is set replaces it. On the rising edge of that signal the current Gray time
// stamp is written into the leading-edge RAM cell, on the falling edge into the
// trailing-edge cell, and the hit flag is raised. Only one hit is held: further
// edges are ignored until the column logic pulses `clr` (one cycle), after which
// the pixel waits for a new rising edge. `hitbus` is the fast-OR contribution
// (gated signal AND hit-bus enable). `id` is the pixel's hard-wired address.
// Timing: a pulse that is high in samples n..n+k-1 stores le = ts(n),
// te = ts(n+k), and `hit` is high from the cycle after sample n+k.
// The edge recording and the single-hit store follow the chip description; the
// synchronous sampling and the gating order are this design's choices.
module pixel_hit_logic
  import fei_pkg::*;
#(
  parameter logic [ROW_W:0] PIX_ID = '0   // {row, column in pair}
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            disc,        // discriminator output
  input  logic            inj_strobe,  // injection strobe
  input  logic            dig_inject,  // global: strobe acts after the discriminator
  input  pix_cfg_t        cfg,
  input  logic [TS_W-1:0] ts_gray,
  input  logic            clr,
  output logic            hit,
  output logic [TS_W-1:0] le,
  output logic [TS_W-1:0] te,
  output logic [ROW_W:0]  id,
  output logic            hitbus
);
  typedef enum logic [1:0] {PX_IDLE, PX_HIGH, PX_HIT} px_state_e;
  px_state_e state;
  logic      sig, sig_q;

  assign sig    = dig_inject ? (inj_strobe & cfg.inject) : (disc & ~cfg.mask);
  assign hitbus = sig & cfg.hitbus_en;
  assign hit    = (state == PX_HIT);
  assign id     = PIX_ID;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PX_IDLE;
      sig_q <= 1'b0;
      le    <= '0;
      te    <= '0;
    end else begin
      sig_q <= sig;
      unique case (state)
        PX_IDLE: if (sig && !sig_q) begin
          le    <= ts_gray;
          state <= PX_HIGH;
        end
        PX_HIGH: if (!sig) begin
          te    <= ts_gray;
          state <= PX_HIT;
        end
        PX_HIT: if (clr) state <= PX_IDLE;
        default: state <= PX_IDLE;
      endcase
    end
  end
endmodule
