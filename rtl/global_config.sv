// global_config: chip-wide configuration register.
//
// A shift register as wide as gcfg_t is loaded serially (`shift`: din enters at
// the least significant end, the most significant bit leaves on `dout`), then
// copied into the working register with `load`. `read` copies the working
// register back into the shift register so all stored bits can be shifted out and
// checked. The working register drives the digital settings (latency, time walk
// cut and mode, transfer rate, self trigger, digital injection) and the codes of
// the analogue bias DACs and monitor selection. Reset loads the defaults below:
// latency 128, time walk correction off, 20 MHz transfers, DAC codes mid-scale.
// That the global settings are programmable and readable follows the chip
// description; the serial access, field order and defaults are choices here.
module global_config
  import fei_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  din,
  input  logic  shift,
  input  logic  load,
  input  logic  read,
  output logic  dout,
  output gcfg_t cfg
);
  localparam gcfg_t DEFAULTS = '{
    latency: 8'd128, twc_cut: 8'd0, twc_mode: TWC_OFF, xfer_rate: 2'd0,
    selftrig_en: 1'b0, selftrig_delay: 8'd128, dig_inject: 1'b0,
    cal_high_range: 1'b0, leak_meas_en: 1'b0, mon_sel: 4'd0,
    dac_thr: 8'd128, dac_if: 8'd128, dac_trim_rng: 8'd128, dac_vcal: 8'd128
  };

  logic [GCFG_W-1:0] sr;

  assign dout = sr[GCFG_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr  <= '0;
      cfg <= DEFAULTS;
    end else begin
      if (shift)     sr <= {sr[GCFG_W-2:0], din};
      else if (read) sr <= cfg;
      if (load && !shift) cfg <= gcfg_t'(sr);
    end
  end
endmodule
