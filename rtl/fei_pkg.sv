// fei_pkg: types, sizes and helper functions shared by the FEI readout logic.
//
// Sizes that come from the chip description: 8 bit time stamps, 14 configuration
// bits per pixel, 160 rows, 18 columns grouped in 9 column pairs, 64 end-of-column
// buffer locations per pair. The trigger-number width, the readout word format and
// the layout of the global register are choices of this design.
package fei_pkg;

  localparam int TS_W      = 8;   // Gray time stamp / ToT width
  localparam int L1ID_W    = 4;   // trigger number width (design choice)
  localparam int ROW_W     = 8;   // enough for 160 rows
  localparam int COL_W     = 5;   // enough for 18 columns
  localparam int WORD_W    = 24;  // readout word width (design choice)
  localparam int N_PIXCFG  = 14;  // configuration cells per pixel

  // Per-pixel configuration, 14 bits. Bit index used by the pixel shift register:
  // 0..4 tdac, 5..9 fdac, 10 mask, 11 hitbus_en, 12 kill_amp, 13 inject.
  typedef struct packed {
    logic       inject;     // bit 13
    logic       kill_amp;   // bit 12
    logic       hitbus_en;  // bit 11
    logic       mask;       // bit 10
    logic [4:0] fdac;       // bits 9..5
    logic [4:0] tdac;       // bits 4..0
  } pix_cfg_t;

  // State of one end-of-column buffer location.
  typedef enum logic [1:0] {
    LOC_FREE  = 2'd0,
    LOC_WAIT  = 2'd1,   // waiting for the trigger latency to elapse
    LOC_VALID = 2'd2    // valid for readout, tagged with a trigger number
  } loc_state_e;

  // Digital time walk correction mode.
  typedef enum logic [1:0] {
    TWC_OFF     = 2'd0,
    TWC_CORRECT = 2'd1,  // small-ToT hits get leading edge - 1
    TWC_DOUBLE  = 2'd2   // small-ToT hits are stored twice: nominal and corrected
  } twc_mode_e;

  // Content of one EoC location (besides its state).
  typedef struct packed {
    logic [ROW_W-1:0]  row;
    logic              col;     // column within the pair
    logic [TS_W-1:0]   le;      // leading edge time stamp, binary, possibly corrected
    logic [TS_W-1:0]   tot;     // time over threshold in clock cycles
  } eoc_hit_t;

  // Global configuration register. The analogue DAC codes are only passed on.
  typedef struct packed {
    logic [TS_W-1:0] latency;        // trigger latency in clock cycles
    logic [TS_W-1:0] twc_cut;        // ToT below which the time walk correction applies
    twc_mode_e       twc_mode;
    logic [1:0]      xfer_rate;      // 0: 20 MHz, 1: 10 MHz, 2/3: 5 MHz pixel to EoC transfers
    logic            selftrig_en;
    logic [TS_W-1:0] selftrig_delay;
    logic            dig_inject;     // strobe acts after the discriminator
    logic            cal_high_range; // select the large injection capacitor
    logic            leak_meas_en;   // route leakage replica to the ADC bus
    logic [3:0]      mon_sel;        // analogue monitor multiplexer select
    logic [7:0]      dac_thr;        // coarse threshold
    logic [7:0]      dac_if;         // feedback current
    logic [7:0]      dac_trim_rng;   // range of the threshold tune DACs
    logic [7:0]      dac_vcal;       // calibration voltage
  } gcfg_t;

  localparam int GCFG_W = $bits(gcfg_t);

  // Readout word types (two most significant bits of a word).
  localparam logic [1:0] WT_HIT = 2'b01;
  localparam logic [1:0] WT_SOE = 2'b10;
  localparam logic [1:0] WT_EOE = 2'b11;

  function automatic logic [TS_W-1:0] gray2bin(input logic [TS_W-1:0] g);
    logic [TS_W-1:0] b;
    b[TS_W-1] = g[TS_W-1];
    for (int i = TS_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  function automatic logic [TS_W-1:0] bin2gray(input logic [TS_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

endpackage
