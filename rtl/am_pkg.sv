// am_pkg: widths and constants shared by the DDS-based amplitude modulator.
//
// The modulator runs every block from one 50 MHz clock. Both synthesizers use a
// 24-bit phase accumulator (frequency step 50 MHz / 2^24 = 2.98 Hz) whose top
// 13 bits address an 8192 x 8 sine table. Samples leave the table in offset
// binary (128 = zero) and are made two's complement by subtracting 128.
// The amplitude modulator works on 16- and 24-bit signed intermediates and the
// scaler brings the result back to 8-bit offset binary for the DAC.
// All numbers here follow the design description; the sine amplitude of 127
// (rather than 127.5, set in sine_rom) is this design's own choice.
package am_pkg;

  localparam int unsigned PHASE_W   = 24;   // accumulator width n
  localparam int unsigned ROM_AW    = 13;   // 8192-entry sine table
  localparam int unsigned SAMPLE_W  = 8;    // ROM, DAC and m_mod width
  localparam int unsigned PROD_W    = 16;   // MOD x m product
  localparam int unsigned WIDE_W    = 24;   // modulator and scaler word

  localparam int          OFFSET    = 128;  // offset-binary zero
  localparam int          M_DIV     = 100;  // m is given in percent
  localparam int          CAR_DIV   = 127;  // rescales MOD*m/100 * CAR to 8 bits
  localparam int          SCALE_DIV = 2;    // carrier + sidebands need one bit more

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0]   prod_t;
  typedef logic signed [WIDE_W-1:0]   wide_t;

endpackage
