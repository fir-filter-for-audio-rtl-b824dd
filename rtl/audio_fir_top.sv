// audio_fir_top - audio low-pass filter system around a WM8731 codec.
//
// The codec turns the analogue line input into a serial stream of 16-bit
// samples and turns a serial stream back into the analogue output. This top
// filters the left channel on its way through:
//
//   codec_init   configures the codec over I2C once after reset
//   s2p_adapter  serial -> parallel for the ADC stream, parallel -> serial
//                for the DAC stream, in the CLOCK_50 domain
//   fir_filter   eight-tap low-pass FIR between the two channels
//
// The adapter and the filter are joined by two Strobe/Ready handshakes in
// which Ready = 1 means busy: ADCDAT/ADCstb/ADCrdy towards the filter and
// DACDAT/DACstb/DACrdy back. A sample read in one codec frame is filtered
// within 20 clocks and sent to the codec in the next frame.
//
// Pins: the codec's control port (I2C_SCLK, and SDIN as the open-drain pair
// I2C_SDAT_oe = pull low / I2C_SDAT_i = level on the pin) and its digital
// audio port, where the codec is the bit-clock master (AUD_BCLK and both
// LRCKs are inputs). The codec's master clock comes from a clock block
// outside this design. init_done and init_ack_error report the
// configuration. The three-block split follows the published design; the
// pin-level details are this design's own.
module audio_fir_top
  import audio_fir_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned I2C_HZ  = 100_000,
  parameter int unsigned ACC_W   = 35,
  parameter int unsigned OUT_LSB = 16
) (
  input  logic CLOCK_50,
  input  logic RST_N,
  // codec control port
  output logic I2C_SCLK,
  output logic I2C_SDAT_oe,
  input  logic I2C_SDAT_i,
  // codec digital audio port
  input  logic AUD_BCLK,
  input  logic AUD_ADCLRCK,
  input  logic AUD_ADCDAT,
  input  logic AUD_DACLRCK,
  output logic AUD_DACDAT,
  // status
  output logic init_done,
  output logic init_ack_error
);

  sample_t adc_data, dac_data;
  logic    adc_stb, adc_rdy, dac_stb, dac_rdy;

  codec_init #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ)) u_init (
    .clk       (CLOCK_50),
    .rst_n     (RST_N),
    .sclk      (I2C_SCLK),
    .sdin_oe   (I2C_SDAT_oe),
    .sdin_i    (I2C_SDAT_i),
    .done      (init_done),
    .ack_error (init_ack_error)
  );

  s2p_adapter u_s2p (
    .CLOCK_50    (CLOCK_50),
    .RST_N       (RST_N),
    .AUD_BCLK    (AUD_BCLK),
    .AUD_ADCLRCK (AUD_ADCLRCK),
    .AUD_ADCDAT  (AUD_ADCDAT),
    .AUD_DACLRCK (AUD_DACLRCK),
    .AUD_DACDAT  (AUD_DACDAT),
    .ADCDAT      (adc_data),
    .ADCstb      (adc_stb),
    .ADCrdy      (adc_rdy),
    .DACDAT      (dac_data),
    .DACstb      (dac_stb),
    .DACrdy      (dac_rdy)
  );

  fir_filter #(.ACC_W(ACC_W), .OUT_LSB(OUT_LSB)) u_fir (
    .clk      (CLOCK_50),
    .rst_n    (RST_N),
    .data_in  (adc_data),
    .stb_in   (adc_stb),
    .rdy_in   (adc_rdy),
    .data_out (dac_data),
    .stb_out  (dac_stb),
    .rdy_out  (dac_rdy)
  );

endmodule
