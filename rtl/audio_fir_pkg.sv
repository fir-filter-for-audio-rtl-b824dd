// audio_fir_pkg - types and constants shared by the audio FIR filter system.
//
// Holds the audio sample type, the eight low-pass FIR coefficients, and the
// codec configuration table that the I2C initialisation block sends after
// reset. The coefficient values, the codec's chip address, the register
// addresses and the register data follow the published design; the order in
// which the registers are written after the first (reset) word is this
// design's choice.
package audio_fir_pkg;

  // One audio sample as carried between the blocks: 16-bit two's complement.
  localparam int unsigned SAMPLE_W = 16;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Low-pass FIR: eight taps, 16-bit signed coefficients, symmetric.
  localparam int unsigned NTAPS   = 8;
  localparam int unsigned COEFF_W = 16;
  typedef logic signed [COEFF_W-1:0] coeff_t;
  typedef coeff_t coeff_array_t [NTAPS];
  localparam coeff_array_t FIR_COEFFS = '{
    -16'sd1260, 16'sd7827, 16'sd12471, 16'sd16384,
     16'sd16384, 16'sd12471, 16'sd7827, -16'sd1260
  };

  // Codec (WM8731) control port. The first byte of every word is the 7-bit
  // chip address followed by R/W = 0 (write): 0011010_0.
  localparam logic [7:0] CODEC_ADDR_WR = 8'h34;

  // One configuration word: 7-bit register address and 9-bit register data.
  // On the wire it becomes {CODEC_ADDR_WR, reg_addr, reg_data} = 24 bits.
  typedef struct packed {
    logic [6:0] reg_addr;
    logic [8:0] reg_data;
  } cfg_word_t;

  localparam int unsigned NUM_CFG_WORDS = 11;
  typedef cfg_word_t cfg_table_t [NUM_CFG_WORDS];

  // Sent in this order: reset first, then R0..R9, the interface
  // activation (R9) last.
  localparam cfg_table_t CODEC_CFG = '{
    '{reg_addr: 7'h0F, reg_data: 9'b000000000},  // R15 reset the device
    '{reg_addr: 7'h00, reg_data: 9'b000011111},  // R0  left line in: mute, volume
    '{reg_addr: 7'h01, reg_data: 9'b000110111},  // R1  right line in: mute, volume
    '{reg_addr: 7'h02, reg_data: 9'b001111001},  // R2  left headphone out volume
    '{reg_addr: 7'h03, reg_data: 9'b000110000},  // R3  right headphone out volume
    '{reg_addr: 7'h04, reg_data: 9'b011010010},  // R4  analogue audio path
    '{reg_addr: 7'h05, reg_data: 9'b000000001},  // R5  digital audio path
    '{reg_addr: 7'h06, reg_data: 9'b001100010},  // R6  power down control
    '{reg_addr: 7'h07, reg_data: 9'b001000011},  // R7  interface format, 16-bit words
    '{reg_addr: 7'h08, reg_data: 9'b000100000},  // R8  sampling control, 44.1 kHz
    '{reg_addr: 7'h09, reg_data: 9'b000000001}   // R9  activate the interface
  };

endpackage
