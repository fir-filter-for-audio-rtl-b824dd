// codec_init - I2C master that configures the WM8731 audio codec after reset.
//
// The codec starts in no usable configuration, so after reset this block
// writes the eleven words of audio_fir_pkg::CODEC_CFG over the control port
// (SCLK, SDIN), then sets done and leaves the bus idle (both lines high).
//
// Each word is one I2C transaction of 29 bit slots, counted down by bcnt:
//   28      start - SDIN falls while SCLK is high
//   27..20  chip address 0011010 and R/W = 0, MSB first
//   19      acknowledge - SDIN released, the codec pulls it low
//   18..11  register address (7 bits) and register data bit 8
//   10      acknowledge
//    9..2   register data bits 7..0
//    1      acknowledge
//    0      stop - SDIN rises while SCLK is high
// wcnt counts the words down from 10 to 0. Every slot lasts four quarter
// periods of SCLK, each CLK_HZ / (4 * I2C_HZ) clocks long: SCLK is low for
// quarters 0-1 and high for 2-3; SDIN changes in quarter 1, in the middle of
// SCLK low; a stop raises SDIN in quarter 3. In an acknowledge slot SDIN is sampled in quarter 2; a high level
// (no acknowledge) sets the sticky ack_error flag. The writes carry on
// regardless, since nothing is said about retrying.
//
// SDIN is driven open-drain: sdin_oe = 1 pulls the pin low, sdin_oe = 0
// releases it and the pull-up makes it high (a 1 bit, the acknowledge
// slots, the idle bus); sdin_i is the level on the pin. The pin is
// therefore never driven high against the codec's acknowledge.
//
// Timing: with the defaults (50 MHz clock, 100 kHz SCLK) one word takes
// 29 * 4 * 125 clocks and the whole configuration 159,500 clocks (3.19 ms).
//
// The word layout, the slot numbering, the eleven register values and the
// start/stop conditions follow the published design; the SCLK rate (below
// the codec's 500 kHz maximum), the quarter-period scheme, the order of the
// words after the first and the ack_error flag are this design's own.
module codec_init
  import audio_fir_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned I2C_HZ = 100_000
) (
  input  logic clk,
  input  logic rst_n,       // asynchronous, active low
  output logic sclk,
  output logic sdin_oe,     // 1 = pull SDIN low
  input  logic sdin_i,
  output logic done,        // all words written
  output logic ack_error    // some byte was not acknowledged
);

  localparam int unsigned QUARTER = CLK_HZ / (4 * I2C_HZ);
  localparam int unsigned DIV_W   = (QUARTER > 1) ? $clog2(QUARTER) : 1;
  localparam int unsigned WCNT_W  = $clog2(NUM_CFG_WORDS);

  initial assert (QUARTER >= 1) else $error("codec_init: I2C_HZ too high for CLK_HZ");

  typedef enum logic [2:0] {SL_START, SL_DATA, SL_ACK, SL_STOP} slot_t;

  logic [DIV_W-1:0]  f_div;
  logic              tick;
  logic [4:0]        bcnt;
  logic [1:0]        phase;
  logic [WCNT_W-1:0] wcnt;
  logic              busy;

  cfg_word_t         cfg;
  logic [23:0]       word;
  slot_t             slot;
  logic              bit_val;

  // Quarter-period divider.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          f_div <= '0;
    else if (f_div == DIV_W'(QUARTER-1)) f_div <= '0;
    else                                 f_div <= f_div + 1'b1;
  end
  assign tick = (f_div == DIV_W'(QUARTER-1));

  // The word being sent and the meaning of the current slot.
  always_comb begin
    cfg  = CODEC_CFG[(NUM_CFG_WORDS - 1) - int'(wcnt)];
    word = {CODEC_ADDR_WR, cfg.reg_addr, cfg.reg_data};
    unique case (bcnt)
      5'd28:               slot = SL_START;
      5'd19, 5'd10, 5'd1:  slot = SL_ACK;
      5'd0:                slot = SL_STOP;
      default:             slot = SL_DATA;
    endcase
    if (bcnt >= 5'd20)      bit_val = word[bcnt - 5'd4];
    else if (bcnt >= 5'd11) bit_val = word[bcnt - 5'd3];
    else                    bit_val = word[(bcnt >= 5'd2) ? bcnt - 5'd2 : 5'd0];
  end

  // Position (wcnt, bcnt, phase) and registered pin drive.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b1;
      done      <= 1'b0;
      ack_error <= 1'b0;
      wcnt      <= WCNT_W'(NUM_CFG_WORDS - 1);
      bcnt      <= 5'd28;
      phase     <= 2'd0;
      sclk      <= 1'b1;
      sdin_oe   <= 1'b0;
    end else if (busy && tick) begin
      // drive the pins for the current quarter
      unique case (slot)
        SL_START: begin
          sclk    <= 1'b1;
          sdin_oe <= phase[1];
        end
        SL_DATA: begin
          sclk <= phase[1];
          if (phase == 2'd1) sdin_oe <= !bit_val;
        end
        SL_ACK: begin
          sclk <= phase[1];
          if (phase == 2'd1) sdin_oe <= 1'b0;
          if (phase == 2'd3 && sdin_i) ack_error <= 1'b1;  // read during quarter 2
        end
        SL_STOP: begin
          sclk <= phase[1];
          if (phase == 2'd1) sdin_oe <= 1'b1;
          if (phase == 2'd3) sdin_oe <= 1'b0;
        end
        default: ;
      endcase
      // advance
      phase <= phase + 1'b1;
      if (phase == 2'd3) begin
        if (bcnt != 5'd0) begin
          bcnt <= bcnt - 1'b1;
        end else if (wcnt != '0) begin
          bcnt <= 5'd28;
          wcnt <= wcnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
