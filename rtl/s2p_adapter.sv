// s2p_adapter - serial/parallel adapter between the codec's digital audio
// interface and the FIR filter.
//
// Input channel (serial to parallel): the codec sends each sample MSB first
// on AUD_ADCDAT, one bit per AUD_BCLK cycle, in the codec's DSP format: a
// one-BCLK-cycle pulse on AUD_ADCLRCK marks the frame, the left-channel word
// follows, then the right-channel word, then idle bits until the next pulse.
// Bits are read on the rising BCLK edge, in the middle of the bit. A rising
// edge that sees LRCK high starts a frame; the next 16 rising edges read bits
// 15..0 of the left channel. The right channel is ignored: only the left one
// is filtered. The finished word goes out on ADCDAT with ADCstb.
//
// Output channel (parallel to serial): a filtered word offered on DACDAT with
// DACstb is taken into a holding register when DACrdy is low. The frame on
// the DAC side is marked by AUD_DACLRCK the same way; from the falling BCLK
// edge that follows a rising edge with DACLRCK high, the held word is shifted
// out on AUD_DACDAT, MSB first, one bit per falling edge, so that the codec
// reads it on rising edges. After 16 bits AUD_DACDAT stays 0 (a silent right
// channel). A frame that arrives before a new word repeats the last one.
//
// Parallel handshakes: Strobe/Ready, Ready meaning *busy*.
//   ADCstb rises one CLOCK_50 cycle after the 16th bit and stays high until
//   an edge with ADCrdy low (a single cycle when the filter is idle). A word
//   completed while the previous one still waits replaces it.
//   DACrdy is high while the holding register has a word that has not yet
//   been loaded into the shifter.
//
// Timing: everything runs on CLOCK_50. AUD_BCLK, both LRCKs and AUD_ADCDAT
// pass through a two-flop synchroniser, and AUD_DACDAT is registered, so
// AUD_DACDAT changes 3 CLOCK_50 cycles after a BCLK falling edge; a BCLK
// half period must therefore be longer than 4 CLOCK_50 cycles.
//
// The channels, the bit order, the read-on-rising / write-on-falling rule,
// the left-only choice, the port names and the Strobe/Ready scheme follow the
// published design; the frame alignment in clocks, the holding register, the
// "newest word wins" rule and the silent right channel are this design's own.
module s2p_adapter
  import audio_fir_pkg::*;
(
  input  logic    CLOCK_50,
  input  logic    RST_N,        // asynchronous, active low
  // digital audio interface (codec side)
  input  logic    AUD_BCLK,
  input  logic    AUD_ADCLRCK,
  input  logic    AUD_ADCDAT,
  input  logic    AUD_DACLRCK,
  output logic    AUD_DACDAT,
  // parallel interface, input channel (to the FIR)
  output sample_t ADCDAT,
  output logic    ADCstb,
  input  logic    ADCrdy,       // 1 = FIR busy
  // parallel interface, output channel (from the FIR)
  input  sample_t DACDAT,
  input  logic    DACstb,
  output logic    DACrdy        // 1 = adapter busy
);

  localparam int unsigned CNT_W = $clog2(SAMPLE_W);

  // ---------------------------------------------------------------- sync
  logic bclk_s, adclrc_s, adcdat_s, daclrc_s, bclk_q;
  logic bclk_rise, bclk_fall;

  sync_2ff #(.WIDTH(4)) u_sync (
    .clk      (CLOCK_50),
    .rst_n    (RST_N),
    .async_in ({AUD_BCLK, AUD_ADCLRCK, AUD_ADCDAT, AUD_DACLRCK}),
    .sync_out ({bclk_s,   adclrc_s,    adcdat_s,   daclrc_s})
  );

  always_ff @(posedge CLOCK_50 or negedge RST_N) begin
    if (!RST_N) bclk_q <= 1'b0;
    else        bclk_q <= bclk_s;
  end

  assign bclk_rise = bclk_s & ~bclk_q;
  assign bclk_fall = ~bclk_s & bclk_q;

  // ------------------------------------------------------- input channel
  logic                adc_active;
  logic [CNT_W-1:0]    adc_cnt;
  logic [SAMPLE_W-2:0] adc_sr;      // the first 15 bits of a word
  logic                adc_pend;

  always_ff @(posedge CLOCK_50 or negedge RST_N) begin
    if (!RST_N) begin
      adc_active <= 1'b0;
      adc_cnt    <= '0;
      adc_sr     <= '0;
      adc_pend   <= 1'b0;
      ADCDAT     <= '0;
    end else begin
      if (adc_pend && !ADCrdy) adc_pend <= 1'b0;
      if (bclk_rise) begin
        if (adclrc_s) begin
          adc_active <= 1'b1;
          adc_cnt    <= '0;
        end else if (adc_active) begin
          adc_sr  <= {adc_sr[SAMPLE_W-3:0], adcdat_s};
          adc_cnt <= adc_cnt + 1'b1;
          if (adc_cnt == CNT_W'(SAMPLE_W - 1)) begin
            adc_active <= 1'b0;
            ADCDAT     <= {adc_sr, adcdat_s};
            adc_pend   <= 1'b1;
          end
        end
      end
    end
  end

  assign ADCstb = adc_pend;

  // ------------------------------------------------------ output channel
  sample_t             dac_hold;
  logic                dac_full;
  logic                dac_arm, dac_active;
  logic [CNT_W-1:0]    dac_cnt;
  logic [SAMPLE_W-1:0] dac_sr;
  logic                dac_take;

  assign dac_take = DACstb && !dac_full;

  always_ff @(posedge CLOCK_50 or negedge RST_N) begin
    if (!RST_N) begin
      dac_hold   <= '0;
      dac_full   <= 1'b0;
      dac_arm    <= 1'b0;
      dac_active <= 1'b0;
      dac_cnt    <= '0;
      dac_sr     <= '0;
      AUD_DACDAT <= 1'b0;
    end else begin
      if (dac_take) begin
        dac_hold <= DACDAT;
        dac_full <= 1'b1;
      end
      if (bclk_rise && daclrc_s) dac_arm <= 1'b1;
      if (bclk_fall) begin
        if (dac_arm) begin
          dac_arm    <= 1'b0;
          dac_sr     <= dac_hold;
          dac_full   <= dac_take;  // a word taken in this cycle stays held
          dac_active <= 1'b1;
          dac_cnt    <= '0;
          AUD_DACDAT <= dac_hold[SAMPLE_W-1];
        end else if (dac_active) begin
          if (dac_cnt == CNT_W'(SAMPLE_W - 1)) begin
            dac_active <= 1'b0;
            AUD_DACDAT <= 1'b0;
          end else begin
            dac_sr     <= {dac_sr[SAMPLE_W-2:0], 1'b0};
            dac_cnt    <= dac_cnt + 1'b1;
            AUD_DACDAT <= dac_sr[SAMPLE_W-2];
          end
        end
      end
    end
  end

  assign DACrdy = dac_full;

  // Handshake rule: a raised strobe holds, with stable data, until taken.
  a_adcstb_holds: assert property (@(posedge CLOCK_50) disable iff (!RST_N)
    ADCstb && ADCrdy && !(bclk_rise && adc_active) |=> ADCstb && $stable(ADCDAT));

endmodule
