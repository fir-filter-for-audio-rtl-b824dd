// tb_s2p_adapter - self-checking testbench for s2p_adapter.
//
// A codec model drives the serial audio port with random left and right
// words. The testbench plays the FIR's part on the parallel side: it checks
// every ADCDAT word against the left word the codec sent, with the right
// channel ignored; it checks that ADCstb rises 3 CLOCK_50 edges after the
// rising BCLK edge that read bit 0, lasts one cycle when ADCrdy is low, and
// holds while ADCrdy is high. It hands each received word back, offset by a
// constant, through DACDAT/DACstb, and checks the word the codec reads on the
// DAC side in the next frame. Once the FIR's part stays busy across two
// words: the newer word must replace the older. Frames without a DACLRCK pulse check that
// DACrdy stays busy and that the next frame sends the held word.
module tb_s2p_adapter;
  import audio_fir_pkg::*;

  logic    CLOCK_50 = 1'b0;
  logic    RST_N = 1'b0;
  logic    AUD_BCLK, AUD_ADCLRCK, AUD_ADCDAT, AUD_DACLRCK, AUD_DACDAT;
  sample_t ADCDAT, DACDAT;
  logic    ADCstb, ADCrdy, DACstb, DACrdy;

  int checks = 0, failures = 0;

  s2p_adapter dut (.*);

  // codec model
  logic [8:0]  regs [16];
  logic [15:0] word_log [16];
  int          words_written, nacks, starts, stops;
  logic        sdin_pull_low;
  logic        run = 1'b0;
  sample_t     adc_left, adc_right, adc_sent, dac_left;
  int          adc_frames, dac_frames;
  logic        skip_dac_frame = 1'b0;

  wm8731_model #(.BCLK_HALF_NS(85), .FRAME_BCLKS(64)) codec (
    .sclk(1'b1), .sdin(1'b1), .sdin_pull_low, .regs, .word_log,
    .words_written, .nacks, .starts, .stops,
    .run, .bclk(AUD_BCLK), .adclrck(AUD_ADCLRCK), .daclrck(AUD_DACLRCK),
    .adcdat(AUD_ADCDAT), .dacdat(AUD_DACDAT),
    .adc_left, .adc_right, .skip_dac_frame, .adc_sent, .adc_frames,
    .dac_left, .dac_frames
  );

  always #10 CLOCK_50 = ~CLOCK_50;

  localparam int NFRAMES = 120;

  initial begin
    repeat (400_000) @(posedge CLOCK_50);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The codec takes a new random left/right pair at each frame start.
  sample_t sent_q [$];
  always @(adc_frames) if (adc_frames > 0) begin
    sent_q.push_back(adc_sent);
    adc_left  = sample_t'($urandom);
    adc_right = sample_t'($urandom);
    skip_dac_frame = (adc_frames % 20 == 10);
  end

  // Time of the last rising BCLK edge, in CLOCK_50 edges.
  int cyc = 0, last_bclk_rise_cyc = 0;
  always @(posedge CLOCK_50) cyc++;
  always @(posedge AUD_BCLK) last_bclk_rise_cyc = cyc;

  // ADC side: FIR role, random busy periods.
  int      adc_words = 0, adc_stalls = 0;
  sample_t back_q [$];
  int      busy_left = 0;
  logic    prev_stb = 1'b0, just_took = 1'b0;
  logic    long_busy = 1'b0, long_busy_done = 1'b0;
  int      overruns = 0;

  always @(negedge CLOCK_50) begin
    if (busy_left > 0) busy_left--;
    if (busy_left == 0 && long_busy) begin long_busy = 1'b0; long_busy_done = 1'b1; end
    ADCrdy <= (busy_left > 0);
  end

  always @(posedge CLOCK_50) if (RST_N) begin
    // Sampled here before the edge: a strobe raised by edge 3 is first seen at edge 4.
    if (ADCstb && !prev_stb) begin
      checks++;
      if (cyc - last_bclk_rise_cyc != 4) begin
        failures++;
        $display("ERROR: ADCstb rose %0d clock edges after the BCLK edge, expected 3",
                 cyc - last_bclk_rise_cyc - 1);
      end
    end
    if (just_took) begin
      checks++;
      if (ADCstb) begin
        failures++;
        $display("ERROR: ADCstb still high after the word was taken");
      end
    end
    just_took <= 1'b0;
    if (ADCstb && ADCrdy) adc_stalls++;
    if (ADCstb && !ADCrdy) begin
      sample_t e;
      checks++;
      adc_words++;
      just_took <= 1'b1;
      e = sent_q.pop_front();
      // After the long busy spell the older word must have been replaced.
      if (long_busy_done && sent_q.size() > 0 && ADCDAT === sent_q[0] && ADCDAT !== e) begin
        overruns++;
        e = sent_q.pop_front();
      end
      long_busy_done = 1'b0;
      if (ADCDAT !== e) begin
        failures++;
        $display("ERROR: ADCDAT %h, expected %h", ADCDAT, e);
      end
      back_q.push_back(ADCDAT + 16'sd3);
      if (adc_words == 60) begin
        busy_left = 1300;  // busy across two words: the newer must replace the older
        long_busy = 1'b1;
      end else if (adc_words % 7 == 3) busy_left = 600;  // busy when the next word comes
    end
    prev_stb <= ADCstb;
  end

  // DAC side: hand each word back as soon as the adapter is not busy.
  sample_t dac_expect_q [$];
  int      dac_offered = 0, dacrdy_busy = 0;
  initial begin
    DACstb = 1'b0;
    DACDAT = '0;
    forever begin
      @(negedge CLOCK_50);
      if (back_q.size() > 0) begin
        DACDAT = back_q.pop_front();
        DACstb = 1'b1;
        while (DACrdy) begin dacrdy_busy++; @(negedge CLOCK_50); end
        @(negedge CLOCK_50);
        DACstb = 1'b0;
        dac_expect_q.push_back(DACDAT);
        dac_offered++;
      end
    end
  end

  // Each DAC frame sends either the next handed-back word, in order, or
  // repeats the last one when none has arrived. No word may be lost.
  sample_t last_dac = '0;
  int      dac_checked = 0, dac_repeats = 0;
  always @(dac_frames) if (dac_frames > 0) begin
    checks++;
    dac_checked++;
    if (dac_expect_q.size() > 0 && dac_left === dac_expect_q[0]) begin
      void'(dac_expect_q.pop_front());
    end else if (dac_left === last_dac) begin
      dac_repeats++;
    end else begin
      failures++;
      $display("ERROR: codec read DAC word %h, expected %h or a repeat of %h",
               dac_left, dac_expect_q.size() ? dac_expect_q[0] : 16'h0, last_dac);
    end
    last_dac = dac_left;
  end

  initial begin
    adc_left = '0;
    adc_right = '0;
    repeat (4) @(posedge CLOCK_50);
    RST_N = 1'b1;
    run = 1'b1;
    wait (adc_frames == NFRAMES);
    repeat (2000) @(posedge CLOCK_50);
    checks++;
    if (adc_words < NFRAMES - 4) begin
      failures++;
      $display("ERROR: only %0d ADC words for %0d frames", adc_words, NFRAMES);
    end
    checks++;
    if (adc_stalls == 0 || dacrdy_busy == 0) begin
      failures++;
      $display("ERROR: a handshake never stalled (adc %0d, dac %0d)", adc_stalls, dacrdy_busy);
    end
    checks++;
    if (overruns != 1) begin
      failures++;
      $display("ERROR: %0d replaced ADC words seen, expected 1", overruns);
    end
    checks++;
    if (dac_expect_q.size() > 1) begin
      failures++;
      $display("ERROR: %0d handed-back words never reached the codec", dac_expect_q.size());
    end
    $display("adc words %0d, adc stall cycles %0d, dac frames %0d, DACrdy busy cycles %0d",
             adc_words, adc_stalls, dac_checked, dacrdy_busy);
    $display("dac repeats %0d, replaced adc words %0d", dac_repeats, overruns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
