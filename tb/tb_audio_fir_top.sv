// tb_audio_fir_top - end-to-end testbench for audio_fir_top, at its default
// parameters (50 MHz clock, 100 kHz I2C, 35-bit accumulator, bits 31..16 out).
//
// A codec model sits on both codec ports. It first receives the eleven
// configuration words over I2C; once its interface has been activated (R9
// bit 0) it starts the audio frames. The left input first carries -1 (the
// filter then settles at 16'hFFFE, from the sum -70844), then full-scale and
// random words. Every left word read back on the DAC side is compared, in
// order, with a reference filter computed here from the words sent; a frame
// that brings no new word must repeat the previous one, and no word may be
// lost. Once, the codec leaves out two DACLRCK pulses in a row, which
// stalls the filter's output handshake and then the adapter's input
// handshake (the extra frame of delay stays, as both sides run at the same
// rate, and a second such gap would overwrite an ADC word); the testbench counts each mechanism (I2C start, stop and
// acknowledge, both stalls, repeated DAC words) and fails if one never
// happened. It also checks that a result is offered to the adapter 9 clocks
// after the filter took its sample when nothing holds it back.
module tb_audio_fir_top;
  logic CLOCK_50 = 1'b0;
  logic RST_N = 1'b0;
  logic I2C_SCLK, I2C_SDAT_oe, I2C_SDAT_i;
  logic AUD_BCLK, AUD_ADCLRCK, AUD_ADCDAT, AUD_DACLRCK, AUD_DACDAT;
  logic init_done, init_ack_error;

  int checks = 0, failures = 0;

  audio_fir_top dut (.*);

  logic [8:0]  regs [16];
  logic [15:0] word_log [16];
  int          words_written, nacks, starts, stops;
  logic        sdin_pull_low;
  logic signed [15:0] adc_left, adc_right, adc_sent, dac_left;
  int          adc_frames, dac_frames;
  logic        skip_dac_frame = 1'b0;

  assign I2C_SDAT_i = !(I2C_SDAT_oe || sdin_pull_low);

  wm8731_model #(.BCLK_HALF_NS(85), .FRAME_BCLKS(64)) codec (
    .sclk(I2C_SCLK), .sdin(I2C_SDAT_i), .sdin_pull_low, .regs, .word_log,
    .words_written, .nacks, .starts, .stops,
    .run(regs[9][0]), .bclk(AUD_BCLK), .adclrck(AUD_ADCLRCK),
    .daclrck(AUD_DACLRCK), .adcdat(AUD_ADCDAT), .dacdat(AUD_DACDAT),
    .adc_left, .adc_right, .skip_dac_frame, .adc_sent, .adc_frames,
    .dac_left, .dac_frames
  );

  always #10 CLOCK_50 = ~CLOCK_50;

  localparam int NFRAMES = 400;

  initial begin
    repeat (2_000_000) @(posedge CLOCK_50);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference filter, fed with every left word the codec sends.
  localparam int B [8] = '{-1260, 7827, 12471, 16384, 16384, 12471, 7827, -1260};
  int          hist [8];
  logic [15:0] expect_q [$];
  int          saw_fffe = 0;

  function automatic logic [15:0] next_ref(input int x);
    longint acc = 0;
    for (int i = 7; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    for (int i = 0; i < 8; i++) acc += longint'(B[i]) * longint'(hist[i]);
    return 16'(acc >>> 16);
  endfunction

  always @(adc_frames) if (adc_frames > 0) begin
    expect_q.push_back(next_ref(int'(adc_sent)));
    if (adc_frames < 20)                adc_left = -16'sd1;
    else if (adc_frames % 16 < 4)       adc_left = 16'sh7FFF;
    else if (adc_frames % 16 < 8)       adc_left = -16'sh8000;
    else                                adc_left = 16'($urandom);
    adc_right = 16'($urandom);
    skip_dac_frame = (adc_frames == 200) || (adc_frames == 201);
  end

  // DAC side: in-order, no loss, repeats allowed.
  logic [15:0] last_dac = '0;
  int          dac_repeats = 0, dac_new = 0;
  always @(dac_frames) if (dac_frames > 0) begin
    checks++;
    if (expect_q.size() > 0 && dac_left === expect_q[0]) begin
      void'(expect_q.pop_front());
      dac_new++;
      if (dac_left == 16'hFFFE) saw_fffe++;
    end else if (dac_left === last_dac) begin
      dac_repeats++;
    end else begin
      failures++;
      $display("ERROR: DAC frame %0d: word %h, expected %h or a repeat of %h", dac_frames,
               dac_left, expect_q.size() ? expect_q[0] : 16'h0, last_dac);
    end
    last_dac = dac_left;
  end

  // Mechanism counters and the filter's latency.
  int adc_stall = 0, fir_stall = 0, fir_lat_bad = 0, fir_lat_ok = 0, acks = 0;
  int took_at = -1, cyc = 0;
  always @(posedge CLOCK_50) begin
    cyc++;
    if (RST_N) begin
      if (dut.adc_stb && dut.adc_rdy) adc_stall++;
      if (dut.dac_stb && dut.dac_rdy) fir_stall++;
      if (dut.adc_stb && !dut.adc_rdy) took_at = cyc;
      if (dut.dac_stb && took_at >= 0) begin
        if (cyc - took_at == 9) fir_lat_ok++; else fir_lat_bad++;
        took_at = -1;
      end
    end
  end
  always @(posedge I2C_SCLK) if (sdin_pull_low) acks++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  initial begin
    foreach (hist[i]) hist[i] = 0;
    adc_left = -16'sd1;
    adc_right = '0;
    repeat (4) @(posedge CLOCK_50);
    RST_N = 1'b1;
    wait (init_done);
    check(words_written == 11 && nacks == 0 && !init_ack_error,
          $sformatf("configuration: %0d words, %0d not acknowledged", words_written, nacks));
    check(regs[7] == 9'b001000011 && regs[8] == 9'b000100000 && regs[9] == 9'b000000001,
          "interface registers R7..R9 not configured");
    wait (adc_frames == NFRAMES);
    repeat (2000) @(posedge CLOCK_50);

    check(expect_q.size() <= 4, $sformatf("%0d filtered words never reached the codec", expect_q.size()));
    check(dac_new >= NFRAMES - 30, $sformatf("only %0d new DAC words for %0d frames", dac_new, NFRAMES));
    check(saw_fffe > 0, "constant -1 input never gave 16'hFFFE");
    check(fir_lat_bad == 0 && fir_lat_ok > 0,
          $sformatf("filter latency: %0d at 9 clocks, %0d otherwise", fir_lat_ok, fir_lat_bad));
    check(starts >= 11 && stops >= 11 && acks == 33,
          $sformatf("I2C: %0d starts, %0d stops, %0d acknowledges", starts, stops, acks));
    check(fir_stall > 0, "the filter's output was never held back");
    check(adc_stall > 0, "the adapter's input strobe never waited for the filter");
    check(dac_repeats > 0, "no DAC frame repeated a word");
    $display("frames %0d, new DAC words %0d, repeats %0d, FFFE seen %0d", adc_frames, dac_new,
             dac_repeats, saw_fffe);
    $display("stall cycles: filter output %0d, adapter input %0d; I2C acks %0d",
             fir_stall, adc_stall, acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
