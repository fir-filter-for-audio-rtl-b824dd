// tb_codec_init - self-checking testbench for codec_init.
//
// Connects the I2C master to a codec model over an open-drain SDIN with a
// pull-up, at the default 50 MHz clock and 100 kHz SCLK. Checks that the
// eleven words arrive in order with the register values of the codec
// configuration (listed again here, independently of the package), that
// each came as its own start/stop transaction with every byte acknowledged,
// that SCLK runs at 100 kHz, that done rises after 29 * 4 * 125 * 11 clocks,
// and that ack_error stays low. A second run with the acknowledge blocked
// must set ack_error.
module tb_codec_init;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sclk, sdin_oe, sdin_i, done, ack_error;

  int checks = 0, failures = 0;

  codec_init dut (.*);

  // codec model on the bus
  logic [8:0]  regs [16];
  logic [15:0] word_log [16];
  int          words_written, nacks, starts, stops;
  logic        sdin_pull_low;
  logic        block_ack = 1'b0;
  logic        bclk, adclrck, daclrck, adcdat;
  logic signed [15:0] adc_sent, dac_left;
  int          adc_frames, dac_frames;

  assign sdin_i = !(sdin_oe || (sdin_pull_low && !block_ack));

  wm8731_model codec (
    .sclk, .sdin(sdin_i), .sdin_pull_low, .regs, .word_log,
    .words_written, .nacks, .starts, .stops,
    .run(1'b0), .bclk, .adclrck, .daclrck, .adcdat, .dacdat(1'b0),
    .adc_left(16'sd0), .adc_right(16'sd0), .skip_dac_frame(1'b0),
    .adc_sent, .adc_frames, .dac_left, .dac_frames
  );

  always #10 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected words {register address, register data}, in the order sent.
  logic [6:0] exp_addr [11] = '{7'h0F, 7'h00, 7'h01, 7'h02, 7'h03, 7'h04,
                                7'h05, 7'h06, 7'h07, 7'h08, 7'h09};
  logic [8:0] exp_data [11] = '{9'b000000000, 9'b000011111, 9'b000110111,
                                9'b001111001, 9'b000110000, 9'b011010010,
                                9'b000000001, 9'b001100010, 9'b001000011,
                                9'b000100000, 9'b000000001};

  // First 24 bits on the wire, as sampled on SCLK rising edges (acks skipped).
  logic [26:0] first_bits;
  int          nbits = 0;
  always @(posedge sclk) if (rst_n && nbits < 27 && codec.starts == 1) begin
    first_bits = {first_bits[25:0], sdin_i};
    nbits++;
  end

  // SCLK period
  int cyc = 0, last_rise = -1, min_per = 1 << 30, max_per = 0;
  always @(posedge clk) cyc++;
  always @(posedge sclk) if (rst_n && !done) begin
    if (last_rise >= 0) begin
      if (cyc - last_rise < min_per) min_per = cyc - last_rise;
      if (cyc - last_rise > max_per && cyc - last_rise < 600) max_per = cyc - last_rise;
    end
    last_rise = cyc;
  end

  int t_start, t_done, stops0, starts0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    starts0 = starts;
    stops0 = stops;
    rst_n = 1'b1;
    t_start = cyc;
    wait (done);
    t_done = cyc;
    repeat (1000) @(posedge clk);

    check(words_written == 11, $sformatf("%0d words written, expected 11", words_written));
    for (int i = 0; i < 11; i++)
      check(word_log[i] == {exp_addr[i], exp_data[i]},
            $sformatf("word %0d is %h, expected %h", i, word_log[i], {exp_addr[i], exp_data[i]}));
    for (int i = 0; i < 11; i++)
      check(regs[exp_addr[i][3:0]] == exp_data[i],
            $sformatf("register R%0d = %b, expected %b", exp_addr[i], regs[exp_addr[i][3:0]], exp_data[i]));
    check(starts - starts0 == 11 && stops - stops0 == 11,
          $sformatf("%0d starts and %0d stops, expected 11 each", starts - starts0, stops - stops0));
    check(nacks == 0, $sformatf("%0d bytes not acknowledged", nacks));
    check(!ack_error, "ack_error set although every byte was acknowledged");
    // 00110100 A 00011110 A 00000000 : the ack slots read low
    check(first_bits == 27'b00110100_0_00011110_0_00000000_0,
          $sformatf("first transaction bits %b", first_bits));
    check(min_per == 500 && max_per == 500,
          $sformatf("SCLK period %0d..%0d clocks, expected 500", min_per, max_per));
    check(t_done - t_start >= 159_500 && t_done - t_start <= 159_503,
          $sformatf("configuration took %0d clocks, expected 159500", t_done - t_start));
    check(sclk && sdin_i && !sdin_oe, "bus not idle after the last stop");

    // Second run: the codec's acknowledge never reaches the master.
    rst_n = 1'b0;
    block_ack = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    check(ack_error, "ack_error not set with the acknowledge blocked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
