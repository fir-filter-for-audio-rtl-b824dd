// wm8731_model - behavioural model (not synthesizable) of the digital ports of
// a WM8731 audio codec, for simulation only.
//
// Control port: an I2C write-only slave at chip address 0011010 (first byte
// 8'h34). It detects start (SDIN falls while SCLK is high) and stop (SDIN
// rises while SCLK is high), reads bits on SCLK rising edges, MSB first, and
// pulls SDIN low for the acknowledge clock after every byte whose transfer
// it accepts. A wrong chip address is not acknowledged, and the model then
// waits for the next start. After the third byte it stores the 9-bit
// register data at the 7-bit register address and logs the word.
//
// Audio port: the model is the interface master. It makes AUD_BCLK with a
// half period of BCLK_HALF_NS and frames of FRAME_BCLKS bit clocks in DSP
// format: LRCK is high for the first bit clock of a frame, the left word
// follows MSB first in bit clocks 1..16, the right word in 17..32, then idle
// bits. LRCK and ADC data change on falling BCLK edges; DAC data is read on
// rising edges. adc_left / adc_right are taken when a frame starts; the left
// DAC word of a frame appears on dac_left when dac_frames increments.
// skip_dac_frame = 1 when a frame starts leaves out that frame's DACLRCK
// pulse (no DAC word is read in that frame).
module wm8731_model #(
  parameter int unsigned BCLK_HALF_NS = 80,
  parameter int unsigned FRAME_BCLKS  = 64
) (
  // control port
  input  logic        sclk,
  input  logic        sdin,          // level on the bus
  output logic        sdin_pull_low, // acknowledge
  output logic [8:0]  regs [16],
  output logic [15:0] word_log [16], // {reg_addr, reg_data} in order written
  output int          words_written,
  output int          nacks,         // bytes not acknowledged
  output int          starts,
  output int          stops,
  // audio port
  input  logic        run,
  output logic        bclk,
  output logic        adclrck,
  output logic        daclrck,
  output logic        adcdat,
  input  logic        dacdat,
  input  logic signed [15:0] adc_left,
  input  logic signed [15:0] adc_right,
  input  logic        skip_dac_frame,
  output logic signed [15:0] adc_sent,
  output int          adc_frames,
  output logic signed [15:0] dac_left,
  output int          dac_frames
);

  // ------------------------------------------------------------ I2C slave
  logic [7:0] sh;
  int         bitn, byten;
  logic       addressed, ignore, ack_phase;
  logic [7:0] b2;

  initial begin
    sdin_pull_low = 1'b0;
    words_written = 0;
    nacks = 0;
    starts = 0;
    stops = 0;
    ignore = 1'b1;
    addressed = 1'b0;
    ack_phase = 1'b0;
    bitn = 0;
    byten = 0;
    sh = '0;
    b2 = '0;
    foreach (regs[i]) regs[i] = '0;
    foreach (word_log[i]) word_log[i] = '0;
  end

  // start / stop: SDIN edges while SCLK is high
  always @(negedge sdin) if (sclk) begin
    starts++;
    ignore = 1'b0;
    addressed = 1'b0;
    bitn = 0;
    byten = 0;
    ack_phase = 1'b0;
  end

  always @(posedge sdin) if (sclk) begin
    stops++;
    ignore = 1'b1;
    sdin_pull_low = 1'b0;
  end

  always @(posedge sclk) if (!ignore && !ack_phase) begin
    sh = {sh[6:0], sdin};
    bitn++;
  end

  always @(negedge sclk) begin
    if (ack_phase) begin
      // end of the acknowledge clock
      ack_phase = 1'b0;
      sdin_pull_low = 1'b0;
      bitn = 0;
    end else if (!ignore && bitn == 8) begin
      ack_phase = 1'b1;
      byten++;
      if (byten == 1) begin
        if (sh == 8'h34) begin
          addressed = 1'b1;
          sdin_pull_low = 1'b1;
        end else begin
          nacks++;
          ignore = 1'b1;
          ack_phase = 1'b0;
        end
      end else if (byten == 2) begin
        b2 = sh;
        sdin_pull_low = 1'b1;
      end else if (byten == 3) begin
        regs[b2[4:1]] = {b2[0], sh};
        if (words_written < 16) word_log[words_written] = {b2, sh};
        words_written++;
        sdin_pull_low = 1'b1;
      end else begin
        nacks++;
        ignore = 1'b1;
        ack_phase = 1'b0;
      end
    end
  end

  // ------------------------------------------------------- audio master
  logic [15:0] l_sh, r_sh, d_sh;
  logic        dac_on;

  initial begin
    bclk = 1'b0;
    adclrck = 1'b0;
    daclrck = 1'b0;
    adcdat = 1'b0;
    adc_frames = 0;
    dac_frames = 0;
    adc_sent = '0;
    dac_left = '0;
    dac_on = 1'b0;
    l_sh = '0;
    r_sh = '0;
    d_sh = '0;
    wait (run);
    forever begin
      for (int c = 0; c < FRAME_BCLKS; c++) begin
        // falling edge: drive LRCK and ADC data for bit clock c
        #(BCLK_HALF_NS) bclk = 1'b0;
        if (c == 0) begin
          l_sh = adc_left;
          r_sh = adc_right;
          adc_sent = adc_left;
          dac_on = !skip_dac_frame;
          adclrck = 1'b1;
          daclrck = dac_on;
          adcdat = 1'b0;
          adc_frames++;
        end else begin
          adclrck = 1'b0;
          daclrck = 1'b0;
          if (c <= 16) begin adcdat = l_sh[15]; l_sh = l_sh << 1; end
          else if (c <= 32) begin adcdat = r_sh[15]; r_sh = r_sh << 1; end
          else adcdat = 1'b0;
        end
        // rising edge: read DAC data
        #(BCLK_HALF_NS) bclk = 1'b1;
        if (dac_on && c >= 1 && c <= 16) begin
          d_sh = {d_sh[14:0], dacdat};
          if (c == 16) begin
            dac_left = d_sh;
            dac_frames++;
          end
        end
      end
    end
  end

endmodule
