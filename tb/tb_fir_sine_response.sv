// tb_fir_sine_response - frequency response of fir_filter for audio tones.
//
// At a 44.1 kHz sample rate, feeds the filter sine waves of amplitude 16000
// at 100 Hz, 1, 3, 5, 7, 9, 12, 15 and 20 kHz (the spot frequencies and the
// ends of the 100 Hz..20 kHz sweep of the hardware test) and measures the
// output amplitude after the eight-sample start-up. Each measured gain is
// compared with |H(f)| computed here from the coefficients,
//   H(f) = sum_k b_k exp(-j 2 pi f k / fs) / 2^16,
// within 0.003 plus the quantisation of the 16-bit output. It also checks
// the low-pass shape: gain above 1 near DC and below 0.05 at 9 kHz.
module tb_fir_sine_response;
  import audio_fir_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  sample_t data_in, data_out;
  logic    stb_in, rdy_in, stb_out;
  logic    rdy_out = 1'b0;

  int checks = 0, failures = 0;

  fir_filter dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real FS = 44100.0;
  localparam real PI = 3.14159265358979;
  localparam real AMP = 16000.0;
  localparam int  B [8] = '{-1260, 7827, 12471, 16384, 16384, 12471, 7827, -1260};
  real freqs [9] = '{100.0, 1000.0, 3000.0, 5000.0, 7000.0, 9000.0, 12000.0, 15000.0, 20000.0};

  function automatic real h_mag(input real f);
    real re = 0.0, im = 0.0, w;
    w = 2.0 * PI * f / FS;
    for (int k = 0; k < 8; k++) begin
      re += B[k] * $cos(w * k);
      im -= B[k] * $sin(w * k);
    end
    return $sqrt(re * re + im * im) / 65536.0;
  endfunction

  // Filter one sample through the handshakes and return the result.
  task automatic filt(input sample_t x, output sample_t y);
    @(negedge clk);
    data_in = x;
    stb_in  = 1'b1;
    do @(negedge clk); while (!rdy_in);
    stb_in = 1'b0;
    while (!stb_out) @(negedge clk);
    y = data_out;
    @(negedge clk);
  endtask

  initial begin
    stb_in = 1'b0;
    data_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (freqs[i]) begin
      real  peak, g_meas, g_ref, n_samples, ph;
      sample_t y;
      peak = 0.0;
      n_samples = (freqs[i] < 500.0) ? 900 : 300;
      for (int n = 0; n < n_samples; n++) begin
        ph = 2.0 * PI * freqs[i] * n / FS;
        filt(sample_t'($rtoi(AMP * $sin(ph))), y);
        if (n >= 8 && ($itor(y) > peak)) peak = $itor(y);
        if (n >= 8 && (-$itor(y) > peak)) peak = -$itor(y);
      end
      g_meas = peak / AMP;
      g_ref  = h_mag(freqs[i]);
      checks++;
      // Peak sampling can miss the crest by up to 1 - cos(pi f / fs).
      if (g_meas > g_ref + 0.003 ||
          g_meas < g_ref * $cos(PI * freqs[i] / FS) - 0.003) begin
        failures++;
        $display("ERROR: %0.0f Hz: gain %0.4f, expected %0.4f", freqs[i], g_meas, g_ref);
      end
      $display("%6.0f Hz  gain %0.4f  (reference %0.4f)", freqs[i], g_meas, g_ref);
      if (freqs[i] == 100.0) begin
        checks++;
        if (g_meas < 1.0) begin failures++; $display("ERROR: pass-band gain below 1"); end
      end
      if (freqs[i] == 9000.0) begin
        checks++;
        if (g_meas > 0.05) begin failures++; $display("ERROR: 9 kHz not in the stop band"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
