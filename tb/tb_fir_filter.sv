// tb_fir_filter - self-checking testbench for fir_filter.
//
// Feeds the filter samples through its Strobe/Ready input handshake and takes
// results through the output handshake, with random gaps on the input and
// random back-pressure (rdy_out = busy) on the output. Every result is
// compared with a reference computed here from the sample history:
// y = (sum b_k * x(n-k)) bits 31..16. Also checked: the constant input -1,
// whose sum is -70844, gives 16'hFFFE once the shifter is full; the result
// strobe rises 8 clocks after the sample was taken; a new sample is taken no
// sooner than 10 clocks after the last when the output is never held back.
module tb_fir_filter;
  import audio_fir_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  sample_t data_in;
  logic    stb_in, rdy_in;
  sample_t data_out;
  logic    stb_out, rdy_out;

  int checks = 0, failures = 0;

  fir_filter dut (.*);

  always #10 clk = ~clk;  // 50 MHz

  // Watchdog.
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t hist [NTAPS];   // reference sample history, hist[0] newest
  sample_t expected_q [$];
  int      take_cycle, cycle = 0;
  int      backpressure_pct = 0;
  int      stalls_seen = 0;

  always @(posedge clk) cycle++;

  function automatic sample_t ref_out();
    longint acc = 0;
    for (int i = 0; i < NTAPS; i++) acc += longint'(FIR_COEFFS[i]) * longint'(hist[i]);
    return sample_t'(acc >>> 16);
  endfunction

  // Output side: random back-pressure, check each result as it is taken.
  always @(negedge clk) begin
    if (rst_n) rdy_out <= ($urandom_range(99) < backpressure_pct);
  end

  always @(posedge clk) begin
    if (rst_n && stb_out) begin
      if (rdy_out) stalls_seen++;
      else begin
        sample_t e;
        checks++;
        if (expected_q.size() == 0) begin
          failures++;
          $display("ERROR: result with no sample pending");
        end else begin
          e = expected_q.pop_front();
          if (data_out !== e) begin
            failures++;
            $display("ERROR: result %0d, expected %0d", data_out, e);
          end
        end
      end
    end
  end

  // Drive one sample through the input handshake; returns the cycle taken.
  task automatic send(input sample_t s);
    @(negedge clk);
    data_in = s;
    stb_in  = 1'b1;
    do @(posedge clk); while (rdy_in);
    take_cycle = cycle;
    for (int i = NTAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = s;
    expected_q.push_back(ref_out());
    @(negedge clk);
    stb_in = 1'b0;
  endtask

  int last_take, lat;

  initial begin
    stb_in  = 1'b0;
    data_in = '0;
    rdy_out = 1'b0;
    foreach (hist[i]) hist[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1) Constant -1: after eight samples the sum is -70844 -> 16'hFFFE.
    for (int n = 0; n < NTAPS; n++) send(-16'sd1);
    wait (expected_q.size() == 0);
    @(posedge clk);
    checks++;
    if (data_out !== 16'hFFFE || dut.acc !== -35'sd70844) begin
      failures++;
      $display("ERROR: -1 input gave out=%h acc=%0d", data_out, dut.acc);
    end

    // 2) Latency and throughput with the output never held back.
    send(16'sd1000);
    lat = 0;
    while (!stb_out) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 8) begin
      failures++;
      $display("ERROR: stb_out rose %0d clocks after the sample was taken, expected 8", lat);
    end
    last_take = take_cycle;
    send(16'sd2000);
    checks++;
    if (take_cycle - last_take != 10) begin
      failures++;
      $display("ERROR: samples taken %0d clocks apart, expected 10", take_cycle - last_take);
    end

    // 3) Random samples, random input gaps, random output back-pressure.
    backpressure_pct = 40;
    for (int n = 0; n < 400; n++) begin
      sample_t s;
      s = sample_t'($urandom);
      if (n % 50 < 5) s = (n % 2 == 1) ? 16'sh7FFF : -16'sh8000;
      send(s);
      repeat ($urandom_range(3)) @(posedge clk);
    end
    backpressure_pct = 0;
    wait (expected_q.size() == 0);
    repeat (5) @(posedge clk);

    checks++;
    if (stalls_seen == 0) begin
      failures++;
      $display("ERROR: output back-pressure never happened");
    end
    $display("output stalls: %0d cycles", stalls_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
