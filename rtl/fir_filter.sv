// fir_filter - eight-tap low-pass FIR for 16-bit audio, one shared multiplier.
//
// Computes y(n) = sum_{k=0..7} b_k * x(n-k) with the coefficients of
// audio_fir_pkg::FIR_COEFFS (-1260, 7827, 12471, 16384, 16384, 12471, 7827,
// -1260). A new sample enters the input register x(n) while the older ones
// move down a seven-stage, 16-bit data shifter. One multiplier then walks over
// the eight taps, one tap per clock, and a 35-bit accumulator sums the
// products. The result sent on is accumulator bits 31..16 (a division by
// 2^16, taken without rounding or saturation, as in the published design).
//
// Interface: Strobe/Ready handshake on both sides, with Ready meaning *busy*:
//   input  side - the sender raises stb_in with data_in; the sample is taken
//                 on a clock edge where stb_in = 1 and rdy_in = 0. rdy_in is
//                 high from the edge that takes a sample until the result has
//                 been handed on.
//   output side - stb_out rises with data_out valid and both hold until an
//                 edge where rdy_out = 0 (the receiver is idle).
// Timing: stb_out rises 8 clocks after the edge that took the sample (one
// per tap). With rdy_out low the filter takes a new sample every 10 clocks.
//
// The structure (shifter, one multiplier, accumulator, bit slice) follows the
// published design; the FSM, the polarity-of-Ready reading and the cycle
// timing are this design's own.
module fir_filter
  import audio_fir_pkg::*;
#(
  parameter int unsigned ACC_W   = 35,  // accumulator width
  parameter int unsigned OUT_LSB = 16   // lowest accumulator bit sent on
) (
  input  logic    clk,
  input  logic    rst_n,     // asynchronous, active low
  // input side
  input  sample_t data_in,
  input  logic    stb_in,
  output logic    rdy_in,    // 1 = busy
  // output side
  output sample_t data_out,
  output logic    stb_out,
  input  logic    rdy_out    // 1 = receiver busy
);

  localparam int unsigned PROD_W = SAMPLE_W + COEFF_W;
  localparam int unsigned TAP_W  = $clog2(NTAPS);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_OUT} state_t;

  state_t             state;
  sample_t            taps [NTAPS];   // taps[0] = x(n), taps[1..7] = data shifter
  logic [TAP_W-1:0]   k;
  logic signed [ACC_W-1:0]  acc;
  logic signed [PROD_W-1:0] product;

  // The one multiplier, shared over the taps.
  always_comb product = FIR_COEFFS[k] * taps[k];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      acc   <= '0;
      for (int i = 0; i < NTAPS; i++) taps[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (stb_in) begin
          taps[0] <= data_in;
          for (int i = 1; i < NTAPS; i++) taps[i] <= taps[i-1];
          acc   <= '0;
          k     <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          acc <= acc + ACC_W'(product);
          k   <= k + 1'b1;
          if (k == TAP_W'(NTAPS - 1)) state <= S_OUT;
        end
        S_OUT: if (!rdy_out) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rdy_in   = (state != S_IDLE);
  assign stb_out  = (state == S_OUT);
  assign data_out = acc[OUT_LSB +: SAMPLE_W];

  // Handshake rule: a raised strobe holds, with stable data, until taken.
  a_stb_out_holds: assert property (@(posedge clk) disable iff (!rst_n)
    stb_out && rdy_out |=> stb_out && $stable(data_out));

endmodule
