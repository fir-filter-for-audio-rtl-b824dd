// sync_2ff - multi-flop synchroniser for signals from another clock domain.
//
// Each bit of async_in passes through STAGES flip-flops clocked by clk, so
// that a bit changing close to a clock edge has settled before logic reads
// it. Each bit is synchronised on its own; bits that must stay aligned with
// each other should change at well separated times (as serial data and its
// bit clock do). Latency: STAGES clocks. Reset clears every stage.
//
// The system uses such blocks for the codec's serial clock and data; their
// form (two stages, reset to 0) is this design's choice.
module sync_2ff #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,    // asynchronous, active low
  input  logic [WIDTH-1:0] async_in,
  output logic [WIDTH-1:0] sync_out
);

  logic [WIDTH-1:0] stage [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) stage[i] <= '0;
    end else begin
      stage[0] <= async_in;
      for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
    end
  end

  assign sync_out = stage[STAGES-1];

endmodule
