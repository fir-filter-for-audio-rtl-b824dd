// tb_sync_2ff - self-checking testbench for sync_2ff.
//
// Drives random values into a 4-bit, 2-stage synchroniser just after each
// clock edge and checks that every value appears at the output exactly two
// clocks later, and that reset clears the output.
module tb_sync_2ff;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] async_in, sync_out;
  logic [3:0] hist [3];
  int checks = 0, failures = 0;

  sync_2ff #(.WIDTH(4)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    async_in = 4'hF;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (sync_out !== 4'h0) begin failures++; $display("ERROR: not cleared by reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) hist[i] = 4'hF;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk);
      #1;
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = async_in;
      if (n >= 2) begin
        checks++;
        if (sync_out !== hist[1]) begin
          failures++;
          $display("ERROR: out %h, expected %h", sync_out, hist[1]);
        end
      end
      async_in = 4'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
