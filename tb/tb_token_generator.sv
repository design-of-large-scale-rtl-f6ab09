// tb_token_generator: checks that the token generator fires exactly once every
// PERIOD cycles, starting in the first cycle after reset.
module tb_token_generator;
  localparam int unsigned PERIOD = 5;
  logic clk = 1'b0, rst_n = 1'b0, token;
  int checks = 0, failures = 0, cyc = 0;

  token_generator #(.PERIOD(PERIOD)) dut (.clk(clk), .rst_n(rst_n), .token(token));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (cyc = 0; cyc < 60; cyc++) begin
      checks++;
      if (token !== ((cyc % PERIOD) == 0)) begin
        failures++;
        $display("cycle %0d: token=%0b expected %0b", cyc, token, (cyc % PERIOD) == 0);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
