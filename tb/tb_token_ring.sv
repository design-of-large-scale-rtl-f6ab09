// tb_token_ring: checks that processor i taps the token i cycles after the
// generator, that exactly one processor holds it in every cycle, and that the
// round repeats every N_PROC cycles.
module tb_token_ring;
  localparam int unsigned N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] tap;
  int checks = 0, failures = 0;

  token_ring #(.N_PROC(N)) dut (.clk(clk), .rst_n(rst_n), .tap(tap));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int c = 0; c < 5 * N; c++) begin
      // cycle c after reset: the token is at processor c mod N
      for (int i = 0; i < N; i++) begin
        checks++;
        if (tap[i] !== ((c % N) == i)) begin
          failures++;
          $display("cycle %0d: tap[%0d]=%0b", c, i, tap[i]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
