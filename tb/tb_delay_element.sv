// tb_delay_element: drives a random bit stream into a 3-cycle delay element
// and compares its output with the stream shifted by three cycles.
module tb_delay_element;
  localparam int unsigned DELAY = 3;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0, dout;
  logic hist [$];
  int checks = 0, failures = 0;

  delay_element #(.DELAY(DELAY)) dut (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < DELAY; k++) hist.push_back(1'b0);
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      checks++;
      if (dout !== hist[hist.size() - DELAY]) begin
        failures++;
        $display("cycle %0d: dout=%0b expected %0b", c, dout, hist[hist.size() - DELAY]);
      end
      din = 1'($urandom_range(0, 1));
      hist.push_back(din);
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
