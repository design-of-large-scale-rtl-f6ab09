// delay_element: the fiber-loop delay that separates the token slots of two
// neighbouring processors on the token ring.
//
// The document sizes the loop at 20 cm, i.e. 1 ns, which is one processor
// clock cycle, to cover the address port controller's delay D = 0.88 ns plus
// guard time. In clocked logic the loop is a shift register of DELAY stages
// (default 1 cycle, the document's figure). A synchronous reset clears the
// loop.
module delay_element #(
  parameter int unsigned DELAY = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);
  logic [DELAY-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n) sr <= '0;
    else begin
      sr[0] <= din;
      for (int unsigned k = 1; k < DELAY; k++) sr[k] <= sr[k-1];
    end
  end

  assign dout = sr[DELAY-1];
endmodule
