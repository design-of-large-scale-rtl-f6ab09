// token_generator: the optical token generator (OTG) seen from the logic side.
//
// It emits a single one-cycle token pulse once per token round. A round lasts
// PERIOD cycles, one per processor on the token ring, so that after passing
// every delay element the token is regenerated just as the last processor has
// had its slot: every cycle exactly one processor holds the token. The
// document gives the token as a single pulse synchronised with the optical
// clock; the round length equal to the number of processors is this design's
// reading of the pre-allocated token TDMA it describes.
//
// Timing: the first pulse comes in the first cycle after reset is released,
// then every PERIOD cycles.
module token_generator #(
  parameter int unsigned PERIOD = 32
) (
  input  logic clk,
  input  logic rst_n,
  output logic token
);
  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)                           cnt <= '0;
    else if (cnt == CW'(PERIOD - 1))      cnt <= '0;
    else                                  cnt <= cnt + 1'b1;
  end

  assign token = rst_n && (cnt == '0);
endmodule
