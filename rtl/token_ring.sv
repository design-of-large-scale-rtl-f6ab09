// token_ring: the optical token ring that gives each processor its
// pre-allocated time slot for inserting address requests.
//
// The generator's pulse is split at every processor: one part is tapped by
// that processor's address port controller, the other passes a delay element
// and reaches the next processor one slot later (document, Sections 2 and
// 4.1 and Figures 1-2). Processor i therefore sees the token i cycles after the
// generator fires, and successive processors hold it in successive cycles.
//
// Interface: tap[i] is a one-cycle pulse, the token at processor i. Exactly
// one bit of tap is set in every cycle once reset is released.
module token_ring #(
  parameter int unsigned N_PROC = 32,
  parameter int unsigned DELAY  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [N_PROC-1:0] tap
);
  logic gen_token;

  token_generator #(.PERIOD(N_PROC * DELAY)) u_otg (
    .clk(clk), .rst_n(rst_n), .token(gen_token)
  );

  assign tap[0] = gen_token;

  for (genvar i = 1; i < N_PROC; i++) begin : g_stage
    delay_element #(.DELAY(DELAY)) u_dly (
      .clk(clk), .rst_n(rst_n), .din(tap[i-1]), .dout(tap[i])
    );
  end

  // At most one processor holds the token in any cycle.
  always_ff @(posedge clk) begin
    if (rst_n) assert ($onehot0(tap)) else $error("token ring: two tokens in flight");
  end
endmodule
