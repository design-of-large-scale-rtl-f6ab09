// y_coupler_splitter: one bi-directional Y-coupler/splitter node of the
// SYMNET address tree (document, Section 2 and Figure 2 with its inset).
//
// Up-stream, the Y-coupler merges the links of its two children into one link
// towards the root. Light pulses add in a coupler, so the merge is a bitwise OR
// of the two link words; the token TDMA guarantees that at most one request is
// on the two inputs in any cycle, and the assertions flag a collision.
// Down-stream, the Y-splitter copies the link from its parent to both
// children. Each direction costs one clock cycle (one hop, as in Figure 2).
//
// At the root (IS_ROOT = 1) the merged up-stream word turns round and is sent
// straight back down to both children through a single one-cycle stage; dn_in
// and up_out are then unused.
//
// Interface: up_a/up_b from the children, up_out to the parent; dn_in from
// the parent, dn_a/dn_b to the children. All outputs are registered.
module y_coupler_splitter
  import symnet_pkg::*;
#(
  parameter bit IS_ROOT = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t up_a,
  input  link_t up_b,
  output link_t up_out,
  input  link_t dn_in,
  output link_t dn_a,
  output link_t dn_b
);
  link_t merged, up_q, dn_q;

  assign merged = link_t'(up_a | up_b);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      up_q <= '0;
      dn_q <= '0;
    end else begin
      up_q <= IS_ROOT ? link_t'('0) : merged;
      dn_q <= IS_ROOT ? merged : dn_in;
    end
  end

  assign up_out = up_q;
  assign dn_a   = dn_q;
  assign dn_b   = dn_q;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(up_a.req.valid && up_b.req.valid))
        else $error("Y-coupler: two address requests collide");
      assert (!(up_a.snoop && up_b.snoop))
        else $error("Y-coupler: two snoop responses collide");
    end
  end
endmodule
