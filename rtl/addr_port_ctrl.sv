// addr_port_ctrl: the address port controller, the electronic interface
// between a processor's cache controller and the optical address tree
// (document, Sections 2 and 4.1).
//
// The cache controller hands over one request at a time (valid/ready). The
// port holds it until the processor taps the optical token; in that token
// cycle the request is driven onto the processor's up-stream link and
// `inserted` pulses, which is the "address request inserted" event of the
// COSYM state diagram. The document budgets D = 0.88 ns (< 1 cycle) for
// detecting the token and driving the VCSEL array, so insertion happens in
// the token cycle itself. The snoop/acknowledge lane is not tied to the token:
// the owner of a block drives it whenever it answers, and the port simply
// places it on the same link.
//
// Interface: req_valid/req_ready/req (from the controller), token (tap of the
// token ring), snoop_in (from the controller), link_out (to the tree leaf),
// inserted (one-cycle pulse).
module addr_port_ctrl
  import symnet_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  addr_req_t req,
  input  logic      token,
  input  logic      snoop_in,
  output link_t     link_out,
  output logic      inserted
);
  logic      pend;
  addr_req_t held;

  assign req_ready = !pend;
  assign inserted  = pend && token;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend <= 1'b0;
      held <= '0;
    end else if (req_valid && req_ready) begin
      pend       <= 1'b1;
      held       <= req;
      held.valid <= 1'b1;
    end else if (inserted) begin
      pend <= 1'b0;
    end
  end

  always_comb begin
    link_out       = '0;
    link_out.snoop = snoop_in;
    if (inserted) link_out.req = held;
  end

  always_ff @(posedge clk) begin
    if (rst_n && pend) assert (!req_valid || !req_ready) else $error("port: accepted while busy");
  end
endmodule
