// mem_ctrl: the memory module's controller on the SYMNET address sub-network.
//
// Memory snoops every broadcast request like a cache but never inserts any:
// it holds no dirty bits (document, Section 3.1) and decides only from the
// single snoop lane whether to answer. A read or write miss whose snoop
// response comes back low has no owner, so memory sends the block to the
// requester over the data sub-network; snoop high means a cache supplies it.
// Upgrades and transfer write-backs never involve memory. Ordinary
// write-backs arrive as data messages addressed to memory and are written
// into the array (document, Section 3.3).
//
// The snoop response for a request visible in cycle v arrives in cycle
// v + SNOOP_DLY, so the controller keeps the requests seen in the last
// SNOOP_DLY cycles in a shift register and pairs the oldest with the snoop
// lane. Memory access time is not given in the document; the block leaves on
// dn_tx in the cycle after the snoop response, and the data sub-network adds
// its own latency. The array holds MEM_BLOCKS blocks (the document gives no
// memory size; the block address is taken modulo MEM_BLOCKS). ld_* is a
// preload port for filling the array before operation.
module mem_ctrl
  import symnet_pkg::*;
#(
  parameter int unsigned SNOOP_DLY  = 10,
  parameter int unsigned MEM_BLOCKS = 4096
) (
  input  logic    clk,
  input  logic    rst_n,
  input  link_t   rx,
  input  dn_msg_t dn_rx,
  output dn_msg_t dn_tx,
  input  logic    ld_valid,
  input  blk_t    ld_blk,
  input  line_t   ld_data,
  output logic    resp_event   // memory answered a miss (one-cycle pulse)
);
  localparam int unsigned IDX_W = $clog2(MEM_BLOCKS);

  line_t     mem [MEM_BLOCKS];
  addr_req_t pipe [SNOOP_DLY];
  addr_req_t oldest;

  assign oldest = pipe[SNOOP_DLY-1];

  function automatic logic [IDX_W-1:0] idx(blk_t b);
    return b[IDX_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < SNOOP_DLY; k++) pipe[k] <= '0;
      dn_tx      <= '0;
      resp_event <= 1'b0;
    end else begin
      pipe[0] <= rx.req;
      for (int k = 1; k < SNOOP_DLY; k++) pipe[k] <= pipe[k-1];
      dn_tx      <= '0;
      resp_event <= 1'b0;
      // pipe[SNOOP_DLY-1] was visible SNOOP_DLY cycles ago: its snoop is on rx now
      if (oldest.valid && oldest.kind inside {REQ_RD_MISS, REQ_WR_MISS} && !rx.snoop) begin
        dn_tx.valid <= 1'b1;
        dn_tx.dst   <= oldest.src;
        dn_tx.blk   <= oldest.blk;
        dn_tx.data  <= mem[idx(oldest.blk)];
        resp_event  <= 1'b1;
      end
    end
  end

  // memory array: write-backs and preload
  always_ff @(posedge clk) begin
    if (dn_rx.valid && dn_rx.to_mem) mem[idx(dn_rx.blk)] <= dn_rx.data;
    else if (ld_valid)               mem[idx(ld_blk)]    <= ld_data;
  end
endmodule
