// symnet_top: a SYMNET symmetric multiprocessor's address side - the optical
// address sub-network with its token ring, one COSYM L2 cache controller and
// address port controller per processor, and the memory controller.
//
// Every processor taps the token ring; in its token cycle its address port
// controller drives any waiting request (miss, upgrade or transfer
// write-back) into its leaf of the Y-coupler tree. The tree broadcasts it to
// all caches and to memory 2*log2(N_PROC) cycles (counting the insertion
// cycle) later, in the same cycle everywhere, which is the global order of
// requests. The owner of the block answers on the snoop lane, which crosses
// the tree in the same time; memory answers with data when no owner does.
//
// Blocks themselves travel on the data sub-network, an optical crossbar that
// is not part of this RTL: each endpoint's dn_tx is brought out, and the
// environment must deliver each message to dn_rx of its destination
// (processor dst, or memory at index N_PROC when to_mem is set). The
// document assumes it conflict-free with 52 cycles per 32-byte block. A
// cache keeps an evicted block in its write-back buffer until the block is in
// memory; WB_HOLD is that time: 52 cycles of transfer plus N_PROC cycles in
// case write-backs from every cache meet at memory's one write port (this
// design's choice).
//
// Defaults follow the document's largest evaluated system: 32 processors
// (scalable to 128), 64 KB 4-way L2 with 32-byte blocks, 1 cycle token slot,
// 4-cycle L2 access. Processors are grouped on boards of four in the
// document; with every hop one cycle, the board boundary does not change
// the logic.
//
// Interface: the cpu_* arrays are the processors' L2 ports; mem_ld_* fills
// memory before operation; events/mem_resp report protocol activity.
module symnet_top
  import symnet_pkg::*;
#(
  parameter int unsigned N_PROC     = 32,     // power of two, 2..128
  parameter int unsigned SETS       = 512,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned HIT_LAT    = 4,
  parameter int unsigned WB_HOLD    = 52 + N_PROC,
  parameter int unsigned MEM_BLOCKS = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cpu_valid [N_PROC],
  output logic              cpu_ready [N_PROC],
  input  logic              cpu_we    [N_PROC],
  input  logic [ADDR_W-1:0] cpu_addr  [N_PROC],
  input  logic [31:0]       cpu_wdata [N_PROC],
  output logic              cpu_done  [N_PROC],
  output logic [31:0]       cpu_rdata [N_PROC],
  output dn_msg_t           dn_tx     [N_PROC+1],
  input  dn_msg_t           dn_rx     [N_PROC+1],
  input  logic              mem_ld_valid,
  input  blk_t              mem_ld_blk,
  input  line_t             mem_ld_data,
  output logic [NEV-1:0]    events    [N_PROC],
  output logic              mem_resp
);
  localparam int unsigned SNOOP_DLY = 2 * $clog2(N_PROC);

  logic  [N_PROC-1:0] tap;
  link_t leaf_in  [N_PROC];
  link_t leaf_out [N_PROC];
  link_t mem_link;

  token_ring #(.N_PROC(N_PROC), .DELAY(1)) u_ring (
    .clk(clk), .rst_n(rst_n), .tap(tap)
  );

  address_subnet #(.N_LEAF(N_PROC)) u_net (
    .clk(clk), .rst_n(rst_n),
    .leaf_in(leaf_in), .leaf_out(leaf_out), .mem_out(mem_link)
  );

  for (genvar p = 0; p < N_PROC; p++) begin : g_proc
    logic      apc_valid, apc_ready, apc_ins, snoop;
    addr_req_t apc_req;

    cosym_ctrl #(
      .MY_ID(p), .SETS(SETS), .WAYS(WAYS), .SNOOP_DLY(SNOOP_DLY),
      .HIT_LAT(HIT_LAT), .WB_HOLD(WB_HOLD), .FWD_DEPTH(N_PROC),
      .UPG_WIN(N_PROC + SNOOP_DLY + 2)
    ) u_cache (
      .clk(clk), .rst_n(rst_n),
      .cpu_valid(cpu_valid[p]), .cpu_ready(cpu_ready[p]), .cpu_we(cpu_we[p]),
      .cpu_addr(cpu_addr[p]), .cpu_wdata(cpu_wdata[p]),
      .cpu_done(cpu_done[p]), .cpu_rdata(cpu_rdata[p]),
      .apc_valid(apc_valid), .apc_ready(apc_ready), .apc_req(apc_req),
      .apc_inserted(apc_ins), .snoop_out(snoop),
      .rx(leaf_out[p]), .dn_tx(dn_tx[p]), .dn_rx(dn_rx[p]),
      .events(events[p])
    );

    addr_port_ctrl u_port (
      .clk(clk), .rst_n(rst_n),
      .req_valid(apc_valid), .req_ready(apc_ready), .req(apc_req),
      .token(tap[p]), .snoop_in(snoop), .link_out(leaf_in[p]), .inserted(apc_ins)
    );
  end

  mem_ctrl #(.SNOOP_DLY(SNOOP_DLY), .MEM_BLOCKS(MEM_BLOCKS)) u_mem (
    .clk(clk), .rst_n(rst_n), .rx(mem_link),
    .dn_rx(dn_rx[N_PROC]), .dn_tx(dn_tx[N_PROC]),
    .ld_valid(mem_ld_valid), .ld_blk(mem_ld_blk), .ld_data(mem_ld_data),
    .resp_event(mem_resp)
  );
endmodule
