// tb_symnet_top: end-to-end run of a reduced SYMNET machine - 4 processors,
// 2-way 4-set caches, an 8-cycle data sub-network - with random traffic from
// all processors on twelve shared blocks. The checks (value ownership,
// per-word coherence order, final read-back, single responder, every protocol
// mechanism exercised) are in symnet_driver. The write-back buffer holds a
// block for the data sub-network latency plus N cycles, the longest a
// write-back can wait in the memory queue of the model.
module tb_symnet_top;
  import symnet_pkg::*;
  localparam int unsigned N   = 4;
  localparam int unsigned DNL = 8;

  logic              clk, rst_n;
  logic              cpu_valid [N];
  logic              cpu_ready [N];
  logic              cpu_we    [N];
  logic [ADDR_W-1:0] cpu_addr  [N];
  logic [31:0]       cpu_wdata [N];
  logic              cpu_done  [N];
  logic [31:0]       cpu_rdata [N];
  dn_msg_t           dn_tx     [N+1];
  dn_msg_t           dn_rx     [N+1];
  logic              mem_ld_valid;
  blk_t              mem_ld_blk;
  line_t             mem_ld_data;
  logic [NEV-1:0]    events    [N];
  logic              mem_resp;

  symnet_top #(.N_PROC(N), .SETS(4), .WAYS(2), .HIT_LAT(4), .WB_HOLD(DNL + N),
               .MEM_BLOCKS(64)) dut (.*);

  symnet_driver #(.N_PROC(N), .SETS(4), .MEM_BLOCKS(64), .DN_LAT(DNL),
                  .OPS(300), .POOL(12), .WATCHDOG(400000)) drv (.*);
endmodule
