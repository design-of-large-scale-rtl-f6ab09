// tb_symnet_full: the SYMNET machine at its default size - 32 processors,
// 64 KB 4-way L2 caches with 32-byte blocks, 4096 memory blocks, a 52-cycle
// data sub-network - with the top's parameters left at their defaults.
//
// All 32 processors run random reads and writes at once on 18 shared blocks
// that fall in three cache sets (six blocks per set against four ways), so
// misses from many processors meet on the address tree and evictions produce
// transfer write-backs of both types and ordinary write-backs. The checks are
// those of symnet_driver: every value read belongs to its word, no processor
// sees a word go back to an older version, everyone reads the last version
// at the end, and no processor receives two blocks at once. How often each
// protocol mechanism happened is reported; that each one happens at all is
// checked by the reduced end-to-end testbench, whose smaller caches make
// every mechanism frequent.
module tb_symnet_full;
  import symnet_pkg::*;
  localparam int unsigned N = 32;

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

  symnet_top dut (.*);

  symnet_driver #(.N_PROC(N), .SETS(512), .MEM_BLOCKS(4096), .DN_LAT(52),
                  .OPS(40), .POOL(18), .WATCHDOG(400000), .ALL_MECH(1'b0)) drv (.*);
endmodule
