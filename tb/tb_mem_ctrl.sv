// tb_mem_ctrl: memory must answer a read or write miss exactly when its snoop
// response, SNOOP_DLY cycles after the request, is low, one cycle later, with
// the block's current contents; it must stay silent for snoop high, upgrades
// and transfer write-backs, and absorb ordinary write-backs.
module tb_mem_ctrl;
  import symnet_pkg::*;
  localparam int unsigned SD = 4;
  localparam int unsigned MB = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  link_t rx;
  dn_msg_t dn_rx, dn_tx;
  logic ld_valid, resp_event;
  blk_t ld_blk;
  line_t ld_data;
  line_t model [MB];
  int checks = 0, failures = 0, answered = 0;
  // expected responses, indexed by cycle
  dn_msg_t expq [int];

  mem_ctrl #(.SNOOP_DLY(SD), .MEM_BLOCKS(MB)) dut (
    .clk(clk), .rst_n(rst_n), .rx(rx), .dn_rx(dn_rx), .dn_tx(dn_tx),
    .ld_valid(ld_valid), .ld_blk(ld_blk), .ld_data(ld_data), .resp_event(resp_event));

  always #5 clk = ~clk;

  function automatic line_t pat(int unsigned b, int unsigned s);
    line_t l;
    for (int w = 0; w < 8; w++) l[w*32 +: 32] = 32'(b * 1000 + s * 10 + w);
    return l;
  endfunction

  addr_req_t hist [int];
  initial begin
    rx = '0; dn_rx = '0; ld_valid = 1'b0; ld_blk = '0; ld_data = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < MB; b++) begin
      @(negedge clk);
      ld_valid = 1'b1; ld_blk = blk_t'(b); ld_data = pat(b, 0); model[b] = pat(b, 0);
    end
    @(negedge clk);
    ld_valid = 1'b0;
    for (int c = 0; c < 400; c++) begin
      rx = '0; dn_rx = '0;
      // snoop for the request of cycle c-SD
      if (hist.exists(c - SD)) begin
        automatic addr_req_t o = hist[c - SD];
        rx.snoop = 1'($urandom_range(0, 1));
        if (o.valid && o.kind inside {REQ_RD_MISS, REQ_WR_MISS} && !rx.snoop) begin
          automatic dn_msg_t e = '0;
          e.valid = 1'b1; e.dst = o.src; e.blk = o.blk; e.data = model[o.blk[3:0]];
          expq[c + 1] = e;
        end
      end
      if ($urandom_range(0, 2) != 0) begin
        rx.req.valid = 1'b1;
        rx.req.kind  = req_kind_e'($urandom_range(1, 5));
        rx.req.src   = pid_t'($urandom_range(0, 31));
        rx.req.blk   = blk_t'($urandom_range(0, MB - 1));
      end
      hist[c] = rx.req;
      // an ordinary write-back now and then (not to a block answered this cycle)
      if ($urandom_range(0, 9) == 0) begin
        automatic int unsigned b = $urandom_range(0, MB - 1);
        dn_rx.valid = 1'b1; dn_rx.to_mem = 1'b1; dn_rx.blk = blk_t'(b);
        dn_rx.data = pat(b, c + 1);
      end
      @(posedge clk);
      if (dn_rx.valid) model[dn_rx.blk[3:0]] = dn_rx.data;
      @(negedge clk);
      checks++;
      if (expq.exists(c + 1)) begin
        answered++;
        if (dn_tx !== expq[c + 1]) begin
          failures++;
          $display("cycle %0d: got blk %0d dst %0d expected blk %0d dst %0d", c,
                   dn_tx.blk, dn_tx.dst, expq[c + 1].blk, expq[c + 1].dst);
        end
      end else if (dn_tx.valid) begin
        failures++;
        $display("cycle %0d: unexpected response for blk %0d", c, dn_tx.blk);
      end
    end
    checks++;
    if (answered < 30) begin failures++; $display("only %0d answers", answered); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
