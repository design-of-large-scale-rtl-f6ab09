// tb_cosym_ctrl: directed test of one COSYM cache controller (processor 1).
//
// The testbench plays the rest of the machine: it takes the controller's
// requests, reports their insertion, broadcasts them back three cycles later,
// returns the snoop response SNOOP_DLY cycles after that, delivers data, and
// injects the requests of other processors at chosen cycles. Expected values
// come from the protocol rules, not from the controller:
//  - read miss with snoop low loads E; a later read hit takes HIT_LAT cycles
//  - the owner answers another's read with snoop high and the block
//  - a write to an O copy inserts an upgrade and completes on visibility
//  - a read seen between insertion and visibility (IE-ads -> IS-ads) loads S
//  - a read seen after visibility (IE-ds -> IO-ds) gives no response yet and
//    loads O on snoop low
//  - a write miss answers later reads and forwards the written block
//  - eviction: O with next sharer -> transfer write-back type 1, S -> type 2
//    (re-issued when unacknowledged), M or lone O -> ordinary write-back, with
//    the write-back buffer answering in the meantime
//  - acknowledging other processors' transfer write-backs
module tb_cosym_ctrl;
  import symnet_pkg::*;
  localparam int unsigned SD   = 4;
  localparam int unsigned HL   = 4;
  localparam int unsigned NETL = 3;    // insertion -> visibility
  localparam pid_t        ME   = 7'd1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_valid, cpu_ready, cpu_we, cpu_done;
  logic [ADDR_W-1:0] cpu_addr;
  logic [31:0] cpu_wdata, cpu_rdata;
  logic apc_valid, apc_ready, apc_inserted, snoop_out;
  addr_req_t apc_req;
  link_t rx;
  dn_msg_t dn_tx, dn_rx;
  logic [NEV-1:0] events;

  cosym_ctrl #(.MY_ID(1), .SETS(4), .WAYS(2), .SNOOP_DLY(SD), .HIT_LAT(HL),
               .WB_HOLD(40), .FWD_DEPTH(4), .MAX_RETRY(3)) dut (
    .clk(clk), .rst_n(rst_n), .cpu_valid(cpu_valid), .cpu_ready(cpu_ready),
    .cpu_we(cpu_we), .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata),
    .cpu_done(cpu_done), .cpu_rdata(cpu_rdata), .apc_valid(apc_valid),
    .apc_ready(apc_ready), .apc_req(apc_req), .apc_inserted(apc_inserted),
    .snoop_out(snoop_out), .rx(rx), .dn_tx(dn_tx), .dn_rx(dn_rx), .events(events));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  addr_req_t sched_req [int];
  logic      sched_snp [int];
  dn_msg_t   sched_dn  [int];
  logic      log_snp   [int];
  dn_msg_t   log_dn    [int];
  int        ev_cnt    [NEV];

  // network model for the controller's own requests
  addr_req_t own [$];          // every request the controller inserted
  int        own_vis [$];      // cycle each became visible
  logic      rd_snoop  = 1'b0; // snoop returned for own misses
  logic      auto_data = 1'b1; // deliver the block SD+2 cycles after visibility
  logic      twb_ack [$];      // acks for successive own transfer write-backs
  logic      race_pre = 1'b0;  // inject race_req between insertion and visibility
  logic      race_post = 1'b0; // inject race_req the cycle after visibility
  addr_req_t race_req;
  int        busy = 0;
  addr_req_t held;

  function automatic line_t pat(blk_t b);
    line_t l;
    for (int w = 0; w < WORDS; w++) l[w*32 +: 32] = {b[15:0], 16'(w)};
    return l;
  endfunction

  assign apc_ready = (busy == 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    apc_inserted <= 1'b0;
    if (rst_n) begin
      if (busy == 0 && apc_valid) begin
        busy <= 1;
        held <= apc_req;
      end else if (busy == 1) begin
        // inserted now; visible NETL cycles later
        automatic addr_req_t q = held;
        automatic int v = cyc + 1 + NETL;
        apc_inserted <= 1'b1;
        busy <= 0;
        q.valid = 1'b1;
        own.push_back(q);
        own_vis.push_back(v);
        sched_req[v] = q;
        if (q.kind inside {REQ_TWB1, REQ_TWB2})
          sched_snp[v + SD] = (twb_ack.size() != 0) ? twb_ack.pop_front() : 1'b1;
        else if (q.kind inside {REQ_RD_MISS, REQ_WR_MISS}) begin
          sched_snp[v + SD] = rd_snoop;
          if (auto_data) begin
            automatic dn_msg_t d = '0;
            d.valid = 1'b1; d.dst = ME; d.blk = q.blk; d.data = pat(q.blk);
            sched_dn[v + SD + 2] = d;
          end
        end
        if (race_pre)  begin sched_req[cyc + 2] = race_req; race_pre  <= 1'b0; end
        if (race_post) begin sched_req[v + 1]   = race_req; race_post <= 1'b0; end
      end
    end
  end

  // drive the broadcast and data inputs, log the controller's outputs
  always @(negedge clk) begin
    rx = '0; dn_rx = '0;
    if (sched_req.exists(cyc)) rx.req = sched_req[cyc];
    if (sched_snp.exists(cyc)) rx.snoop = sched_snp[cyc];
    if (sched_dn.exists(cyc))  dn_rx = sched_dn[cyc];
    log_snp[cyc] = snoop_out;
    log_dn[cyc]  = dn_tx;
    for (int e = 0; e < NEV; e++) if (events[e]) ev_cnt[e]++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic logic [ADDR_W-1:0] addr_of(blk_t b, int w);
    return {b, 5'(w * 4)};
  endfunction

  int t_acc, t_done;
  task automatic access(logic we, blk_t b, int w, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    while (!cpu_ready) @(negedge clk);
    cpu_valid = 1'b1; cpu_we = we; cpu_addr = addr_of(b, w); cpu_wdata = wd;
    @(negedge clk);
    t_acc = cyc;
    cpu_valid = 1'b0;
    while (!cpu_done) @(negedge clk);
    t_done = cyc;
    rd = cpu_rdata;
  endtask

  // inject another processor's request in a quiet cycle; returns its cycle
  task automatic other(req_kind_e k, pid_t src, blk_t b, logic nv, pid_t nx, output int at);
    automatic addr_req_t q = '0;
    q.valid = 1'b1; q.kind = k; q.src = src; q.blk = b; q.nxt_vld = nv; q.nxt = nx;
    @(negedge clk);
    at = cyc + 2;
    while (sched_req.exists(at) || sched_req.exists(at + 1)) at++;
    sched_req[at] = q;
    repeat (at - cyc + 3) @(negedge clk);
  endtask

  function automatic logic sent_to(int from, pid_t dst, blk_t b, int w, logic [31:0] val);
    for (int c = from; c <= cyc; c++)
      if (log_dn.exists(c) && log_dn[c].valid && !log_dn[c].to_mem &&
          log_dn[c].dst == dst && log_dn[c].blk == b &&
          log_dn[c].data[w*32 +: 32] == val) return 1'b1;
    return 1'b0;
  endfunction

  function automatic logic sent_mem(int from, blk_t b, int w, logic [31:0] val);
    for (int c = from; c <= cyc; c++)
      if (log_dn.exists(c) && log_dn[c].valid && log_dn[c].to_mem &&
          log_dn[c].blk == b && log_dn[c].data[w*32 +: 32] == val) return 1'b1;
    return 1'b0;
  endfunction

  localparam blk_t A  = 27'h10, A2 = 27'h80, A3 = 27'h90, A4 = 27'hA0;
  localparam blk_t B  = 27'h21, B2 = 27'h31, B3 = 27'h41;
  localparam blk_t C  = 27'h32, E  = 27'h52, F  = 27'h62;
  localparam blk_t D  = 27'h43, D2 = 27'h53, D3 = 27'h63;

  logic [31:0] rd;
  int at, n0, mark;

  initial begin
    cpu_valid = 1'b0; cpu_we = 1'b0; cpu_addr = '0; cpu_wdata = '0;
    rx = '0; dn_rx = '0;
    for (int e = 0; e < NEV; e++) ev_cnt[e] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // 1. read miss, no owner: memory data, E
    access(1'b0, A, 3, 0, rd);
    check("read miss returns memory word", rd == {A[15:0], 16'd3});
    check("read miss inserted a read-miss request",
          own.size() == 1 && own[0].kind == REQ_RD_MISS && own[0].blk == A);

    // 2. hit latency
    access(1'b0, A, 5, 0, rd);
    check("read hit data", rd == {A[15:0], 16'd5});
    check($sformatf("read hit takes %0d cycles (took %0d)", HL, t_done - t_acc),
          t_done - t_acc == HL);
    check("hit inserts nothing", own.size() == 1);

    // 3. E owner answers another read: snoop high, block, E -> O
    other(REQ_RD_MISS, 7'd2, A, 1'b0, '0, at);
    check("owner answers with snoop high", log_snp[at + 1] == 1'b1);
    check("owner sends the block", sent_to(at, 7'd2, A, 3, {A[15:0], 16'd3}));

    // 4. write to the O copy: upgrade, completes on visibility
    n0 = own.size();
    access(1'b1, A, 3, 32'hDEADBEEF, rd);
    check("write to O inserts an upgrade", own.size() == n0 + 1 && own[n0].kind == REQ_UPGRADE);
    check("upgrade completes when visible", t_done <= own_vis[n0] + 2);
    other(REQ_RD_MISS, 7'd3, A, 1'b0, '0, at);
    check("M owner answers", log_snp[at + 1] == 1'b1);
    check("written word forwarded", sent_to(at, 7'd3, A, 3, 32'hDEADBEEF));

    // 5. IE-ads -> IS-ads race: another read seen before our own, snoop low -> S
    race_req = '0; race_req.valid = 1'b1; race_req.kind = REQ_RD_MISS;
    race_req.src = 7'd3; race_req.blk = B;
    race_pre = 1'b1; rd_snoop = 1'b0;
    access(1'b0, B, 1, 0, rd);
    check("race read data", rd == {B[15:0], 16'd1});
    check("IE-ads -> IS-ads seen", ev_cnt[EV_IS_RACE] == 1);
    other(REQ_RD_MISS, 7'd2, B, 1'b0, '0, at);
    check("S copy does not answer", log_snp[at + 1] == 1'b0 && !log_dn[at + 1].valid);

    // 6. IE-ds -> IO-ds: another read right after ours; snoop low -> O
    race_req.blk = C; race_req.src = 7'd3;
    race_post = 1'b1;
    access(1'b0, C, 0, 0, rd);
    check("IE-ds -> IO-ds seen", ev_cnt[EV_IO] == 1);
    check("no answer before own snoop", log_snp[own_vis[own.size()-1] + 2] == 1'b0);
    other(REQ_RD_MISS, 7'd2, C, 1'b0, '0, at);
    check("loaded as owner (O) after IO-d", log_snp[at + 1] == 1'b1);

    // 7. write miss with a later read: deferred snoop high and forward
    auto_data = 1'b0;
    race_req.blk = D; race_req.src = 7'd2; race_post = 1'b1;
    n0 = own.size();
    fork
      access(1'b1, D, 0, 32'h12345678, rd);
      begin
        wait (own.size() == n0 + 1);
        mark = own_vis[n0];
        wait (cyc == mark + 3);
        @(negedge clk);
        begin
          automatic dn_msg_t d = '0;
          d.valid = 1'b1; d.dst = ME; d.blk = D; d.data = pat(D);
          sched_dn[cyc + 2] = d;
        end
      end
    join
    check("write miss inserted", own[n0].kind == REQ_WR_MISS && own[n0].blk == D);
    check("writer answers the later read at once", log_snp[mark + 2] == 1'b1);
    repeat (4) @(negedge clk);
    check("writer forwards the written block", sent_to(mark, 7'd2, D, 0, 32'h12345678));
    check("forward event", ev_cnt[EV_FWD] >= 1);
    auto_data = 1'b1;

    // 8. eviction of O with next sharer 3: transfer write-back type 1
    access(1'b0, E, 0, 0, rd);
    n0 = own.size();
    access(1'b0, F, 0, 0, rd);
    check("O victim sends TWB1", own[n0].kind == REQ_TWB1 && own[n0].blk == C &&
          own[n0].nxt_vld && own[n0].nxt == 7'd3);
    check("miss follows the transfer", own[n0 + 1].kind == REQ_RD_MISS && own[n0 + 1].blk == F);
    check("F data", rd == {F[15:0], 16'd0});

    // 9. eviction of S with next sharer 2: TWB2, first unacknowledged -> re-issue
    access(1'b0, B2, 0, 0, rd);
    twb_ack.push_back(1'b0);
    twb_ack.push_back(1'b1);
    n0 = own.size();
    rd_snoop = 1'b1;                            // B3 comes from an owner: S
    access(1'b0, B3, 0, 0, rd);
    rd_snoop = 1'b0;
    check("S victim sends TWB2", own[n0].kind == REQ_TWB2 && own[n0].blk == B &&
          own[n0].nxt_vld && own[n0].nxt == 7'd2);
    check("unacknowledged TWB2 re-issued", own[n0 + 1].kind == REQ_TWB2 && ev_cnt[EV_RETRY] == 1);
    check("then the miss", own[n0 + 2].kind == REQ_RD_MISS && own[n0 + 2].blk == B3);

    // 10. another's TWB2 naming us as previous sharer of D: ack, D loses its sharer
    other(REQ_TWB2, 7'd2, D, 1'b0, '0, at);
    check("previous sharer acknowledges TWB2", log_snp[at + 1] == 1'b1);
    access(1'b0, D2, 0, 0, rd);
    n0 = own.size();
    mark = cyc;
    access(1'b0, D3, 0, 0, rd);
    check("lone O victim is an ordinary write-back (no transfer)",
          own[n0].kind == REQ_RD_MISS && own[n0].blk == D3);
    check("ordinary write-back carries the written data", sent_mem(mark, D, 0, 32'h12345678));

    // 11. TWB1 handing ownership of B3 to us; the write-back buffer answers for A2
    other(REQ_TWB1, 7'd4, B3, 1'b1, ME, at);
    check("new owner acknowledges TWB1", log_snp[at + 1] == 1'b1);
    other(REQ_RD_MISS, 7'd5, B3, 1'b0, '0, at);
    check("ownership taken: answers reads", log_snp[at + 1] == 1'b1);

    access(1'b1, A2, 2, 32'hCAFE0002, rd);      // write miss -> M in set 0
    access(1'b0, A3, 0, 0, rd);                 // evicts A (O, next 3): TWB1
    mark = cyc;
    access(1'b0, A4, 0, 0, rd);                 // evicts A2 (M): ordinary write-back
    check("M victim written back to memory", sent_mem(mark, A2, 2, 32'hCAFE0002));
    other(REQ_RD_MISS, 7'd6, A2, 1'b0, '0, at);
    check("write-back buffer answers meanwhile", log_snp[at + 1] == 1'b1 &&
          sent_to(at, 7'd6, A2, 2, 32'hCAFE0002));

    // 12. another's write miss invalidates our O copy of B3 after taking the data
    other(REQ_WR_MISS, 7'd5, B3, 1'b0, '0, at);
    check("owner answers write miss", log_snp[at + 1] == 1'b1);
    other(REQ_RD_MISS, 7'd6, B3, 1'b0, '0, at);
    check("invalidated copy stays silent", log_snp[at + 1] == 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
