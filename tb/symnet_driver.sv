// symnet_driver: test environment for symnet_top, shared by the reduced and
// the full-size end-to-end testbenches.
//
// It provides clock and reset, fills memory with a known pattern, models the
// data sub-network as a conflict-free crossbar with a fixed latency DN_LAT
// (52 cycles for a 32-byte block in the document), and runs OPS random reads
// and writes per processor on a small pool of blocks chosen to collide in a
// few cache sets, so that misses, races between processors, upgrades and all
// kinds of write-back happen.
//
// Checks, all computed from the values themselves rather than from the RTL:
//  - every value read belongs to the word it was read from (each word's
//    initial value and every value written to it carry the word's address);
//  - coherence: for every word, writes complete in one order (each gets a
//    version number at completion) and no processor ever reads an older
//    version than one it has already read or written;
//  - at the end every processor reads every word and sees its last version;
//  - a processor never receives two blocks in the same cycle (one responder);
//  - every protocol mechanism happened at least once (when ALL_MECH is set;
//    otherwise the counts are only reported).
module symnet_driver
  import symnet_pkg::*;
#(
  parameter int unsigned N_PROC     = 4,
  parameter int unsigned SETS       = 4,
  parameter int unsigned MEM_BLOCKS = 64,
  parameter int unsigned DN_LAT     = 8,
  parameter int unsigned OPS        = 200,
  parameter int unsigned POOL       = 12,
  parameter int unsigned WATCHDOG   = 200000,
  parameter bit          ALL_MECH   = 1'b1   // count a failure for a mechanism never seen
) (
  output logic              clk,
  output logic              rst_n,
  output logic              cpu_valid [N_PROC],
  input  logic              cpu_ready [N_PROC],
  output logic              cpu_we    [N_PROC],
  output logic [ADDR_W-1:0] cpu_addr  [N_PROC],
  output logic [31:0]       cpu_wdata [N_PROC],
  input  logic              cpu_done  [N_PROC],
  input  logic [31:0]       cpu_rdata [N_PROC],
  input  dn_msg_t           dn_tx     [N_PROC+1],
  output dn_msg_t           dn_rx     [N_PROC+1],
  output logic              mem_ld_valid,
  output blk_t              mem_ld_blk,
  output line_t             mem_ld_data,
  input  logic [NEV-1:0]    events    [N_PROC],
  input  logic              mem_resp
);
  int checks = 0, failures = 0;
  int cyc = 0;
  int ev_cnt [NEV];
  int mem_resp_cnt = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------ pool of blocks and words
  // pool block k lives in set (k mod 3) and differs in tag, so each used set
  // holds more blocks than it has ways
  function automatic blk_t pool_blk(int unsigned k);
    return blk_t'((k / 3) * SETS + (k % 3));
  endfunction
  // word value: {pool index 6, word 3, writer 7 (127 = memory), sequence 16}
  function automatic logic [31:0] init_val(int unsigned k, int unsigned w);
    return {6'(k), 3'(w), 7'h7F, 16'h0};
  endfunction
  function automatic line_t init_line(int unsigned k);
    line_t l;
    for (int w = 0; w < WORDS; w++) l[w*32 +: 32] = init_val(k, w);
    return l;
  endfunction

  // ------------------------------------------------ data sub-network model
  // Write-backs from several caches may reach memory in the same cycle; the
  // memory takes one per cycle from a queue (max_mq is its deepest level).
  dn_msg_t pipe [DN_LAT][N_PROC+1];
  dn_msg_t mq [$];
  int max_mq = 0;
  always @(posedge clk) begin
    for (int d = DN_LAT - 1; d > 0; d--) pipe[d] <= pipe[d-1];
    for (int s = 0; s <= N_PROC; s++) pipe[0][s] <= rst_n ? dn_tx[s] : '0;
    if (mq.size() != 0) void'(mq.pop_front());
    for (int s = 0; s <= N_PROC; s++)
      if (pipe[DN_LAT-1][s].valid && pipe[DN_LAT-1][s].to_mem)
        mq.push_back(pipe[DN_LAT-1][s]);
    if (mq.size() > max_mq) max_mq = mq.size();
  end
  always_comb begin
    for (int e = 0; e <= N_PROC; e++) dn_rx[e] = '0;
    dn_rx[N_PROC] = (mq.size() != 0) ? mq[0] : '0;
    for (int s = 0; s <= N_PROC; s++) begin
      automatic dn_msg_t m = pipe[DN_LAT-1][s];
      if (m.valid && !m.to_mem) dn_rx[m.dst] = m;
    end
  end
  // two blocks for one processor in one cycle would be two responders
  always @(negedge clk) begin
    if (rst_n) begin
      automatic int cnt [N_PROC];
      for (int e = 0; e < N_PROC; e++) cnt[e] = 0;
      for (int s = 0; s <= N_PROC; s++)
        if (pipe[DN_LAT-1][s].valid && !pipe[DN_LAT-1][s].to_mem)
          cnt[int'(pipe[DN_LAT-1][s].dst)]++;
      for (int e = 0; e < N_PROC; e++)
        if (cnt[e] > 1) begin
          failures++;
          $display("@%0d: %0d blocks delivered to endpoint %0d at once", cyc, cnt[e], e);
        end
      for (int p = 0; p < N_PROC; p++)
        for (int e = 0; e < NEV; e++) if (events[p][e]) ev_cnt[e]++;
      if (mem_resp) mem_resp_cnt++;
    end
  end

  // ------------------------------------------------ coherence bookkeeping
  int ver_of [logic [31:0]];                 // value -> version
  int last_ver [POOL][WORDS];                // newest completed version
  logic [31:0] last_val [POOL][WORDS];
  int seen [N_PROC][POOL][WORDS];            // newest version each processor saw

  task automatic cpu_op(int p, logic we, int unsigned k, int unsigned w,
                        logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    while (!cpu_ready[p]) @(negedge clk);
    cpu_valid[p] = 1'b1; cpu_we[p] = we;
    cpu_addr[p] = {pool_blk(k), 5'(w * 4)}; cpu_wdata[p] = wd;
    @(negedge clk);
    cpu_valid[p] = 1'b0;
    while (!cpu_done[p]) @(negedge clk);
    rd = cpu_rdata[p];
  endtask

  task automatic check_read(int p, int unsigned k, int unsigned w, logic [31:0] v, string what);
    checks++;
    if (v[31:23] != {6'(k), 3'(w)} || !ver_of.exists(v)) begin
      failures++;
      $display("@%0d P%0d %s: word %0d.%0d read foreign value %h", cyc, p, what, k, w, v);
    end else begin
      checks++;
      if (ver_of[v] < seen[p][k][w]) begin
        failures++;
        $display("@%0d P%0d %s: word %0d.%0d went back from version %0d to %0d",
                 cyc, p, what, k, w, seen[p][k][w], ver_of[v]);
      end else seen[p][k][w] = ver_of[v];
    end
  endtask

  task automatic worker(int p);
    logic [31:0] rd, wv;
    for (int unsigned n = 0; n < OPS; n++) begin
      automatic int unsigned k  = $urandom_range(0, POOL - 1);
      automatic int unsigned w  = $urandom_range(0, WORDS - 1);
      automatic logic        we = ($urandom_range(0, 2) == 0);
      repeat ($urandom_range(0, 6)) @(negedge clk);
      if (we) begin
        wv = {6'(k), 3'(w), 7'(p), 16'(n + 1)};
        cpu_op(p, 1'b1, k, w, wv, rd);
        // the write is complete: it is the newest version of the word
        last_ver[k][w]++;
        ver_of[wv]      = last_ver[k][w];
        last_val[k][w]  = wv;
        seen[p][k][w]   = last_ver[k][w];
      end else begin
        cpu_op(p, 1'b0, k, w, 0, rd);
        check_read(p, k, w, rd, "read");
      end
    end
  endtask

  initial begin
    for (int e = 0; e < NEV; e++) ev_cnt[e] = 0;
    for (int p = 0; p < N_PROC; p++) begin
      cpu_valid[p] = 1'b0; cpu_we[p] = 1'b0; cpu_addr[p] = '0; cpu_wdata[p] = '0;
      for (int k = 0; k < POOL; k++)
        for (int w = 0; w < WORDS; w++) seen[p][k][w] = 0;
    end
    for (int k = 0; k < POOL; k++)
      for (int w = 0; w < WORDS; w++) begin
        last_ver[k][w] = 0; last_val[k][w] = init_val(k, w);
        ver_of[init_val(k, w)] = 0;
      end
    for (int d = 0; d < DN_LAT; d++)
      for (int s = 0; s <= N_PROC; s++) pipe[d][s] = '0;
    mem_ld_valid = 1'b0; mem_ld_blk = '0; mem_ld_data = '0;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    // fill memory: every pool block gets its initial pattern
    for (int k = 0; k < POOL; k++) begin
      @(negedge clk);
      mem_ld_valid = 1'b1; mem_ld_blk = pool_blk(k); mem_ld_data = init_line(k);
    end
    @(negedge clk);
    mem_ld_valid = 1'b0;

    // all processors run at once
    for (int p = 0; p < N_PROC; p++) begin
      automatic int pp = p;
      fork worker(pp); join_none
    end
    wait fork;

    // final read-back: everyone sees the last version of every word
    repeat (4 * DN_LAT) @(negedge clk);
    for (int p = 0; p < N_PROC; p++)
      for (int k = 0; k < POOL; k++)
        for (int w = 0; w < WORDS; w += 3) begin
          automatic logic [31:0] rd;
          cpu_op(p, 1'b0, k, w, 0, rd);
          checks++;
          if (rd != last_val[k][w]) begin
            failures++;
            $display("final: P%0d word %0d.%0d = %h, last written %h", p, k, w, rd, last_val[k][w]);
          end
        end

    // every mechanism of the protocol must have happened
    begin
      automatic string names [NEV] = '{"IE-ads->IS-ads race", "IE-ds->IO-ds",
        "transient->II-d", "snoop high", "transfer write-back 1",
        "transfer write-back 2", "ordinary write-back", "transfer re-issue",
        "deferred forward", "upgrade", "transfer acknowledge", "write-back buffer hit"};
      for (int e = 0; e < NEV; e++) begin
        checks++;
        $display("mechanism %-24s : %0d", names[e], ev_cnt[e]);
        if (ev_cnt[e] == 0 && ALL_MECH) begin
          failures++;
          $display("mechanism never exercised: %s", names[e]);
        end
      end
      checks++;
      $display("mechanism %-24s : %0d", "memory answers", mem_resp_cnt);
      if (mem_resp_cnt == 0 && ALL_MECH) failures++;
    end
    $display("cycles: %0d, deepest memory write queue: %0d", cyc, max_mq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
