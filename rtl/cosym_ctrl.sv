// cosym_ctrl: L2 cache controller running the COSYM coherence protocol.
//
// COSYM is MOESI changed so that every shared block has exactly one owner,
// because the snoop response travels on a single optical lane and two
// responders would collide. The owner (a cache in E, O or M) alone answers a
// miss: snoop high means "a cache supplies the data, load S"; snoop low means
// "memory supplies it, load E". A read miss to an E block turns it into O.
// Requests from different processors are in flight on the address tree at
// the same time, so between inserting its own request and seeing it broadcast
// a cache must watch the requests of others; the transient states below are
// those of the document's read-miss state diagram:
//
//   IE-ads (issued, not yet inserted)  -- inserted -->  IE-ads (reacting)
//   IE-ads (reacting)  -- other read visible -->  IS-ads (not reacting)
//   IE-ads / IS-ads    -- own request visible -->  IE-ds / IS-ds
//   IE-ds  -- other read -->  IO-ds ;  any *-ds/*-d  -- other write -->  II-d
//   IE-ds: snoop high -> IS-d, low -> IE-d ; IO-ds: high -> IS-d, low -> IO-d
//   IS-ds: either -> IS-d ;  data received: IE-d->E, IO-d->O, IS-d->S, II-d->I
//
// Each block in O or S also records its next sharer, so that sharers form a
// chain from the owner to the most recent reader; a cache that is the tail of
// the chain (no next sharer) records the next reader. Evicting an O block
// with a next sharer inserts a transfer write-back type 1 (ownership moves to
// the next sharer); evicting an S block inserts a type 2 (the previous sharer
// takes over the evicted block's next sharer). The cache that acts on a
// transfer write-back acknowledges it on the snoop lane. Evicting an M block,
// or an O block without sharers, is an ordinary write-back to memory over the
// data sub-network; the block waits in a write-back buffer, which keeps
// answering requests for it, until the data has reached memory. All of this
// follows the document.
//
// This design's own choices, where the document is silent:
//  * The write-miss path (not drawn in the document): IM-ad -> IM-d on
//    visibility -> M on data. From visibility on, the writer is the owner in
//    the global order: it answers later requests with snoop high and forwards
//    the block once its own data has arrived (forward queue).
//  * A cache in IE-d or IO-d (its own snoop was low, so it is the owner) also
//    answers later reads with snoop high and forwards the block.
//  * UPGRADE (named but not described by the document) is a write to an S or
//    O copy: other copies invalidate, no data moves, and the writer is M once
//    its request is visible. An upgrade can race with a write that becomes
//    visible after the writer looked at its copy and takes that copy away.
//    Every cache keeps the blocks of the writes visible in the last UPG_WIN
//    cycles (UPG_WIN >= N_PROC + SNOOP_DLY + 2 covers the token wait and
//    the trip through the tree); an upgrade for a block in that list is void:
//    no cache acts on it and the writer asks again, as an upgrade if it
//    still has a copy and as a write miss if not.
//  * A cache handles one miss at a time; a transfer write-back completes
//    before the miss that caused the eviction is inserted, and a line is not
//    chosen as victim in the cycle a request for it becomes visible. An E
//    victim is dropped silently. A transfer write-back that is not
//    acknowledged is re-issued with the current next sharer, up to MAX_RETRY
//    times; then a type 2 is dropped and a type 1 becomes an ordinary
//    write-back, as does an evicted O block that has no sharer left. The
//    document's own race-resolution algorithm for transfer write-backs is not
//    published; the rules below are this design's:
//  * Chain order is the broadcast order. An evicted block leaves the chain
//    when its own transfer becomes visible; before that it still appends a
//    new reader if it is the tail, and accepts a type 1 naming it.
//  * Every sharer also records the first reader that joined after its next
//    sharer. A type 2 from the next sharer that says "no next sharer" may
//    have been built before that reader joined; the recorded reader then
//    becomes the next sharer.
//  * A sharer whose own type 2 is already committed to the network ignores a
//    type 2 from its next sharer, which re-issues. An owner sending a type 1
//    does act on it; if the sharer named in its type 1 has left by the time
//    the type 1 is visible, the hand-over is void and the cache stays the
//    owner and sends again. An evicting owner answers requests until its
//    hand-over is visible.
//  * The write-back buffer stops answering once it has answered a write,
//    whose requester is then the owner.
//
// Timing: a request visible in cycle v gets its snoop response, driven by the
// owner in cycle v+1, back to everyone in cycle v+SNOOP_DLY (the snoop takes
// as long as the request, 2*log2(N) cycles). Hits answer after HIT_LAT cycles
// (4, the document's L2 access time). Data responses leave on dn_tx the cycle
// after the request is seen.
//
// Interface: cpu_* is the processor's L2 port (one access at a time,
// cpu_ready/cpu_valid, result on cpu_done); apc_* feeds the address port
// controller; rx is this processor's leaf of the broadcast tree; snoop_out is
// its snoop/ack lane; dn_tx/dn_rx connect to the data sub-network; events
// pulses for each protocol mechanism (indices EV_* in symnet_pkg).
module cosym_ctrl
  import symnet_pkg::*;
#(
  parameter int unsigned MY_ID     = 0,
  parameter int unsigned SETS      = 512,  // 64 KB, 4-way, 32-byte blocks
  parameter int unsigned WAYS      = 4,
  parameter int unsigned SNOOP_DLY = 10,   // 2*log2(32)
  parameter int unsigned HIT_LAT   = 4,
  parameter int unsigned WB_HOLD   = 84,   // 52-cycle block transfer + 32 queueing
  parameter int unsigned FWD_DEPTH = 32,
  parameter int unsigned MAX_RETRY = 8,
  parameter int unsigned UPG_WIN   = 44    // N_PROC + SNOOP_DLY + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // processor side
  input  logic                 cpu_valid,
  output logic                 cpu_ready,
  input  logic                 cpu_we,
  input  logic [ADDR_W-1:0]    cpu_addr,
  input  logic [31:0]          cpu_wdata,
  output logic                 cpu_done,
  output logic [31:0]          cpu_rdata,
  // address port controller
  output logic                 apc_valid,
  input  logic                 apc_ready,
  output addr_req_t            apc_req,
  input  logic                 apc_inserted,
  output logic                 snoop_out,
  // broadcast side of the address tree
  input  link_t                rx,
  // data sub-network
  output dn_msg_t              dn_tx,
  input  dn_msg_t              dn_rx,
  // protocol events, one-cycle pulses
  output logic [NEV-1:0]       events
);
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W = BLK_W - SET_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned HC_W  = $clog2(HIT_LAT + 1);
  localparam int unsigned SD_W  = $clog2(SNOOP_DLY + 1);
  localparam int unsigned WB_W  = $clog2(WB_HOLD + 1);
  localparam int unsigned FQ_W  = $clog2(FWD_DEPTH + 1);
  localparam int unsigned RT_W  = $clog2(MAX_RETRY + 1);
  localparam int unsigned FI_W  = (FWD_DEPTH > 1) ? $clog2(FWD_DEPTH) : 1;

  typedef enum logic [3:0] {
    T_NONE, T_IE_ADS_ISS, T_IE_ADS, T_IS_ADS, T_IE_DS, T_IS_DS, T_IO_DS,
    T_IE_D, T_IS_D, T_IO_D, T_II_D, T_IM_AD_ISS, T_IM_AD, T_IM_D,
    T_SM_A_ISS, T_SM_A
  } tstate_e;

  typedef enum logic [2:0] { C_IDLE, C_ACC, C_TWB, C_MISS, C_DRAIN } cstate_ctl_e;
  typedef enum logic [1:0] { P_ISS, P_FLY, P_WAIT } tphase_e;

  // ------------------------------------------------------------ cache arrays
  logic [TAG_W-1:0] tag_a [SETS][WAYS];
  cstate_e          st_a  [SETS][WAYS];
  logic             nv_a  [SETS][WAYS];
  pid_t             nx_a  [SETS][WAYS];
  logic             lv_a  [SETS][WAYS];   // first reader after the next sharer
  pid_t             lr_a  [SETS][WAYS];
  line_t            dat_a [SETS][WAYS];
  logic [WAY_W-1:0] age_a [SETS][WAYS];

  localparam pid_t ME = pid_t'(MY_ID);

  // a block number is {tag, set}
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [SET_W-1:0] set;
  } blk_split_t;
  function automatic blk_split_t blk_split(blk_t b);
    return blk_split_t'(b);
  endfunction

  // ------------------------------------------------------------ control regs
  cstate_ctl_e      c_st;
  logic [HC_W-1:0]  c_cnt;
  logic             c_we;
  logic [ADDR_W-1:0] c_addr;
  logic [31:0]      c_wdata;

  // miss status register
  tstate_e          m_st;
  logic             m_acc;        // request taken by the port controller
  blk_t             m_blk;
  logic [WAY_W-1:0] m_way;
  logic [SD_W-1:0]  m_cnt;
  logic             m_tmr;
  logic             m_have;
  line_t            m_data;
  logic             m_nv;
  pid_t             m_nx;
  logic             m_lv;
  pid_t             m_lr;
  logic             m_lost;
  logic             m_fwd_rd;
  pid_t             fq_dst [FWD_DEPTH];
  logic [FQ_W-1:0]  fq_n, fq_h;

  // transfer write-back entry
  logic             t_v, t_acc, t_dead;
  tphase_e          t_ph;
  cstate_e          t_st;
  req_kind_e        t_sent;
  blk_t             t_blk;
  logic             t_nv;
  pid_t             t_nx;
  logic             t_lv;
  pid_t             t_lr;
  line_t            t_data;
  logic [SD_W-1:0]  t_cnt;
  logic [RT_W-1:0]  t_retry;
  logic             t_chain, t_owner;
  logic             t_hand;   // the type 1 broadcast named the current next sharer
  logic             t_twb2_ok;

  // ordinary write-back buffer
  logic             wb_v, wb_send, wb_own;
  blk_t             wb_blk;
  line_t            wb_data;
  logic [WB_W-1:0]  wb_cnt;

  // recent writes, to tell a void upgrade (see the opening comment)
  logic             uw_v   [UPG_WIN];
  blk_t             uw_blk [UPG_WIN];
  logic             uw_hit, r_void;

  // ------------------------------------------------------------ lookups
  addr_req_t        r;
  logic             r_other, r_own;
  logic [SET_W-1:0] r_set;
  logic             r_hit;
  logic [WAY_W-1:0] r_way;
  blk_t             c_blk;
  logic [SET_W-1:0] c_set;
  logic             c_hit, c_inv;
  logic [WAY_W-1:0] c_way, c_vict, c_free;

  always_comb begin
    uw_hit = 1'b0;
    for (int k = 0; k < UPG_WIN; k++)
      if (uw_v[k] && uw_blk[k] == rx.req.blk) uw_hit = 1'b1;
    r_void = rx.req.valid && rx.req.kind == REQ_UPGRADE && uw_hit;
    // a void upgrade from another cache is not acted on at all
    r = rx.req;
    if (r_void && rx.req.src != ME) r.valid = 1'b0;
  end
  assign r_other = r.valid && (r.src != ME);
  assign r_own   = r.valid && (r.src == ME);
  assign r_set   = blk_split(r.blk).set;
  assign c_blk   = c_addr[ADDR_W-1:OFF_W];
  assign c_set   = blk_split(c_blk).set;

  always_comb begin
    r_hit = 1'b0; r_way = '0;
    c_hit = 1'b0; c_way = '0; c_inv = 1'b0; c_free = '0; c_vict = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (st_a[r_set][w] != ST_I && tag_a[r_set][w] == blk_split(r.blk).tag) begin
        r_hit = 1'b1; r_way = WAY_W'(w);
      end
      if (st_a[c_set][w] != ST_I && tag_a[c_set][w] == blk_split(c_blk).tag) begin
        c_hit = 1'b1; c_way = WAY_W'(w);
      end
      if (st_a[c_set][w] == ST_I && !c_inv) begin
        c_inv = 1'b1; c_free = WAY_W'(w);
      end
      if (age_a[c_set][w] == WAY_W'(WAYS - 1)) c_vict = WAY_W'(w);
    end
    if (c_inv) c_vict = c_free;
  end

  function automatic line_t put_word(line_t l, logic [$clog2(WORDS)-1:0] w, logic [31:0] d);
    line_t o = l;
    o[w*32 +: 32] = d;
    return o;
  endfunction

  // a visible request touches the block the processor side is working on
  logic r_on_cpu_blk, r_on_vict;
  assign r_on_cpu_blk = r.valid && (r.blk == c_blk);
  // a request for the victim becomes visible: evict it one cycle later
  assign r_on_vict    = r.valid && (r.blk == {tag_a[c_set][c_vict], c_set});

  logic mshr_busy, m_wait_data;
  assign mshr_busy   = (m_st != T_NONE);
  assign m_wait_data = m_st inside {T_IE_DS, T_IS_DS, T_IO_DS, T_IE_D, T_IS_D, T_IO_D,
                                    T_II_D, T_IM_D};

  // ------------------------------------------------------------ port requests
  always_comb begin
    apc_valid = 1'b0;
    apc_req   = '0;
    apc_req.src = ME;
    if (t_v && t_ph == P_ISS && !t_acc && !(t_st == ST_O && !t_nv)) begin
      apc_valid       = 1'b1;
      apc_req.kind    = (t_st == ST_O) ? REQ_TWB1 : REQ_TWB2;
      apc_req.blk     = t_blk;
      apc_req.nxt_vld = t_nv;
      apc_req.nxt     = t_nx;
    end else if (m_st inside {T_IE_ADS_ISS, T_IM_AD_ISS, T_SM_A_ISS} && !m_acc) begin
      apc_valid    = 1'b1;
      apc_req.kind = (m_st == T_IE_ADS_ISS) ? REQ_RD_MISS :
                     (m_st == T_IM_AD_ISS)  ? REQ_WR_MISS : REQ_UPGRADE;
      apc_req.blk  = m_blk;
    end
  end

  // ------------------------------------------------------------ main process
  always_ff @(posedge clk) begin
    // per-cycle working variables
    automatic logic    resp_v    = 1'b0;   // data response this cycle
    automatic pid_t    resp_dst  = '0;
    automatic line_t   resp_data = '0;
    automatic logic    snp       = 1'b0;
    automatic logic    ack       = 1'b0;
    automatic tstate_e ts        = m_st;
    automatic logic    own_snoop = 1'b0;
    automatic logic    m_hit     = 1'b0;
    automatic line_t   ld;
    automatic cstate_e fin;
    automatic logic    sent_twb  = 1'b0;
    automatic logic [NEV-1:0] ev = '0;

    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          st_a[s][w]  <= ST_I;
          nv_a[s][w]  <= 1'b0;
          lv_a[s][w]  <= 1'b0;
          lr_a[s][w]  <= '0;
          age_a[s][w] <= WAY_W'(w);
        end
      c_st <= C_IDLE; c_cnt <= '0; c_we <= 1'b0; c_addr <= '0; c_wdata <= '0;
      m_st <= T_NONE; m_acc <= 1'b0; m_blk <= '0; m_way <= '0; m_cnt <= '0;
      m_tmr <= 1'b0; m_have <= 1'b0; m_data <= '0; m_nv <= 1'b0; m_nx <= '0; m_lv <= 1'b0; m_lr <= '0;
      m_lost <= 1'b0; m_fwd_rd <= 1'b0; fq_n <= '0; fq_h <= '0;
      t_v <= 1'b0; t_acc <= 1'b0; t_dead <= 1'b0; t_ph <= P_ISS; t_st <= ST_I;
      t_sent <= REQ_NONE; t_blk <= '0; t_nv <= 1'b0; t_nx <= '0; t_lv <= 1'b0; t_lr <= '0; t_hand <= 1'b0; t_data <= '0;
      t_cnt <= '0; t_retry <= '0;
      wb_v <= 1'b0; wb_send <= 1'b0; wb_own <= 1'b0; wb_blk <= '0; wb_data <= '0; wb_cnt <= '0;
      snoop_out <= 1'b0; dn_tx <= '0; cpu_done <= 1'b0; cpu_rdata <= '0;
      for (int k = 0; k < UPG_WIN; k++) begin uw_v[k] <= 1'b0; uw_blk[k] <= '0; end
      events <= '0;
    end else begin
      cpu_done <= 1'b0;
      uw_v[0]   <= rx.req.valid && (rx.req.kind == REQ_WR_MISS ||
                                    (rx.req.kind == REQ_UPGRADE && !uw_hit));
      uw_blk[0] <= rx.req.blk;
      for (int k = 1; k < UPG_WIN; k++) begin
        uw_v[k] <= uw_v[k-1]; uw_blk[k] <= uw_blk[k-1];
      end

      // ---------------------------------------------- stable lines snoop
      if (r_other && r_hit) begin
        case (r.kind)
          REQ_RD_MISS: begin
            if (st_a[r_set][r_way] inside {ST_E, ST_O, ST_M}) begin
              snp = 1'b1; resp_v = 1'b1; resp_dst = r.src;
              resp_data = dat_a[r_set][r_way];
              st_a[r_set][r_way] <= ST_O;
            end
            if (!nv_a[r_set][r_way]) begin
              nv_a[r_set][r_way] <= 1'b1; nx_a[r_set][r_way] <= r.src;
              lv_a[r_set][r_way] <= 1'b0;
            end else if (!lv_a[r_set][r_way]) begin
              lv_a[r_set][r_way] <= 1'b1; lr_a[r_set][r_way] <= r.src;
            end
          end
          REQ_WR_MISS: begin
            if (st_a[r_set][r_way] inside {ST_E, ST_O, ST_M}) begin
              snp = 1'b1; resp_v = 1'b1; resp_dst = r.src;
              resp_data = dat_a[r_set][r_way];
            end
            st_a[r_set][r_way] <= ST_I;
          end
          REQ_UPGRADE: st_a[r_set][r_way] <= ST_I;
          REQ_TWB1: begin
            if (r.nxt_vld && r.nxt == ME && st_a[r_set][r_way] == ST_S) begin
              st_a[r_set][r_way] <= ST_O; ack = 1'b1;
            end
          end
          REQ_TWB2: begin
            if (nv_a[r_set][r_way] && nx_a[r_set][r_way] == r.src) begin
              nv_a[r_set][r_way] <= r.nxt_vld || lv_a[r_set][r_way];
              nx_a[r_set][r_way] <= r.nxt_vld ? r.nxt : lr_a[r_set][r_way];
              lv_a[r_set][r_way] <= 1'b0;
              ack = 1'b1;
            end else if (lv_a[r_set][r_way] && lr_a[r_set][r_way] == r.src) begin
              lv_a[r_set][r_way] <= r.nxt_vld; lr_a[r_set][r_way] <= r.nxt;
            end
          end
          default: ;
        endcase
      end

      // ---------------------------------------------- write-back buffer
      // it answers for the block until a write takes ownership away
      if (wb_v && wb_own && r_other && r.blk == wb_blk && r.kind == REQ_UPGRADE)
        wb_own <= 1'b0;
      if (wb_v && wb_own && r_other && r.blk == wb_blk &&
          r.kind inside {REQ_RD_MISS, REQ_WR_MISS}) begin
        snp = 1'b1; resp_v = 1'b1; resp_dst = r.src; resp_data = wb_data;
        ev[EV_WBHIT] = 1'b1;
        if (r.kind != REQ_RD_MISS) wb_own <= 1'b0;
      end

      // ---------------------------------------------- transfer write-back entry
      if (t_v) begin
        // Once its own transfer is broadcast the evicted block has left the
        // sharer chain (t_chain low); it is still the owner unless what it
        // broadcast was the hand-over of ownership itself (t_owner).
        if (r_other && r.blk == t_blk && !t_dead) begin
          case (r.kind)
            REQ_RD_MISS: begin
              if (t_owner) begin
                snp = 1'b1; resp_v = 1'b1; resp_dst = r.src; resp_data = t_data;
              end
              if (t_chain && !t_nv) begin
                t_nv <= 1'b1; t_nx <= r.src; t_lv <= 1'b0;
              end else if (t_chain && !t_lv) begin
                t_lv <= 1'b1; t_lr <= r.src;
              end
            end
            REQ_WR_MISS: begin
              if (t_owner) begin
                snp = 1'b1; resp_v = 1'b1; resp_dst = r.src; resp_data = t_data;
              end
              t_dead <= 1'b1;
            end
            REQ_UPGRADE: t_dead <= 1'b1;
            REQ_TWB1: if (r.nxt_vld && r.nxt == ME && t_st == ST_S && t_chain) begin
              // ownership reaches us while we are still in the chain
              t_st <= ST_O; ack = 1'b1;
            end
            REQ_TWB2: if (t_nv && t_nx == r.src && t_twb2_ok) begin
              t_nv <= r.nxt_vld || t_lv; t_nx <= r.nxt_vld ? r.nxt : t_lr;
              t_lv <= 1'b0; ack = 1'b1;
            end else if (t_chain && t_lv && t_lr == r.src) begin
              t_lv <= r.nxt_vld; t_lr <= r.nxt;
            end
            default: ;
          endcase
        end
        case (t_ph)
          P_ISS: begin
            if (apc_valid && apc_ready && !t_acc) begin
              t_acc  <= 1'b1;
              t_sent <= apc_req.kind;
              ev[(apc_req.kind == REQ_TWB1) ? EV_TWB1 : EV_TWB2] = 1'b1;
              sent_twb = 1'b1;
            end
            if (t_acc && apc_inserted) t_ph <= P_FLY;
            // an owner left without sharers writes the block back instead
            if (!t_acc && t_st == ST_O && !t_nv && !wb_v) begin
              t_v <= 1'b0;
              wb_v <= 1'b1; wb_own <= 1'b1; wb_send <= 1'b1; wb_blk <= t_blk;
              wb_data <= t_data; wb_cnt <= WB_W'(WB_HOLD); ev[EV_OWB] = 1'b1;
            end
          end
          P_FLY: if (r_own && r.kind inside {REQ_TWB1, REQ_TWB2}) begin
            t_ph <= P_WAIT; t_cnt <= SD_W'(SNOOP_DLY - 1);
            // a type 1 whose named sharer left the chain meanwhile hands
            // nothing over: we stay the owner and send again
            t_hand <= (r.kind == REQ_TWB1) && r.nxt_vld && t_nv && r.nxt == t_nx;
          end
          default: begin // P_WAIT
            if (t_cnt != 0) t_cnt <= t_cnt - 1'b1;
            else begin
              if (t_dead ||
                  (rx.snoop && t_sent == REQ_TWB1 && t_hand) ||
                  (rx.snoop && t_sent == REQ_TWB2 && t_st == ST_S)) begin
                t_v <= 1'b0;
              end else if (rx.snoop && t_sent == REQ_TWB2) begin
                // role changed while in flight (became owner): send again
                t_ph <= P_ISS; t_acc <= 1'b0;
              end else if (t_retry == RT_W'(MAX_RETRY)) begin
                if (t_st == ST_S) t_v <= 1'b0;
                else if (!wb_v) begin
                  t_v <= 1'b0;
                  wb_v <= 1'b1; wb_own <= 1'b1; wb_send <= 1'b1; wb_blk <= t_blk; wb_data <= t_data;
                  wb_cnt <= WB_W'(WB_HOLD); ev[EV_OWB] = 1'b1;
                end
              end else begin
                t_retry <= t_retry + 1'b1; t_ph <= P_ISS; t_acc <= 1'b0;
                ev[EV_RETRY] = 1'b1;
              end
            end
          end
        endcase
      end

      // ---------------------------------------------- miss status register
      if (m_tmr) begin
        if (m_cnt != 0) m_cnt <= m_cnt - 1'b1;
        else begin
          m_tmr <= 1'b0; own_snoop = 1'b1;
        end
      end
      if (own_snoop) begin
        case (ts)
          T_IE_DS: ts = rx.snoop ? T_IS_D : T_IE_D;
          T_IS_DS: ts = T_IS_D;
          T_IO_DS: ts = rx.snoop ? T_IS_D : T_IO_D;
          default: ;
        endcase
      end
      if (apc_valid && apc_ready && !sent_twb && !t_v) m_acc <= 1'b1;
      if (m_acc && apc_inserted && !t_v) begin
        case (ts)
          T_IE_ADS_ISS: ts = T_IE_ADS;
          T_IM_AD_ISS:  ts = T_IM_AD;
          T_SM_A_ISS:   ts = T_SM_A;
          default: ;
        endcase
      end
      m_hit = r_other && mshr_busy && (r.blk == m_blk);
      if (m_hit) begin
        unique case (r.kind)
          REQ_RD_MISS: begin
            case (ts)
              T_IE_ADS: begin ts = T_IS_ADS; ev[EV_IS_RACE] = 1'b1; end
              T_IE_DS:  begin ts = T_IO_DS;  ev[EV_IO] = 1'b1; end
              T_IE_D, T_IO_D: begin
                ts = T_IO_D; snp = 1'b1;
              end
              T_IM_D: if (!m_lost) snp = 1'b1;
              default: ;
            endcase
            if ((ts inside {T_IO_D, T_IM_D}) && snp && !m_lost) begin
              fq_dst[fq_n[FI_W-1:0]] <= r.src; fq_n <= fq_n + 1'b1; m_fwd_rd <= 1'b1;
              ev[EV_FWD] = 1'b1;
            end
            if ((ts inside {T_IS_DS, T_IO_DS, T_IE_D, T_IS_D, T_IO_D, T_IM_D}) &&
                !m_lost) begin
              if (!m_nv) begin
                m_nv <= 1'b1; m_nx <= r.src; m_lv <= 1'b0;
              end else if (!m_lv) begin
                m_lv <= 1'b1; m_lr <= r.src;
              end
            end
          end
          REQ_WR_MISS, REQ_UPGRADE: begin
            case (ts)
              T_IE_DS, T_IS_DS, T_IO_DS, T_IS_D: begin ts = T_II_D; ev[EV_II] = 1'b1; end
              T_IE_D, T_IO_D: begin
                if (r.kind == REQ_WR_MISS) begin
                  snp = 1'b1;
                  fq_dst[fq_n[FI_W-1:0]] <= r.src; fq_n <= fq_n + 1'b1; ev[EV_FWD] = 1'b1;
                end
                ts = T_II_D; ev[EV_II] = 1'b1;
              end
              T_IM_D: if (!m_lost && r.kind == REQ_WR_MISS) begin
                snp = 1'b1; m_lost <= 1'b1;
                fq_dst[fq_n[FI_W-1:0]] <= r.src; fq_n <= fq_n + 1'b1; ev[EV_FWD] = 1'b1;
              end
              T_SM_A, T_SM_A_ISS: ; // the array line reacts; have-copy checked below
              default: ;
            endcase
          end
          REQ_TWB1: if (r.nxt_vld && r.nxt == ME && (ts inside {T_IS_DS, T_IS_D})) begin
            // ownership handed to a sharer that is still loading: load as O
            ts = (ts == T_IS_DS) ? T_IO_DS : T_IO_D; ack = 1'b1;
          end
          REQ_TWB2: if (m_nv && m_nx == r.src) begin
            m_nv <= r.nxt_vld || m_lv; m_nx <= r.nxt_vld ? r.nxt : m_lr;
            m_lv <= 1'b0; ack = 1'b1;
          end else if (m_lv && m_lr == r.src) begin
            m_lv <= r.nxt_vld; m_lr <= r.nxt;
          end
          default: ;
        endcase
      end
      // own request becomes visible
      if (r_own && r.kind inside {REQ_RD_MISS, REQ_WR_MISS, REQ_UPGRADE}) begin
        case (ts)
          T_IE_ADS: begin ts = T_IE_DS; m_tmr <= 1'b1; m_cnt <= SD_W'(SNOOP_DLY - 1); end
          T_IS_ADS: begin ts = T_IS_DS; m_tmr <= 1'b1; m_cnt <= SD_W'(SNOOP_DLY - 1); end
          T_IM_AD:  ts = T_IM_D;
          T_SM_A: begin
            if (r_void) begin
              // void: nobody acted on it; ask again, with a copy or without
              ts = (st_a[blk_split(m_blk).set][m_way] inside {ST_S, ST_O} &&
                    tag_a[blk_split(m_blk).set][m_way] == blk_split(m_blk).tag) ? T_SM_A_ISS
                                                                 : T_IM_AD_ISS;
              m_acc <= 1'b0;
            end else if (st_a[blk_split(m_blk).set][m_way] inside {ST_S, ST_O} &&
                         tag_a[blk_split(m_blk).set][m_way] == blk_split(m_blk).tag) begin
              st_a[blk_split(m_blk).set][m_way]  <= ST_M;
              nv_a[blk_split(m_blk).set][m_way]  <= 1'b0;
              dat_a[blk_split(m_blk).set][m_way] <=
                put_word(dat_a[blk_split(m_blk).set][m_way], c_addr[OFF_W-1:2], c_wdata);
              ts = T_NONE; cpu_done <= 1'b1; c_st <= C_IDLE; ev[EV_UPGRADE] = 1'b1;
            end else begin
              // cannot happen: a write that took the copy would make it void
              ts = T_IM_AD_ISS; m_acc <= 1'b0;
            end
          end
          default: ;
        endcase
      end
      // data arrives from memory or from the owner
      if (dn_rx.valid && !dn_rx.to_mem && dn_rx.dst == ME && m_wait_data &&
          dn_rx.blk == m_blk) begin
        m_have <= 1'b1; m_data <= dn_rx.data;
      end
      // completion: fill the line (not in a cycle that also brings a request for it)
      if (c_st == C_MISS && m_have && !(r.valid && r.blk == m_blk) &&
          ((ts inside {T_IE_D, T_IS_D, T_IO_D, T_II_D}) || ts == T_IM_D)) begin
        ld = (ts == T_IM_D) ? put_word(m_data, c_addr[OFF_W-1:2], c_wdata) : m_data;
        case (ts)
          T_IE_D:  fin = ST_E;
          T_IS_D:  fin = ST_S;
          T_IO_D:  fin = ST_O;
          T_II_D:  fin = ST_I;
          default: fin = m_lost ? ST_I : (m_fwd_rd ? ST_O : ST_M);
        endcase
        if (fin != ST_I) begin
          tag_a[blk_split(m_blk).set][m_way] <= blk_split(m_blk).tag;
          st_a[blk_split(m_blk).set][m_way]  <= fin;
          nv_a[blk_split(m_blk).set][m_way]  <= (fin inside {ST_O, ST_S}) ? m_nv : 1'b0;
          nx_a[blk_split(m_blk).set][m_way]  <= m_nx;
          lv_a[blk_split(m_blk).set][m_way]  <= m_lv;
          lr_a[blk_split(m_blk).set][m_way]  <= m_lr;
          dat_a[blk_split(m_blk).set][m_way] <= ld;
        end
        m_data    <= ld;
        cpu_rdata <= m_data[c_addr[OFF_W-1:2]*32 +: 32];
        ts = T_NONE;
        if (fq_n != 0) c_st <= C_DRAIN;
        else begin c_st <= C_IDLE; cpu_done <= 1'b1; end
      end
      m_st <= ts;

      // ---------------------------------------------- processor side
      case (c_st)
        C_IDLE: if (cpu_valid) begin
          c_we <= cpu_we; c_addr <= cpu_addr; c_wdata <= cpu_wdata;
          c_cnt <= HC_W'(HIT_LAT - 1); c_st <= C_ACC;
        end
        C_ACC: begin
          if (c_cnt != 0) c_cnt <= c_cnt - 1'b1;
          else if (!r_on_cpu_blk && !r_on_vict && !(wb_v && wb_blk == c_blk) && !t_v) begin
            if (c_hit) begin
              for (int w = 0; w < WAYS; w++)
                if (age_a[c_set][w] < age_a[c_set][c_way])
                  age_a[c_set][w] <= age_a[c_set][w] + 1'b1;
              age_a[c_set][c_way] <= '0;
              if (!c_we) begin
                cpu_rdata <= dat_a[c_set][c_way][c_addr[OFF_W-1:2]*32 +: 32];
                cpu_done <= 1'b1; c_st <= C_IDLE;
              end else if (st_a[c_set][c_way] inside {ST_E, ST_M}) begin
                st_a[c_set][c_way]  <= ST_M;
                dat_a[c_set][c_way] <= put_word(dat_a[c_set][c_way], c_addr[OFF_W-1:2], c_wdata);
                cpu_done <= 1'b1; c_st <= C_IDLE;
              end else begin
                m_st <= T_SM_A_ISS; m_acc <= 1'b0; m_blk <= c_blk; m_way <= c_way;
                m_have <= 1'b0; m_lost <= 1'b0; m_fwd_rd <= 1'b0; m_nv <= 1'b0; m_lv <= 1'b0;
                fq_n <= '0; fq_h <= '0;
                c_st <= C_MISS;
              end
            end else begin
              // miss: make room first
              if (st_a[c_set][c_vict] == ST_S ||
                  (st_a[c_set][c_vict] == ST_O && nv_a[c_set][c_vict])) begin
                t_v <= 1'b1; t_acc <= 1'b0; t_dead <= 1'b0; t_ph <= P_ISS;
                t_st <= st_a[c_set][c_vict];
                t_blk <= {tag_a[c_set][c_vict], c_set};
                t_nv <= nv_a[c_set][c_vict]; t_nx <= nx_a[c_set][c_vict];
                t_lv <= lv_a[c_set][c_vict]; t_lr <= lr_a[c_set][c_vict];
                t_data <= dat_a[c_set][c_vict]; t_retry <= '0;
                st_a[c_set][c_vict] <= ST_I;
                c_st <= C_TWB;
              end else if (st_a[c_set][c_vict] inside {ST_M, ST_O}) begin
                if (!wb_v) begin
                  wb_v <= 1'b1; wb_own <= 1'b1; wb_send <= 1'b1; wb_cnt <= WB_W'(WB_HOLD);
                  wb_blk <= {tag_a[c_set][c_vict], c_set};
                  wb_data <= dat_a[c_set][c_vict];
                  st_a[c_set][c_vict] <= ST_I;
                  ev[EV_OWB] = 1'b1;
                end
              end else begin
                // victim is I or E (clean, sole copy): drop it and insert the miss
                st_a[c_set][c_vict] <= ST_I;
                for (int w = 0; w < WAYS; w++)
                  if (age_a[c_set][w] < age_a[c_set][c_vict])
                    age_a[c_set][w] <= age_a[c_set][w] + 1'b1;
                age_a[c_set][c_vict] <= '0;
                m_st  <= c_we ? T_IM_AD_ISS : T_IE_ADS_ISS;
                m_acc <= 1'b0; m_blk <= c_blk; m_way <= c_vict;
                m_have <= 1'b0; m_lost <= 1'b0; m_fwd_rd <= 1'b0; m_nv <= 1'b0; m_lv <= 1'b0;
                fq_n <= '0; fq_h <= '0;
                c_st <= C_MISS;
              end
            end
          end
        end
        C_TWB: if (!t_v) c_st <= C_ACC;
        C_DRAIN: if (fq_h == fq_n) begin
          c_st <= C_IDLE; cpu_done <= 1'b1; fq_n <= '0; fq_h <= '0;
        end
        default: ;
      endcase

      // ---------------------------------------------- write-back buffer timing
      if (wb_v && !wb_send) begin
        if (wb_cnt != 0) wb_cnt <= wb_cnt - 1'b1;
        else wb_v <= 1'b0;
      end

      // ---------------------------------------------- data sub-network output
      dn_tx <= '0;
      if (resp_v) begin
        dn_tx.valid <= 1'b1; dn_tx.dst <= resp_dst; dn_tx.blk <= r.blk;
        dn_tx.data  <= resp_data;
      end else if (wb_send) begin
        dn_tx.valid <= 1'b1; dn_tx.to_mem <= 1'b1; dn_tx.blk <= wb_blk;
        dn_tx.data  <= wb_data; wb_send <= 1'b0;
      end else if (c_st == C_DRAIN && fq_h != fq_n) begin
        dn_tx.valid <= 1'b1; dn_tx.dst <= fq_dst[fq_h[FI_W-1:0]];
        dn_tx.blk <= m_blk; dn_tx.data <= m_data; fq_h <= fq_h + 1'b1;
      end

      if (snp) ev[EV_SNOOP_HI] = 1'b1;
      if (ack) ev[EV_ACK] = 1'b1;
      snoop_out <= snp || ack;
      events    <= ev;
    end
  end

  assign cpu_ready = (c_st == C_IDLE);
  assign t_chain   = (t_ph != P_WAIT);
  assign t_owner   = (t_st == ST_O) && !(t_ph == P_WAIT && t_sent == REQ_TWB1 && t_hand);
  // a type 2 from the next sharer is taken while nothing of ours that names
  // it is committed to the network, or while our own message is a type 1
  // (whose hand-over is then void, see t_hand)
  assign t_twb2_ok = (t_ph == P_ISS && !t_acc) ||
                     (t_ph != P_WAIT && t_st == ST_O);

  // ------------------------------------------------------------ checks
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (fq_n <= FQ_W'(FWD_DEPTH)) else $error("cosym: forward queue overflow");
      assert (!(apc_inserted && !apc_valid && !m_acc && !t_acc))
        else $error("cosym: insertion without a request");
    end
  end
endmodule
