// cosym_cache_ctrl: L2 cache controller of one processor running the COSYM
// coherence protocol (MOESI modified for a single optical snoop answer).
//
// Main ideas, all from the protocol description:
//  * one owner per cached block answers every request with snoop high; an
//    E block read by another processor becomes O (not S), so a clean shared
//    block has an owner too. No owner means snoop low and memory answers;
//  * requests become visible a fixed time after insertion, so a miss goes
//    through transient states (IE-ads ... II-d) that note other requests
//    seen after insertion: a read seen before the own read makes the line
//    load in S; a read seen after it makes this cache the owner-to-be (O);
//    a write seen after it makes the line end invalid;
//  * every S/O line keeps its next sharer; the newest reader is appended to
//    the chain by the current tail. Evicting an O line with a next sharer
//    hands ownership on (transfer write-back type 1), evicting an S line
//    hands its next sharer to its predecessor (type 2), both acknowledged by
//    the receiver's snoop high and reissued otherwise. M lines and O lines
//    without sharers are written to memory (ordinary write-back); E lines
//    are dropped silently (this design's choice).
//
// Structure: tag/state/next-sharer/LRU arrays (SETS x WAYS), one miss
// status register (mshr_*; the controller is blocking, one miss at a time),
// one write-back buffer entry (wb_*), a hold-off register for a newly
// received ownership, and a queue of outgoing data-subnetwork messages.
//
// Interfaces and timing:
//  * processor: cpu_req_valid/cpu_req_we/cpu_req_addr (block address) are
//    taken when cpu_req_ready is high; cpu_resp_valid pulses when the access
//    has completed (one clock after a hit, or when a miss or upgrade ends).
//    A request is not taken in a clock in which a snooped request is
//    processed: the address-network side has priority for the tag array;
//  * address port controller: req_o is held until inserted_i; vis_i is the
//    request being snooped this clock and snoop_hi_o the answer (same
//    clock); own_snoop_* reports the snoop answer to the own request;
//  * data subnetwork: dout_o/dout_ready_i (blocks sent: to requesters as
//    owner, to memory as ordinary write-back), din_i (blocks received).
//    Block contents are not modelled.
// A new owner by transfer write-back starts answering 2L+1 clocks after the
// transfer became visible, the clock after the old owner has seen the
// acknowledgement (this hand-over timing is this design's choice).
module cosym_cache_ctrl
  import symnet_pkg::*;
#(
  parameter int unsigned MY_ID    = 0,
  parameter int unsigned NUM_PROC = 32,
  parameter int unsigned NUM_MEM  = 8,
  parameter int unsigned N_LEAVES = 64,
  parameter int unsigned SETS     = 512,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned QDEPTH   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              cpu_req_valid,
  input  logic              cpu_req_we,
  input  logic [BLK_AW-1:0] cpu_req_addr,
  output logic              cpu_req_ready,
  output logic              cpu_resp_valid,
  output logic              cpu_resp_hit,
  // address port controller side
  output addr_req_t         req_o,
  input  logic              inserted_i,
  input  addr_req_t         vis_i,
  output logic              snoop_hi_o,
  input  logic              own_snoop_valid_i,
  input  logic              own_snoop_hi_i,
  input  addr_req_t         own_snoop_req_i,
  // data subnetwork side
  output data_msg_t         dout_o,
  input  logic              dout_ready_i,
  input  data_msg_t         din_i,
  // event pulses for observation
  output logic [15:0]       events_o
);
  localparam int unsigned L    = $clog2(N_LEAVES);
  localparam int unsigned IW   = (SETS <= 1) ? 1 : $clog2(SETS);
  localparam int unsigned TW   = BLK_AW - IW;
  localparam int unsigned WW   = (WAYS <= 1) ? 1 : $clog2(WAYS);
  localparam int unsigned HOFF = 2 * L + 1;
  localparam int unsigned HW   = $clog2(HOFF + 1);
  localparam logic [NODE_W-1:0] ME = NODE_W'(MY_ID);

  // event bit positions
  localparam int unsigned EV_HIT = 0, EV_MISS = 1, EV_UPG = 2, EV_SNOOP_HI = 3,
                          EV_IS_RACE = 4, EV_IO = 5, EV_II = 6, EV_TWB1 = 7,
                          EV_TWB2 = 8, EV_ORD = 9, EV_REISSUE = 10, EV_ACCEPT = 11,
                          EV_FWD = 12, EV_STALL = 13, EV_DROP = 14, EV_E_SILENT = 15;

  function automatic logic [IW-1:0] set_of(input logic [BLK_AW-1:0] a);
    return a[IW-1:0];
  endfunction
  function automatic logic [TW-1:0] tag_of(input logic [BLK_AW-1:0] a);
    return a[BLK_AW-1:IW];
  endfunction
  function automatic logic [NODE_W-1:0] home_of(input logic [BLK_AW-1:0] a);
    return NODE_W'(NUM_PROC) + NODE_W'(a % BLK_AW'(NUM_MEM));
  endfunction

  // ---------------------------------------------------------------- arrays
  line_state_e [SETS-1:0][WAYS-1:0]              st_q;
  logic        [SETS-1:0][WAYS-1:0][TW-1:0]      tag_q;
  logic        [SETS-1:0][WAYS-1:0][NODE_W-1:0]  nxt_q;
  logic        [SETS-1:0][WAYS-1:0][WW-1:0]      age_q;

  // ------------------------------------------------------------ MSHR, WB
  typedef enum logic [1:0] {WB_WAIT, WB_FLIGHT, WB_ACKWAIT} wb_phase_e;

  mshr_state_e       m_st_q, m_st_d;
  logic [BLK_AW-1:0] m_addr_q;
  logic [WW-1:0]     m_way_q;
  req_kind_e         m_kind_q, m_kind_d;
  logic              m_ins_q, m_ins_d;
  logic              m_data_q, m_data_d;
  logic [NODE_W-1:0] m_next_q, m_next_d;
  logic [NUM_PROC-1:0] m_fwd_q, m_fwd_d;
  logic              m_drain_q, m_drain_d;

  logic              wb_v_q, wb_v_d;
  logic [BLK_AW-1:0] wb_addr_q, wb_addr_d;
  line_state_e       wb_st_q, wb_st_d;
  logic [NODE_W-1:0] wb_next_q, wb_next_d;
  wb_phase_e         wb_ph_q, wb_ph_d;
  logic              wb_dead_q, wb_dead_d;

  logic              ho_v_q, ho_v_d;
  logic [BLK_AW-1:0] ho_addr_q, ho_addr_d;
  logic [HW-1:0]     ho_cnt_q, ho_cnt_d;

  // ------------------------------------------------------- snoop lookup
  logic [IW-1:0]     s_set;
  logic              s_hit;
  logic [WW-1:0]     s_way;
  line_state_e       s_st;
  logic [NODE_W-1:0] s_nxt;
  logic              remote;

  assign s_set  = set_of(vis_i.addr);
  assign remote = vis_i.valid && vis_i.src != ME;

  always_comb begin
    s_hit = 1'b0;
    s_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (st_q[s_set][w] != ST_I && tag_q[s_set][w] == tag_of(vis_i.addr) && !s_hit) begin
        s_hit = 1'b1;
        s_way = WW'(w);
      end
    end
    s_st  = s_hit ? st_q[s_set][s_way] : ST_I;
    s_nxt = s_hit ? nxt_q[s_set][s_way] : NODE_NONE;
  end

  // -------------------------------------------------------- CPU lookup
  logic [IW-1:0]     c_set;
  logic              c_hit;
  logic [WW-1:0]     c_way;
  line_state_e       c_st;
  logic              c_inv_found;
  logic [WW-1:0]     c_inv_way, c_lru_way, c_vic_way;
  line_state_e       c_vic_st;
  logic [NODE_W-1:0] c_vic_nxt;
  logic              c_need_wb;
  logic              cpu_take;

  assign c_set = set_of(cpu_req_addr);

  always_comb begin
    c_hit       = 1'b0;
    c_way       = '0;
    c_inv_found = 1'b0;
    c_inv_way   = '0;
    c_lru_way   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (st_q[c_set][w] != ST_I && tag_q[c_set][w] == tag_of(cpu_req_addr) && !c_hit) begin
        c_hit = 1'b1;
        c_way = WW'(w);
      end
      if (st_q[c_set][w] == ST_I && !c_inv_found) begin
        c_inv_found = 1'b1;
        c_inv_way   = WW'(w);
      end
      if (age_q[c_set][w] == WW'(WAYS - 1)) c_lru_way = WW'(w);
    end
    c_st      = c_hit ? st_q[c_set][c_way] : ST_I;
    c_vic_way = c_inv_found ? c_inv_way : c_lru_way;
    c_vic_st  = st_q[c_set][c_vic_way];
    c_vic_nxt = nxt_q[c_set][c_vic_way];
    c_need_wb = (c_vic_st inside {ST_M, ST_O, ST_S});
  end

  // The processor side is served only when no miss is outstanding, no
  // snooped request uses the arrays this clock, and (for a miss that must
  // evict) the write-back buffer is free.
  logic base_ready;
  assign base_ready    = (m_st_q == TS_IDLE) && !m_drain_q && !vis_i.valid;
  assign cpu_req_ready = base_ready && (c_hit || !c_need_wb || !wb_v_q);
  assign cpu_take      = cpu_req_valid && cpu_req_ready;

  // ------------------------------------------------------ request to APC
  always_comb begin
    req_o = '0;
    if (wb_v_q && wb_ph_q == WB_WAIT && !(wb_st_q inside {ST_M} || (wb_st_q == ST_O && wb_next_q == NODE_NONE))) begin
      req_o.valid = 1'b1;
      req_o.kind  = (wb_st_q == ST_O) ? REQ_TWB1 : REQ_TWB2;
      req_o.addr  = wb_addr_q;
      req_o.src   = ME;
      req_o.arg   = wb_next_q;
    end else if (!m_ins_q && m_st_q inside {TS_IE_ADS_I, TS_IM_AD, TS_SOM_A}) begin
      req_o.valid = 1'b1;
      req_o.kind  = m_kind_q;
      req_o.addr  = m_addr_q;
      req_o.src   = ME;
      req_o.arg   = NODE_NONE;
    end
  end
  logic wb_is_ins, m_is_ins;
  assign wb_is_ins = inserted_i && req_o.kind inside {REQ_TWB1, REQ_TWB2};
  assign m_is_ins  = inserted_i && !(req_o.kind inside {REQ_TWB1, REQ_TWB2});

  // ------------------------------------------------- data output queue
  data_msg_t q_wdata, q_rdata;
  logic      q_push, q_full, q_empty;
  logic [$clog2(QDEPTH+1)-1:0] q_cnt;

  sync_fifo #(.W($bits(data_msg_t)), .DEPTH(QDEPTH)) u_outq (
    .clk, .rst_n,
    .push(q_push), .wdata(q_wdata),
    .pop(dout_ready_i), .rdata(q_rdata),
    .full(q_full), .empty(q_empty), .count(q_cnt)
  );
  always_comb begin
    dout_o       = q_rdata;
    dout_o.valid = !q_empty;
  end

  // ---------------------------------------------------- protocol engine
  // Snoop-port line write
  logic              sw_en;
  line_state_e       sw_st;
  logic [NODE_W-1:0] sw_nxt;
  // Install (miss completion) line write
  logic              iw_en;
  line_state_e       iw_st;
  logic [NODE_W-1:0] iw_nxt;
  logic              resp_miss;
  logic              snp_hi;
  logic [15:0]       ev;
  logic              snoop_push;
  logic [NODE_W-1:0] snoop_push_dst;
  logic              ho_block;
  logic              m_match, wb_match;
  logic [NUM_PROC-1:0] src_bit;

  assign ho_block = ho_v_q && ho_addr_q == vis_i.addr;
  assign m_match  = (m_st_q != TS_IDLE) && m_addr_q == vis_i.addr;
  assign wb_match = wb_v_q && wb_addr_q == vis_i.addr;

  always_comb begin
    src_bit = '0;
    for (int p = 0; p < NUM_PROC; p++) if (32'(vis_i.src) == p) src_bit[p] = 1'b1;
  end

  always_comb begin
    m_st_d   = m_st_q;   m_kind_d = m_kind_q; m_ins_d  = m_ins_q;
    m_data_d = m_data_q; m_next_d = m_next_q; m_fwd_d  = m_fwd_q;
    m_drain_d = m_drain_q;
    wb_v_d   = wb_v_q;   wb_addr_d = wb_addr_q; wb_st_d = wb_st_q;
    wb_next_d = wb_next_q; wb_ph_d = wb_ph_q;   wb_dead_d = wb_dead_q;
    ho_v_d   = ho_v_q;   ho_addr_d = ho_addr_q; ho_cnt_d = ho_cnt_q;
    sw_en = 1'b0; sw_st = s_st; sw_nxt = s_nxt;
    iw_en = 1'b0; iw_st = ST_I; iw_nxt = NODE_NONE;
    resp_miss = 1'b0;
    snp_hi = 1'b0;
    snoop_push = 1'b0; snoop_push_dst = vis_i.src;
    ev = '0;

    // hold-off countdown
    if (ho_v_q) begin
      if (ho_cnt_q == '0) ho_v_d = 1'b0;
      else                ho_cnt_d = ho_cnt_q - 1'b1;
    end

    // insertion of own requests
    if (m_is_ins) begin
      m_ins_d = 1'b1;
      if (m_st_q == TS_IE_ADS_I) m_st_d = TS_IE_ADS;
    end
    if (wb_is_ins) wb_ph_d = WB_FLIGHT;

    // ---------------- snoop answer to an own request (evaluated first, so
    // that a request snooped in the same clock sees its outcome)
    if (own_snoop_valid_i) begin
      if (own_snoop_req_i.kind == REQ_READ_MISS && m_st_q != TS_IDLE && m_addr_q == own_snoop_req_i.addr) begin
        unique case (m_st_d)
          TS_IE_DS: m_st_d = own_snoop_hi_i ? TS_IS_D : TS_IE_D;
          TS_IS_DS: m_st_d = TS_IS_D;
          TS_IO_DS: m_st_d = own_snoop_hi_i ? TS_IS_D : TS_IO_D;
          default: ;
        endcase
      end
      if (own_snoop_req_i.kind inside {REQ_TWB1, REQ_TWB2} && wb_v_q && wb_addr_q == own_snoop_req_i.addr
          && wb_ph_q == WB_ACKWAIT) begin
        if (own_snoop_hi_i || wb_dead_q) begin
          wb_v_d = 1'b0;
        end else begin
          wb_ph_d = WB_WAIT;               // not acknowledged: reissue
          ev[EV_REISSUE] = 1'b1;
        end
      end
    end

    // ---------------- a remote request is snooped
    if (remote) begin
      unique case (vis_i.kind)
        REQ_READ_MISS: begin
          // cache line
          if (s_hit) begin
            if (s_st inside {ST_E, ST_M, ST_O} && !ho_block) begin
              snp_hi = 1'b1; snoop_push = 1'b1;
            end
            sw_en = 1'b1;
            if (s_st inside {ST_E, ST_M}) sw_st = ST_O;
            if (s_st != ST_E && s_st != ST_M && s_nxt == NODE_NONE) sw_nxt = vis_i.src;
            if (s_st inside {ST_E, ST_M}) sw_nxt = vis_i.src;
          end
          // write-back buffer
          if (wb_match && !wb_dead_q) begin
            if (wb_st_q inside {ST_O, ST_M} && !ho_block) begin
              snp_hi = 1'b1; snoop_push = 1'b1;
            end
            if (wb_st_q == ST_M) wb_st_d = ST_O;
            if (wb_ph_q == WB_WAIT && wb_next_q == NODE_NONE) wb_next_d = vis_i.src;
          end
          // miss status register
          if (m_match) begin
            unique case (m_st_d)
              TS_IE_ADS: begin m_st_d = TS_IS_ADS; ev[EV_IS_RACE] = 1'b1; end
              TS_IE_DS:  begin m_st_d = TS_IO_DS; ev[EV_IO] = 1'b1; end
              TS_IE_D, TS_IM_D, TS_IO_D: begin
                if (m_st_d != TS_IO_D) ev[EV_IO] = 1'b1;
                m_st_d = TS_IO_D;
                snp_hi = 1'b1;
                m_fwd_d = m_fwd_q | src_bit;
              end
              default: ;
            endcase
            if (m_st_d inside {TS_IE_DS, TS_IS_DS, TS_IO_DS, TS_IE_D, TS_IS_D,
                               TS_IO_D, TS_IM_D} && m_next_q == NODE_NONE)
              m_next_d = vis_i.src;
          end
        end
        REQ_WRITE_MISS, REQ_UPGRADE: begin
          if (s_hit) begin
            if (s_st inside {ST_E, ST_M, ST_O} && !ho_block) begin
              snp_hi = 1'b1; snoop_push = 1'b1;
            end
            sw_en = 1'b1; sw_st = ST_I; sw_nxt = NODE_NONE;
          end
          if (wb_match && !wb_dead_q) begin
            if (wb_st_q inside {ST_O, ST_M} && !ho_block) begin
              snp_hi = 1'b1; snoop_push = 1'b1;
            end
            if (wb_ph_q == WB_WAIT) wb_v_d = 1'b0;      // nothing left to write back
            else                    wb_dead_d = 1'b1;   // wait for the answer, then drop
          end
          if (m_match) begin
            unique case (m_st_d)
              TS_SOM_A: begin
                m_st_d = TS_IM_AD;
                if (!m_ins_q) m_kind_d = REQ_WRITE_MISS;
              end
              TS_IE_DS, TS_IS_DS, TS_IO_DS, TS_IS_D: begin
                m_st_d = TS_II_D; ev[EV_II] = 1'b1;
              end
              TS_IE_D, TS_IM_D, TS_IO_D: begin
                m_st_d = TS_II_D; ev[EV_II] = 1'b1;
                snp_hi = 1'b1;
                m_fwd_d = m_fwd_q | src_bit;
              end
              default: ;
            endcase
          end
        end
        REQ_TWB1: begin
          if (vis_i.arg == ME && !ho_v_q) begin
            if (s_hit && s_st == ST_S) begin
              snp_hi = 1'b1; ev[EV_ACCEPT] = 1'b1;
              sw_en = 1'b1; sw_st = ST_O;
              ho_v_d = 1'b1; ho_addr_d = vis_i.addr; ho_cnt_d = HW'(HOFF - 1);
            end else if (wb_match && !wb_dead_q && wb_ph_q == WB_WAIT && wb_st_q == ST_S) begin
              snp_hi = 1'b1; ev[EV_ACCEPT] = 1'b1;
              wb_st_d = ST_O;
              ho_v_d = 1'b1; ho_addr_d = vis_i.addr; ho_cnt_d = HW'(HOFF - 1);
            end
          end
        end
        REQ_TWB2: begin
          if (s_hit && s_st inside {ST_S, ST_O} && s_nxt == vis_i.src) begin
            snp_hi = 1'b1;
            sw_en = 1'b1; sw_nxt = vis_i.arg;
          end else if (wb_match && !wb_dead_q && wb_next_q == vis_i.src &&
                       (wb_ph_q == WB_WAIT || wb_st_q == ST_O)) begin
            // an evicting owner keeps the chain even while its own type-1
            // request is in flight; a reissue then names the new sharer
            snp_hi = 1'b1;
            wb_next_d = vis_i.arg;
          end else if (m_match && m_next_q == vis_i.src &&
                       m_st_d inside {TS_IE_DS, TS_IS_DS, TS_IO_DS, TS_IE_D, TS_IS_D, TS_IO_D, TS_IM_D}) begin
            snp_hi = 1'b1;
            m_next_d = vis_i.arg;
          end
        end
        default: ;
      endcase
    end

    // ---------------- the own request becomes visible
    if (vis_i.valid && vis_i.src == ME) begin
      if (vis_i.kind inside {REQ_TWB1, REQ_TWB2}) begin
        if (wb_v_q && wb_addr_q == vis_i.addr && wb_ph_q == WB_FLIGHT) wb_ph_d = WB_ACKWAIT;
      end else if (m_match) begin
        unique case (m_st_q)
          TS_IE_ADS: m_st_d = TS_IE_DS;
          TS_IS_ADS: m_st_d = TS_IS_DS;
          TS_IM_AD:  m_st_d = TS_IM_D;
          TS_SOM_A: begin
            // upgrade serialized: the valid S/O copy becomes M
            if (s_hit) begin
              sw_en = 1'b1; sw_st = ST_M; sw_nxt = NODE_NONE;
            end
            m_st_d = TS_IDLE;
            resp_miss = 1'b1;
          end
          default: ;
        endcase
      end
    end

    // ---------------- data arrives from the data subnetwork
    if (din_i.valid && din_i.dst == ME) begin
      if (m_st_q != TS_IDLE && din_i.addr == m_addr_q && m_st_q != TS_SOM_A) m_data_d = 1'b1;
      else ev[EV_DROP] = 1'b1;
    end

    // ---------------- miss completion
    if (m_data_d && m_st_d inside {TS_IE_D, TS_IS_D, TS_IO_D, TS_IM_D, TS_II_D}) begin
      iw_en = 1'b1;
      unique case (m_st_d)
        TS_IE_D: begin iw_st = ST_E; iw_nxt = NODE_NONE; end
        TS_IS_D: begin iw_st = ST_S; iw_nxt = m_next_d; end
        TS_IO_D: begin iw_st = ST_O; iw_nxt = m_next_d; end
        TS_IM_D: begin iw_st = ST_M; iw_nxt = NODE_NONE; end
        default: begin iw_st = ST_I; iw_nxt = NODE_NONE; end
      endcase
      m_st_d    = TS_IDLE;
      m_data_d  = 1'b0;
      m_drain_d = (m_fwd_d != '0);
      resp_miss = 1'b1;
    end

    // ---------------- write-back buffer: ordinary write-back to memory
    q_push  = 1'b0;
    q_wdata = '0;
    if (snoop_push) begin
      q_push        = 1'b1;
      q_wdata.valid = 1'b1;
      q_wdata.addr  = vis_i.addr;
      q_wdata.dst   = snoop_push_dst;
      q_wdata.src   = ME;
      ev[EV_FWD]    = 1'b1;
    end else if (wb_v_d && wb_ph_d == WB_WAIT && !wb_dead_d &&
                 (wb_st_d == ST_M || (wb_st_d == ST_O && wb_next_d == NODE_NONE)) && !q_full) begin
      q_push        = 1'b1;
      q_wdata.valid = 1'b1;
      q_wdata.addr  = wb_addr_d;
      q_wdata.dst   = home_of(wb_addr_d);
      q_wdata.src   = ME;
      wb_v_d        = 1'b0;
      ev[EV_ORD]    = 1'b1;
    end else if (m_drain_q && !q_full) begin
      // forward the received block to the processors that were promised it
      for (int p = NUM_PROC - 1; p >= 0; p--) begin
        if (m_fwd_q[p]) begin
          q_wdata.valid = 1'b1;
          q_wdata.addr  = m_addr_q;
          q_wdata.dst   = NODE_W'(p);
          q_wdata.src   = ME;
        end
      end
      q_push = 1'b1;
      for (int p = 0; p < NUM_PROC; p++) begin
        if (32'(q_wdata.dst) == p) m_fwd_d[p] = 1'b0;
      end
      if (m_fwd_d == '0) m_drain_d = 1'b0;
      ev[EV_FWD] = 1'b1;
    end

    if (snp_hi) ev[EV_SNOOP_HI] = 1'b1;
  end

  assign snoop_hi_o = snp_hi;

  // --------------------------------------------------- sequential part
  logic              hit_q, resp_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) begin
          st_q[s][w]  <= ST_I;
          tag_q[s][w] <= '0;
          nxt_q[s][w] <= NODE_NONE;
          age_q[s][w] <= WW'(w);
        end
      end
      m_st_q <= TS_IDLE; m_addr_q <= '0; m_way_q <= '0; m_kind_q <= REQ_READ_MISS;
      m_ins_q <= 1'b0; m_data_q <= 1'b0; m_next_q <= NODE_NONE; m_fwd_q <= '0;
      m_drain_q <= 1'b0;
      wb_v_q <= 1'b0; wb_addr_q <= '0; wb_st_q <= ST_I; wb_next_q <= NODE_NONE;
      wb_ph_q <= WB_WAIT; wb_dead_q <= 1'b0;
      ho_v_q <= 1'b0; ho_addr_q <= '0; ho_cnt_q <= '0;
      hit_q <= 1'b0; resp_q <= 1'b0;
      events_o <= '0;
    end else begin
      m_st_q <= m_st_d; m_kind_q <= m_kind_d; m_ins_q <= m_ins_d; m_data_q <= m_data_d;
      m_next_q <= m_next_d; m_fwd_q <= m_fwd_d; m_drain_q <= m_drain_d;
      wb_v_q <= wb_v_d; wb_addr_q <= wb_addr_d; wb_st_q <= wb_st_d; wb_next_q <= wb_next_d;
      wb_ph_q <= wb_ph_d; wb_dead_q <= wb_dead_d;
      ho_v_q <= ho_v_d; ho_addr_q <= ho_addr_d; ho_cnt_q <= ho_cnt_d;

      if (sw_en) begin
        st_q[s_set][s_way]  <= sw_st;
        nxt_q[s_set][s_way] <= sw_nxt;
      end
      if (iw_en) begin
        st_q[set_of(m_addr_q)][m_way_q]  <= iw_st;
        tag_q[set_of(m_addr_q)][m_way_q] <= tag_of(m_addr_q);
        nxt_q[set_of(m_addr_q)][m_way_q] <= iw_nxt;
      end

      resp_q <= resp_miss;
      hit_q  <= 1'b0;
      events_o <= ev;

      // processor side
      if (cpu_req_valid && m_st_q == TS_IDLE && !m_drain_q && vis_i.valid) events_o[EV_STALL] <= 1'b1;
      if (cpu_take) begin
        // LRU: the touched way becomes youngest
        for (int w = 0; w < WAYS; w++) begin
          if (age_q[c_set][w] < age_q[c_set][c_hit ? c_way : c_vic_way])
            age_q[c_set][w] <= age_q[c_set][w] + 1'b1;
        end
        age_q[c_set][c_hit ? c_way : c_vic_way] <= '0;

        if (c_hit && (!cpu_req_we || c_st inside {ST_E, ST_M})) begin
          // read hit in any valid state, write hit in M, silent E->M
          if (cpu_req_we) st_q[c_set][c_way] <= ST_M;
          resp_q <= 1'b1;
          hit_q  <= 1'b1;
          events_o[EV_HIT] <= 1'b1;
        end else if (c_hit) begin
          // write to an S or O copy: invalidation request (S/O,M-a)
          m_st_q   <= TS_SOM_A;
          m_addr_q <= cpu_req_addr;
          m_way_q  <= c_way;
          m_kind_q <= REQ_UPGRADE;
          m_ins_q  <= 1'b0;
          m_data_q <= 1'b0;
          m_next_q <= NODE_NONE;
          m_fwd_q  <= '0;
          events_o[EV_UPG] <= 1'b1;
        end else begin
          // miss: evict the victim, reserve its way
          m_st_q   <= cpu_req_we ? TS_IM_AD : TS_IE_ADS_I;
          m_addr_q <= cpu_req_addr;
          m_way_q  <= c_vic_way;
          m_kind_q <= cpu_req_we ? REQ_WRITE_MISS : REQ_READ_MISS;
          m_ins_q  <= 1'b0;
          m_data_q <= 1'b0;
          m_next_q <= NODE_NONE;
          m_fwd_q  <= '0;
          events_o[EV_MISS] <= 1'b1;
          st_q[c_set][c_vic_way]  <= ST_I;
          nxt_q[c_set][c_vic_way] <= NODE_NONE;
          if (c_need_wb) begin
            wb_v_q    <= 1'b1;
            wb_addr_q <= {tag_q[c_set][c_vic_way], c_set};
            wb_st_q   <= c_vic_st;
            wb_next_q <= c_vic_nxt;
            wb_ph_q   <= WB_WAIT;
            wb_dead_q <= 1'b0;
            if (c_vic_st == ST_S)                                 events_o[EV_TWB2] <= 1'b1;
            else if (c_vic_st == ST_O && c_vic_nxt != NODE_NONE)  events_o[EV_TWB1] <= 1'b1;
          end else if (c_vic_st == ST_E) begin
            events_o[EV_E_SILENT] <= 1'b1;
          end
        end
      end
    end
  end

  assign cpu_resp_valid = resp_q;
  assign cpu_resp_hit   = hit_q;

  a_outq_room: assert property (@(posedge clk) disable iff (!rst_n) snoop_push |-> !q_full);
endmodule
