// tb_symnet_top: end-to-end run of a small SYMNET system: 4 processors and
// one memory module (8-leaf network, L = 3), 4-set 2-way caches so that
// evictions are frequent, and a data subnetwork with the document's 52
// clock block transfer. Random reads and writes over 10 blocks are issued
// by all processors. Checked:
//  * an isolated read miss takes exactly token wait + 2L + 3 + 52 clocks
//    from the broadcast of its request... measured from the clock the
//    request reaches the nodes to the completion;
//  * coherence invariants every clock: at most one owner (E, M or O) per
//    block among the cache arrays; an E or M copy is the only valid copy;
//  * no collision on the address tree or the snoop line;
//  * every access completes (watchdog);
//  * each protocol mechanism happened at least once (hits, misses,
//    upgrades, snoop-high answers, the IS-ads and IO races, II-d, transfer
//    write-backs of both types, ordinary write-backs, reissue, ownership
//    acceptance, forwarded data, processor stalls for snoop priority,
//    memory responses).
module tb_symnet_top;
  import symnet_pkg::*;
  localparam int unsigned NP = 4, NM = 1, NN = NP + NM, L = 3, DLAT = 52;
  localparam int unsigned NBLK = 10, OPS = 400;
  logic clk = 1'b0, rst_n = 1'b0;

  logic [NP-1:0] cpu_v, cpu_we, cpu_ready, resp_v, resp_hit;
  logic [NP-1:0][BLK_AW-1:0] cpu_addr;
  data_msg_t [NN-1:0] dout, din;
  logic [NN-1:0] dready;
  logic [NP-1:0][15:0] ev;
  logic [NP-1:0] token;
  addr_req_t bcast;
  logic snoop_line, coll;
  logic [NM-1:0][31:0] served, wbs;
  logic [NM-1:0] movf;
  int checks = 0, failures = 0;

  symnet_top #(.NUM_PROC(NP), .NUM_MEM(NM), .SETS(4), .WAYS(2), .QDEPTH(8)) dut (
    .clk, .rst_n,
    .cpu_req_valid(cpu_v), .cpu_req_we(cpu_we), .cpu_req_addr(cpu_addr),
    .cpu_req_ready(cpu_ready), .cpu_resp_valid(resp_v), .cpu_resp_hit(resp_hit),
    .dout, .dout_ready(dready), .din,
    .cc_events(ev), .token, .bcast, .snoop_line, .collision(coll),
    .mem_served(served), .mem_writebacks(wbs), .mem_overflow(movf)
  );

  data_subnet_model #(.NUM_NODES(NN), .LAT(DLAT)) u_dnet (
    .clk, .rst_n, .dout, .dout_ready(dready), .din
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("p0 m=%0d wb=%0d ph=%0d st=%0d done=%0d ready=%0d v=%0d", dut.g_proc[0].u_cc.m_st_q, dut.g_proc[0].u_cc.wb_v_q, dut.g_proc[0].u_cc.wb_ph_q, dut.g_proc[0].u_cc.wb_st_q, done_ops[0], cpu_ready[0], cpu_v[0]);
    $display("p1 m=%0d wb=%0d ph=%0d st=%0d done=%0d ready=%0d v=%0d", dut.g_proc[1].u_cc.m_st_q, dut.g_proc[1].u_cc.wb_v_q, dut.g_proc[1].u_cc.wb_ph_q, dut.g_proc[1].u_cc.wb_st_q, done_ops[1], cpu_ready[1], cpu_v[1]);
    $display("p2 m=%0d wb=%0d ph=%0d st=%0d done=%0d ready=%0d v=%0d", dut.g_proc[2].u_cc.m_st_q, dut.g_proc[2].u_cc.wb_v_q, dut.g_proc[2].u_cc.wb_ph_q, dut.g_proc[2].u_cc.wb_st_q, done_ops[2], cpu_ready[2], cpu_v[2]);
    $display("p3 m=%0d wb=%0d ph=%0d st=%0d done=%0d ready=%0d v=%0d", dut.g_proc[3].u_cc.m_st_q, dut.g_proc[3].u_cc.wb_v_q, dut.g_proc[3].u_cc.wb_ph_q, dut.g_proc[3].u_cc.wb_st_q, done_ops[3], cpu_ready[3], cpu_v[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- mechanism counts
  int evc [16];
  int mem_resp = 0;
  string evn [16] = '{"hit", "miss", "upgrade", "snoop_high", "IS-ads race", "IO owner-to-be",
                      "II-d", "TWB1 issued", "TWB2 issued", "ordinary write-back", "reissue",
                      "ownership accepted", "data supplied by cache", "stall for snoop priority",
                      "unrequested data dropped", "E dropped silently"};
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++)
      for (int e = 0; e < 16; e++) if (ev[p][e]) evc[e]++;
  end

  // optional trace of the global request order (+trace)
  always @(negedge clk) if (rst_n && $test$plusargs("trace")) begin
    if (bcast.valid)
      $display("%0t bcast kind=%0d addr=%0d src=%0d arg=%0d", $time, bcast.kind, bcast.addr, bcast.src, bcast.arg);
    for (int p = 0; p < NP; p++) if (dut.s_tx[p]) $display("%0t   snoop hi from %0d", $time, p);
    for (int p = 0; p < NN; p++) if (din[p].valid) $display("%0t   data to %0d addr=%0d from %0d", $time, p, din[p].addr, din[p].src);
  end

  // ---------------------------------------------------- invariants
  int inv_checks = 0;
  always @(negedge clk) if (rst_n) begin
    for (int b = 0; b < NBLK; b++) begin
      int owners, excl, valid;
      owners = 0; excl = 0; valid = 0;
      for (int p = 0; p < NP; p++) begin
        line_state_e s;
        s = ST_I;
        unique case (p)
          0: s = st_of0(BLK_AW'(b));
          1: s = st_of1(BLK_AW'(b));
          2: s = st_of2(BLK_AW'(b));
          default: s = st_of3(BLK_AW'(b));
        endcase
        if (s inside {ST_E, ST_M, ST_O}) owners++;
        if (s inside {ST_E, ST_M}) excl++;
        if (s != ST_I) valid++;
      end
      checks++;
      if (owners > 1 || (excl > 0 && valid > 1)) begin
        failures++;
        $display("t=%0t block %0d: owners %0d exclusive %0d valid %0d", $time, b, owners, excl, valid);
      end
    end
    checks++;
    if (coll || movf != '0) begin failures++; $display("collision or overflow"); end
  end

  // state of block a in cache p (looked up in the tag arrays)
  `define ST_OF(P) \
  function automatic line_state_e st_of``P(input logic [BLK_AW-1:0] a); \
    for (int w = 0; w < 2; w++) \
      if (dut.g_proc[P].u_cc.st_q[a[1:0]][w] != ST_I && \
          dut.g_proc[P].u_cc.tag_q[a[1:0]][w] == a[BLK_AW-1:2]) \
        return dut.g_proc[P].u_cc.st_q[a[1:0]][w]; \
    return ST_I; \
  endfunction
  `ST_OF(0)
  `ST_OF(1)
  `ST_OF(2)
  `ST_OF(3)

  // ---------------------------------------------------- stimulus
  int done_ops [NP];
  int lat_first = -1;

  task automatic access(input int p, input logic we, input logic [BLK_AW-1:0] a);
    @(negedge clk);
    cpu_v[p] = 1'b1; cpu_we[p] = we; cpu_addr[p] = a;
    @(posedge clk);
    while (!cpu_ready[p]) @(posedge clk);
    #1 cpu_v[p] = 1'b0;
    while (!resp_v[p]) @(posedge clk);
    done_ops[p]++;
  endtask

  initial begin
    int t0;
    cpu_v = '0; cpu_we = '0; cpu_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // isolated read miss: from the clock the request reaches all nodes
    // to completion: 2L (snoop answer) + 1 (memory queue) + 52 (data) + 2
    fork
      access(0, 1'b0, 27'd3);
      begin
        @(posedge clk);
        while (!bcast.valid) @(posedge clk);
        t0 = $time;
        while (!resp_v[0]) @(posedge clk);
        lat_first = ($time - t0) / 10;
      end
    join
    checks++;
    if (lat_first != 2 * L + 3 + DLAT) begin
      failures++;
      $display("isolated miss latency %0d, expected %0d", lat_first, 2 * L + 3 + DLAT);
    end

    // second reader of the same block: the E holder answers and becomes
    // the owner (O); memory must not supply a second time
    access(1, 1'b0, 27'd3);
    checks++;
    if (served[0] != 1 || st_of0(27'd3) != ST_O || st_of1(27'd3) != ST_S) begin
      failures++;
      $display("second read: memory supplied %0d, states %s %s", served[0],
               st_of0(27'd3).name(), st_of1(27'd3).name());
    end

    // random traffic from all processors
    for (int p = 0; p < NP; p++) begin
      automatic int pp = p;
      fork
        for (int k = 0; k < OPS; k++) begin
          logic we;
          logic [BLK_AW-1:0] a;
          we = ($urandom_range(99) < 35);
          a  = BLK_AW'($urandom_range(NBLK - 1));
          access(pp, we, a);
        end
      join_none
    end
    wait fork;
    // private phase: each processor reads its own blocks, so clean E
    // copies are evicted
    for (int p = 0; p < NP; p++) begin
      automatic int pp = p;
      fork
        for (int k = 0; k < 16; k++) access(pp, 1'b0, BLK_AW'(64 + pp * 16 + k));
      join_none
    end
    wait fork;
    repeat (200) @(posedge clk);

    for (int p = 0; p < NP; p++) begin
      checks++;
      if (done_ops[p] != OPS + 16 + (p <= 1 ? 1 : 0)) begin failures++; $display("proc %0d did %0d", p, done_ops[p]); end
    end
    mem_resp = int'(served[0]);
    for (int e = 0; e < 16; e++) begin
      $display("mechanism %-28s %0d", evn[e], evc[e]);
      checks++;
      if (evc[e] == 0) begin failures++; $display("  never happened"); end
    end
    $display("mechanism %-28s %0d", "memory supplied data", mem_resp);
    $display("mechanism %-28s %0d", "ordinary write-backs received", wbs[0]);
    checks++;
    if (mem_resp == 0 || wbs[0] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
