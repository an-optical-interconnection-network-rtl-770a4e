// tb_cosym_cache_ctrl: one COSYM controller (processor 1 of 4, one memory
// module = node 4, 8-leaf network so L = 3) with a 4-set, 2-way cache. The
// testbench plays the address port controller and the rest of the system:
// it inserts the controller's requests, presents them and other
// processors' requests as visible, delivers snoop answers and data, and
// checks the snoop answers, data messages and completions that the
// protocol prescribes:
//   A  read miss, snoop low -> E; a later reader gets snoop high and data,
//      the line becomes O; a type-2 write-back from the next sharer is
//      acknowledged, one from a non-neighbour is not
//   B  write hit on E (silent, one clock); a remote write invalidates
//   C  read race: another read seen nb the own one -> loads S
//   D  owner-to-be: a read seen after the own one -> IO-ds, no answer;
//      after snoop low a further read is answered and served after the data
//   E  evictions: O with next sharer -> transfer write-back type 1,
//      S -> type 2, M -> ordinary write-back to memory; unacknowledged
//      transfer -> reissue
//   G  upgrade of an S copy
//   H  ownership received by type 1: no answers for 2L+1 clocks, then owner
module tb_cosym_cache_ctrl;
  import symnet_pkg::*;
  localparam int unsigned ME = 1, NPROC = 4, NL = 8, L = 3, MEMID = 4;
  logic clk = 1'b0, rst_n = 1'b0;

  logic cpu_v, cpu_we, cpu_ready, resp_v, resp_hit;
  logic [BLK_AW-1:0] cpu_addr;
  addr_req_t req, vis, own_req;
  logic ins, snp_hi, own_v, own_hi;
  data_msg_t dout, din;
  logic [15:0] ev;
  int checks = 0, failures = 0;

  cosym_cache_ctrl #(.MY_ID(ME), .NUM_PROC(NPROC), .NUM_MEM(1), .N_LEAVES(NL),
                     .SETS(4), .WAYS(2), .QDEPTH(4)) dut (
    .clk, .rst_n,
    .cpu_req_valid(cpu_v), .cpu_req_we(cpu_we), .cpu_req_addr(cpu_addr),
    .cpu_req_ready(cpu_ready), .cpu_resp_valid(resp_v), .cpu_resp_hit(resp_hit),
    .req_o(req), .inserted_i(ins), .vis_i(vis), .snoop_hi_o(snp_hi),
    .own_snoop_valid_i(own_v), .own_snoop_hi_i(own_hi), .own_snoop_req_i(own_req),
    .dout_o(dout), .dout_ready_i(1'b1), .din_i(din), .events_o(ev)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // data messages leaving the controller are logged
  data_msg_t sent [$];
  always @(posedge clk) if (rst_n && dout.valid) sent.push_back(dout);
  int resp_cnt = 0;
  logic last_hit;
  always @(posedge clk) if (rst_n && resp_v) begin resp_cnt++; last_hit = resp_hit; end

  task automatic idle_inputs();
    ins = 1'b0; vis = '0; own_v = 1'b0; own_hi = 1'b0; own_req = '0; din = '0;
  endtask

  // processor access: waits for acceptance
  task automatic cpu(input logic we, input logic [BLK_AW-1:0] a);
    @(negedge clk);
    cpu_v = 1'b1; cpu_we = we; cpu_addr = a;
    #1;
    while (!cpu_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    cpu_v = 1'b0;
  endtask

  // insert the pending request (token granted at once); returns it
  task automatic insert(output addr_req_t r);
    @(negedge clk);
    while (!req.valid) @(negedge clk);
    r = req;
    ins = 1'b1;
    @(posedge clk); #1;
    ins = 1'b0;
  endtask

  // present a request as visible for one clock; returns the snoop answer
  task automatic show(input addr_req_t r, output logic hi);
    @(negedge clk);
    vis = r;
    #1 hi = snp_hi;
    @(posedge clk); #1;
    vis = '0;
  endtask

  task automatic remote(input req_kind_e k, input logic [BLK_AW-1:0] a,
                        input int src, input int arg, output logic hi);
    addr_req_t r;
    r = '0; r.valid = 1'b1; r.kind = k; r.addr = a; r.src = NODE_W'(src); r.arg = NODE_W'(arg);
    show(r, hi);
  endtask

  task automatic own_snoop(input addr_req_t r, input logic hi);
    @(negedge clk);
    own_v = 1'b1; own_hi = hi; own_req = r;
    @(posedge clk); #1;
    own_v = 1'b0;
  endtask

  task automatic data(input logic [BLK_AW-1:0] a, input int from);
    @(negedge clk);
    din = '0; din.valid = 1'b1; din.addr = a; din.dst = NODE_W'(ME); din.src = NODE_W'(from);
    @(posedge clk); #1;
    din = '0;
  endtask

  // a complete read or write miss with the given own snoop answer
  task automatic miss(input logic we, input logic [BLK_AW-1:0] a, input logic hi);
    addr_req_t r; logic h; int nb;
    nb = resp_cnt;
    cpu(we, a);
    insert(r);
    check(r.kind == (we ? REQ_WRITE_MISS : REQ_READ_MISS) && r.addr == a && r.src == NODE_W'(ME),
          "miss request word");
    show(r, h);
    check(!h, "no answer to own request");
    own_snoop(r, hi);
    data(a, MEMID);
    repeat (2) @(posedge clk);
    check(resp_cnt == nb + 1 && !last_hit, "miss completes after data");
  endtask

  function automatic int sent_to(input int dst, input logic [BLK_AW-1:0] a);
    int n = 0;
    foreach (sent[i]) if (sent[i].dst == NODE_W'(dst) && sent[i].addr == a) n++;
    return n;
  endfunction

  initial begin
    logic h;
    addr_req_t r, r2;
    int nb;
    cpu_v = 1'b0; cpu_we = 1'b0; cpu_addr = '0;
    idle_inputs();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- A: read miss alone -> E; remote reads
    miss(1'b0, 27'h10, 1'b0);
    remote(REQ_READ_MISS, 27'h10, 2, NODE_NONE, h);
    check(h, "A: E owner answers a read");
    repeat (3) @(posedge clk);
    check(sent_to(2, 27'h10) == 1, "A: data sent to reader 2");
    remote(REQ_READ_MISS, 27'h10, 3, NODE_NONE, h);
    check(h, "A: O owner answers the next read");
    remote(REQ_TWB2, 27'h10, 3, NODE_NONE, h);
    check(!h, "A: type-2 from a non-neighbour not acknowledged");
    remote(REQ_TWB2, 27'h10, 2, 3, h);
    check(h, "A: type-2 from next sharer acknowledged");
    remote(REQ_TWB2, 27'h10, 3, NODE_NONE, h);
    check(h, "A: next sharer is now 3");

    // ---- B: write hit on E, then remote write invalidates
    miss(1'b0, 27'h21, 1'b0);
    nb = resp_cnt;
    cpu(1'b1, 27'h21);
    @(posedge clk); #1;
    check(resp_cnt == nb + 1 && last_hit && !req.valid, "B: write hit on E is silent");
    remote(REQ_WRITE_MISS, 27'h21, 3, NODE_NONE, h);
    check(h, "B: M owner answers a write");
    remote(REQ_READ_MISS, 27'h21, 2, NODE_NONE, h);
    check(!h, "B: invalidated line no longer answers");

    // ---- C: read race -> S
    nb = resp_cnt;
    cpu(1'b0, 27'h32);
    insert(r);
    remote(REQ_READ_MISS, 27'h32, 2, NODE_NONE, h);
    check(!h, "C: pending reader does not answer");
    show(r, h);
    own_snoop(r, 1'b0);
    data(27'h32, MEMID);
    repeat (2) @(posedge clk);
    check(resp_cnt == nb + 1, "C: completes");
    remote(REQ_READ_MISS, 27'h32, 3, NODE_NONE, h);
    check(!h, "C: line loaded in S, not owner");
    remote(REQ_TWB2, 27'h32, 3, NODE_NONE, h);
    check(h, "C: S tail took reader 3 as next sharer");

    // ---- D: owner-to-be
    nb = resp_cnt;
    sent.delete();
    cpu(1'b0, 27'h43);
    insert(r);
    show(r, h);
    remote(REQ_READ_MISS, 27'h43, 2, NODE_NONE, h);
    check(!h, "D: IO-ds does not answer");
    own_snoop(r, 1'b0);
    remote(REQ_READ_MISS, 27'h43, 3, NODE_NONE, h);
    check(h, "D: IO-d answers");
    repeat (5) @(posedge clk);
    check(sent_to(3, 27'h43) == 0, "D: no data nb own data");
    data(27'h43, MEMID);
    repeat (4) @(posedge clk);
    check(resp_cnt == nb + 1, "D: completes");
    check(sent_to(3, 27'h43) == 1 && sent_to(2, 27'h43) == 0, "D: block forwarded to 3 only");
    remote(REQ_READ_MISS, 27'h43, 0, NODE_NONE, h);
    check(h, "D: line is O");

    // ---- E: evictions in set 3 (0x43 O next=2, 0x33 fills the other way)
    miss(1'b1, 27'h33, 1'b0);       // M, set 3
    sent.delete();
    // 0x43 is least recently used: evict it (O with next sharer 2)
    nb = resp_cnt;
    cpu(1'b0, 27'h53);
    insert(r);
    check(r.kind == REQ_TWB1 && r.addr == 27'h43 && r.arg == 7'd2, "E: type-1 write-back to next sharer");
    show(r, h);
    own_snoop(r, 1'b0);              // not acknowledged
    @(negedge clk);
    check(req.valid && req.kind == REQ_TWB1, "E: type-1 reissued");
    insert(r2);
    show(r2, h);
    own_snoop(r2, 1'b1);
    // the miss for 0x53 goes out next
    insert(r);
    check(r.kind == REQ_READ_MISS && r.addr == 27'h53, "E: miss after write-back");
    show(r, h);
    own_snoop(r, 1'b1);
    data(27'h53, 0);
    repeat (2) @(posedge clk);
    check(resp_cnt == nb + 1, "E: miss completes in S");
    // evict M line 0x33 (LRU) -> ordinary write-back to memory
    sent.delete();
    miss(1'b0, 27'h63, 1'b0);
    repeat (2) @(posedge clk);
    check(sent_to(MEMID, 27'h33) == 1, "E: ordinary write-back of M to memory");
    // evict S line 0x53 -> type 2
    nb = resp_cnt;
    cpu(1'b0, 27'h73);
    insert(r);
    check(r.kind == REQ_TWB2 && r.addr == 27'h53, "E: type-2 write-back of S");
    show(r, h);
    own_snoop(r, 1'b1);
    insert(r);
    show(r, h);
    own_snoop(r, 1'b0);
    data(27'h73, MEMID);
    repeat (2) @(posedge clk);
    check(resp_cnt == nb + 1, "E: miss completes");

    // ---- G: upgrade of the S copy of 0x32 (set 2)
    nb = resp_cnt;
    cpu(1'b1, 27'h32);
    insert(r);
    check(r.kind == REQ_UPGRADE && r.addr == 27'h32, "G: upgrade request");
    show(r, h);
    repeat (2) @(posedge clk);
    check(resp_cnt == nb + 1, "G: upgrade completes when visible");
    remote(REQ_READ_MISS, 27'h32, 2, NODE_NONE, h);
    check(h, "G: line is M (now O)");

    // ---- H: ownership handed over by type 1
    miss(1'b0, 27'h00, 1'b1);       // S in set 0
    remote(REQ_TWB1, 27'h00, 0, ME, h);
    check(h, "H: type-1 to me acknowledged");
    remote(REQ_READ_MISS, 27'h00, 2, NODE_NONE, h);
    check(!h, "H: no answer during hold-off");
    repeat (2 * L + 1) @(posedge clk);
    remote(REQ_READ_MISS, 27'h00, 3, NODE_NONE, h);
    check(h, "H: owner after hold-off");

    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
