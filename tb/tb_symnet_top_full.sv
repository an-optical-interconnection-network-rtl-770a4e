// tb_symnet_top_full: the SYMNET system at its default size (32
// processors, 8 memory modules, 64-leaf network so L = 6, 64 KB 4-way L2
// per processor) taken through one complete sharing sequence on one block,
// with a 52-clock data subnetwork:
//   1. processor 5 read miss: nobody answers, memory 5 (home of block 13
//      modulo 8) supplies, the block loads E; latency from the clock the
//      request reaches all nodes to completion is 2L + 3 + 52 clocks;
//   2. processor 9 read miss: processor 5 answers (E -> O) and supplies;
//   3. processor 20 write miss: owner 5 answers, all copies invalidated,
//      processor 20 ends with the only (M) copy.
// Also checks that the token ring spaces a processor's grants 32 clocks
// apart and that the snoop answer of each request is driven 2L + 1 clocks
// after the request reaches the nodes.
module tb_symnet_top_full;
  import symnet_pkg::*;
  localparam int unsigned NP = 32, NM = 8, NN = NP + NM, L = 6, DLAT = 52;
  localparam logic [BLK_AW-1:0] BLK = 27'd13;
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

  symnet_top dut (
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  `define ST_FN(P) \
  function automatic line_state_e st``P(); \
    for (int w = 0; w < 4; w++) \
      if (dut.g_proc[P].u_cc.st_q[BLK[8:0]][w] != ST_I && \
          dut.g_proc[P].u_cc.tag_q[BLK[8:0]][w] == BLK[BLK_AW-1:9]) \
        return dut.g_proc[P].u_cc.st_q[BLK[8:0]][w]; \
    return ST_I; \
  endfunction
  `ST_FN(5)
  `ST_FN(9)
  `ST_FN(20)

  // snoop answer timing: driven 2L+1 clocks after the request reaches nodes
  int bcast_t [$];
  int snoop_hi_seen = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n) begin
    if (bcast.valid) bcast_t.push_back(cyc);
    for (int p = 0; p < NP; p++) if (dut.s_tx[p]) begin
      snoop_hi_seen++;
      checks++;
      if (!(bcast_t.size() > 0 && cyc - bcast_t[bcast_t.size()-1] == 2)) begin
        failures++; $display("snoop answer not 2 clocks after the last request reached the nodes");
      end
    end
    if (snoop_line) begin
      checks++;
      if (!(bcast_t.size() > 0 && cyc - bcast_t[bcast_t.size()-1] == 2 * L + 1)) begin
        failures++; $display("snoop line arrival at +%0d", cyc - bcast_t[bcast_t.size()-1]);
      end
    end
    if (coll) begin failures++; $display("collision"); end
  end

  task automatic access(input int p, input logic we, output int lat);
    int t0;
    @(negedge clk);
    cpu_v[p] = 1'b1; cpu_we[p] = we; cpu_addr[p] = BLK;
    @(posedge clk);
    while (!cpu_ready[p]) @(posedge clk);
    #1 cpu_v[p] = 1'b0;
    while (!bcast.valid) @(posedge clk);
    t0 = cyc;
    while (!resp_v[p]) @(posedge clk);
    lat = cyc - t0;
  endtask

  initial begin
    int lat, g0, g1;
    cpu_v = '0; cpu_we = '0; cpu_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // token ring frame
    @(posedge token[7]); g0 = cyc;
    @(posedge clk); @(posedge token[7]); g1 = cyc;
    check(g1 - g0 == NP, "token frame of 32 clocks");

    access(5, 1'b0, lat);
    check(lat == 2 * L + 3 + DLAT, $sformatf("read miss latency %0d", lat));
    check(st5() == ST_E, "P5 holds E after a miss with no owner");
    check(served[5] == 1, "home memory 5 supplied the block");

    access(9, 1'b0, lat);
    check(st5() == ST_O && st9() == ST_S, "P5 O (owner), P9 S");
    check(served[5] == 1, "memory did not supply again");

    access(20, 1'b1, lat);
    check(st5() == ST_I && st9() == ST_I && st20() == ST_M, "write miss leaves only P20, in M");
    check(snoop_hi_seen == 2, "two snoop-high answers (read and write)");

    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
