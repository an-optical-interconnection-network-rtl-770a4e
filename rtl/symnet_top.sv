// symnet_top: the address side of a SYMNET symmetric multiprocessor.
//
// NUM_PROC processors (each an address port controller plus a COSYM L2
// cache controller) and NUM_MEM memory modules hang off one optical address
// subnetwork, a binary tree of Y-couplers and Y-splitters with N_LEAVES =
// next power of two of NUM_PROC+NUM_MEM leaves. A second tree of the same
// shape, one bit wide, is the snoop line. The token ring gives processor n
// the right to insert in every NUM_PROC-th clock, so requests enter the
// network one per clock without collision and reach all nodes in the same
// clock, which makes the order of arrival the global order of requests.
//
// Node numbering: processors 0..NUM_PROC-1, then memory modules; memory
// module k is home of the blocks whose block address modulo NUM_MEM is k.
// The processors and the optical data subnetwork are not part of this
// design: each processor's request port and each node's data-subnetwork
// port are brought out as arrays (cpu_*, dout/dout_ready/din).
//
// Defaults: 32 processors (the largest system evaluated for this architecture),
// one memory module per board of four processors (boards of four
// processors and a memory module as drawn in the board figure; the
// per-board count is this design's reading), L2 of 64 KB, 4-way, 32-byte
// blocks (512 sets) as in the evaluation.
module symnet_top
  import symnet_pkg::*;
#(
  parameter int unsigned NUM_PROC = 32,
  parameter int unsigned NUM_MEM  = 8,
  parameter int unsigned SETS     = 512,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned QDEPTH   = 8,
  localparam int unsigned NUM_NODES = NUM_PROC + NUM_MEM,
  localparam int unsigned N_LEAVES  = 1 << $clog2(NUM_NODES)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // processor request ports
  input  logic      [NUM_PROC-1:0]              cpu_req_valid,
  input  logic      [NUM_PROC-1:0]              cpu_req_we,
  input  logic      [NUM_PROC-1:0][BLK_AW-1:0]  cpu_req_addr,
  output logic      [NUM_PROC-1:0]              cpu_req_ready,
  output logic      [NUM_PROC-1:0]              cpu_resp_valid,
  output logic      [NUM_PROC-1:0]              cpu_resp_hit,
  // data subnetwork ports, one per node
  output data_msg_t [NUM_NODES-1:0]             dout,
  input  logic      [NUM_NODES-1:0]             dout_ready,
  input  data_msg_t [NUM_NODES-1:0]             din,
  // observation
  output logic      [NUM_PROC-1:0][15:0]        cc_events,
  output logic      [NUM_PROC-1:0]              token,
  output addr_req_t                             bcast,
  output logic                                  snoop_line,
  output logic                                  collision,
  output logic      [NUM_MEM-1:0][31:0]         mem_served,
  output logic      [NUM_MEM-1:0][31:0]         mem_writebacks,
  output logic      [NUM_MEM-1:0]               mem_overflow
);
  addr_req_t [N_LEAVES-1:0] a_tx, a_rx;
  logic      [N_LEAVES-1:0] s_tx, s_rx;
  logic                     a_coll, s_coll;

  token_ring #(.NUM_PROC(NUM_PROC)) u_token (
    .clk, .rst_n, .token(token)
  );

  addr_subnet #(.N_LEAVES(N_LEAVES), .W(REQ_W)) u_addr_net (
    .clk, .rst_n, .tx(a_tx), .rx(a_rx), .collision(a_coll)
  );

  addr_subnet #(.N_LEAVES(N_LEAVES), .W(1)) u_snoop_net (
    .clk, .rst_n, .tx(s_tx), .rx(s_rx), .collision(s_coll)
  );

  assign collision  = a_coll | s_coll;
  assign bcast      = a_rx[0];
  assign snoop_line = s_rx[0];

  for (genvar p = 0; p < NUM_PROC; p++) begin : g_proc
    addr_req_t req, vis, own_req;
    logic      ins, snp_hi, own_v, own_hi;

    addr_port_ctrl #(.N_LEAVES(N_LEAVES)) u_apc (
      .clk, .rst_n,
      .token_i(token[p]),
      .req_i(req), .inserted_o(ins), .vis_o(vis), .snoop_hi_i(snp_hi),
      .own_snoop_valid_o(own_v), .own_snoop_hi_o(own_hi), .own_snoop_req_o(own_req),
      .tx_o(a_tx[p]), .rx_i(a_rx[p]), .snoop_tx_o(s_tx[p]), .snoop_rx_i(s_rx[p])
    );

    cosym_cache_ctrl #(
      .MY_ID(p), .NUM_PROC(NUM_PROC), .NUM_MEM(NUM_MEM), .N_LEAVES(N_LEAVES),
      .SETS(SETS), .WAYS(WAYS), .QDEPTH(QDEPTH)
    ) u_cc (
      .clk, .rst_n,
      .cpu_req_valid(cpu_req_valid[p]), .cpu_req_we(cpu_req_we[p]),
      .cpu_req_addr(cpu_req_addr[p]), .cpu_req_ready(cpu_req_ready[p]),
      .cpu_resp_valid(cpu_resp_valid[p]), .cpu_resp_hit(cpu_resp_hit[p]),
      .req_o(req), .inserted_i(ins), .vis_i(vis), .snoop_hi_o(snp_hi),
      .own_snoop_valid_i(own_v), .own_snoop_hi_i(own_hi), .own_snoop_req_i(own_req),
      .dout_o(dout[p]), .dout_ready_i(dout_ready[p]), .din_i(din[p]),
      .events_o(cc_events[p])
    );
  end

  for (genvar m = 0; m < NUM_MEM; m++) begin : g_mem
    mem_ctrl #(
      .N_LEAVES(N_LEAVES), .NUM_MEM(NUM_MEM), .MEM_IDX(m), .MEM_ID(NUM_PROC + m),
      .QDEPTH(QDEPTH)
    ) u_mem (
      .clk, .rst_n,
      .rx_i(a_rx[NUM_PROC+m]), .snoop_rx_i(s_rx[NUM_PROC+m]),
      .dout_o(dout[NUM_PROC+m]), .dout_ready_i(dout_ready[NUM_PROC+m]),
      .din_i(din[NUM_PROC+m]),
      .served_o(mem_served[m]), .writebacks_o(mem_writebacks[m]),
      .overflow_o(mem_overflow[m])
    );
    assign a_tx[NUM_PROC+m] = '0;
    assign s_tx[NUM_PROC+m] = 1'b0;
  end

  for (genvar u = NUM_NODES; u < N_LEAVES; u++) begin : g_unused
    assign a_tx[u] = '0;
    assign s_tx[u] = 1'b0;
  end
endmodule
