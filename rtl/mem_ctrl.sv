// mem_ctrl: controller of one memory module on the address subnetwork.
//
// The memory module listens to every address request and to the snoop
// line like a processor but never drives either. The memory keeps no dirty
// bit: it learns from the single snoop answer whether a cache owns the
// block. For a read miss, write miss or upgrade to a block homed here
// (block address modulo NUM_MEM equals MEM_IDX) that is answered with
// snoop low, it sends the block to the requester over the data subnetwork.
// Ordinary write-backs arrive over the data subnetwork and are counted.
//
// Timing: a request visible in clock v (registered from the leaf of the
// address tree) is matched, through a 2L-stage delay line, with the snoop
// line in clock v+2L, when that request's snoop answer arrives; the data
// message is queued in that clock. Interleaving by block address and the
// output queue depth are this design's choices.
module mem_ctrl
  import symnet_pkg::*;
#(
  parameter int unsigned N_LEAVES = 64,
  parameter int unsigned NUM_MEM  = 8,
  parameter int unsigned MEM_IDX  = 0,
  parameter int unsigned MEM_ID   = 32,
  parameter int unsigned QDEPTH   = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  addr_req_t rx_i,
  input  logic      snoop_rx_i,
  output data_msg_t dout_o,
  input  logic      dout_ready_i,
  input  data_msg_t din_i,
  output logic [31:0] served_o,
  output logic [31:0] writebacks_o,
  output logic      overflow_o
);
  localparam int unsigned L = $clog2(N_LEAVES);
  localparam int unsigned D = 2 * L;

  addr_req_t           vis_q;
  addr_req_t [D-1:0]   dly_q;
  addr_req_t           cur;
  logic                home, needs_data, push;
  data_msg_t           msg;
  logic                empty, full;
  logic [$clog2(QDEPTH+1)-1:0] cnt;
  logic [31:0]         served_q, wb_q;
  logic                ovf_q;

  assign cur = dly_q[D-1];

  if (NUM_MEM == 1) begin : g_one
    assign home = 1'b1;
  end else begin : g_many
    assign home = (cur.addr % BLK_AW'(NUM_MEM)) == BLK_AW'(MEM_IDX);
  end

  assign needs_data = cur.valid && home && !snoop_rx_i &&
                      (cur.kind inside {REQ_READ_MISS, REQ_WRITE_MISS, REQ_UPGRADE});
  assign push       = needs_data;

  always_comb begin
    msg       = '0;
    msg.valid = 1'b1;
    msg.addr  = cur.addr;
    msg.dst   = cur.src;
    msg.src   = NODE_W'(MEM_ID);
  end

  data_msg_t q_rdata;
  sync_fifo #(.W($bits(data_msg_t)), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n,
    .push(push), .wdata(msg),
    .pop(dout_ready_i), .rdata(q_rdata),
    .full(full), .empty(empty), .count(cnt)
  );

  always_comb begin
    dout_o       = q_rdata;
    dout_o.valid = !empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vis_q    <= '0;
      dly_q    <= '0;
      served_q <= '0;
      wb_q     <= '0;
      ovf_q    <= 1'b0;
    end else begin
      vis_q    <= rx_i;
      dly_q[0] <= vis_q;
      for (int i = 1; i < D; i++) dly_q[i] <= dly_q[i-1];
      if (push && !full) served_q <= served_q + 1;
      if (push && full)  ovf_q    <= 1'b1;
      if (din_i.valid && din_i.dst == NODE_W'(MEM_ID)) wb_q <= wb_q + 1;
    end
  end

  assign served_o     = served_q;
  assign writebacks_o = wb_q;
  assign overflow_o   = ovf_q;
endmodule
