// addr_port_ctrl: the address port controller of one processor.
//
// It stands between the L2 cache controller and the optical parts (transmit
// IC/VCSEL array, receive IC/photodetector array, token photodetector):
//  * insertion: the cache controller presents at most one request on req_i
//    and holds it. In a clock where this processor has the token the word
//    is driven onto the subnetwork (tx_o) and inserted_o pulses, so the
//    cache controller can leave its inactive state;
//  * reception: every word arriving from the subnetwork (rx_i, all
//    processors' requests, this one's included, in the global order) is
//    registered and handed to the cache controller on vis_o one clock later;
//    that is the clock in which the cache is snooped;
//  * snoop line: the cache controller's snoop answer for vis_o (snoop_hi_i,
//    same clock) is registered and driven on the snoop line in the next
//    clock;
//  * count-down timers: for each inserted request a timer is started; when
//    it runs out the snoop line is sampled, which is exactly the clock in
//    which the single snoop answer for that request arrives. The result is
//    given to the cache controller on own_snoop_* one clock later.
//
// Timing with L = log2(N_LEAVES): inserted in clock t, visible to the cache
// in t+2L, snoop answer driven in t+2L+1, arrives in t+4L, reported in
// t+4L+1. For four nodes this is the published example: inserted in cycle
// 1, received in 4, snooped in 5, answered in 6, answer received in 9.
// The number of timers (NTIMER) is this design's choice.
module addr_port_ctrl
  import symnet_pkg::*;
#(
  parameter int unsigned N_LEAVES = 64,
  parameter int unsigned NTIMER   = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  // token from the token ring
  input  logic      token_i,
  // cache controller side
  input  addr_req_t req_i,
  output logic      inserted_o,
  output addr_req_t vis_o,
  input  logic      snoop_hi_i,
  output logic      own_snoop_valid_o,
  output logic      own_snoop_hi_o,
  output addr_req_t own_snoop_req_o,
  // optical side
  output addr_req_t tx_o,
  input  addr_req_t rx_i,
  output logic      snoop_tx_o,
  input  logic      snoop_rx_i
);
  localparam int unsigned L       = $clog2(N_LEAVES);
  localparam int unsigned SNP_LAT = 4 * L;       // insertion to arrival
  localparam int unsigned CW      = $clog2(SNP_LAT + 1);

  typedef struct packed {
    logic          active;
    logic [CW-1:0] cnt;
    addr_req_t     req;
  } timer_t;

  timer_t [NTIMER-1:0] tmr_q;
  addr_req_t           vis_q;
  logic                snp_q;
  logic                own_v_q, own_hi_q;
  addr_req_t           own_req_q;

  assign inserted_o = token_i && req_i.valid;
  assign tx_o       = inserted_o ? req_i : '0;
  assign vis_o      = vis_q;
  assign snoop_tx_o = snp_q;

  // first free timer
  logic                      free_found;
  logic [$clog2(NTIMER+1)-1:0] free_idx;
  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = 0; i < NTIMER; i++) begin
      if (!tmr_q[i].active && !free_found) begin
        free_found = 1'b1;
        free_idx   = ($clog2(NTIMER+1))'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr_q     <= '0;
      vis_q     <= '0;
      snp_q     <= 1'b0;
      own_v_q   <= 1'b0;
      own_hi_q  <= 1'b0;
      own_req_q <= '0;
    end else begin
      vis_q    <= rx_i;
      snp_q    <= vis_q.valid && snoop_hi_i;
      own_v_q  <= 1'b0;
      own_hi_q <= 1'b0;
      for (int i = 0; i < NTIMER; i++) begin
        if (tmr_q[i].active) begin
          if (tmr_q[i].cnt == '0) begin
            tmr_q[i].active <= 1'b0;
            own_v_q   <= 1'b1;
            own_hi_q  <= snoop_rx_i;
            own_req_q <= tmr_q[i].req;
          end else begin
            tmr_q[i].cnt <= tmr_q[i].cnt - 1'b1;
          end
        end
      end
      if (inserted_o && free_found) begin
        tmr_q[free_idx].active <= 1'b1;
        tmr_q[free_idx].cnt    <= CW'(SNP_LAT - 1);
        tmr_q[free_idx].req    <= req_i;
      end
    end
  end

  assign own_snoop_valid_o = own_v_q;
  assign own_snoop_hi_o    = own_hi_q;
  assign own_snoop_req_o   = own_req_q;

  a_timer_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 inserted_o |-> free_found);
endmodule
