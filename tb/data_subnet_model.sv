// data_subnet_model: behavioural stand-in for the optical data subnetwork
// (a contention-free crossbar in the evaluation). Every node's outgoing
// message is always accepted and delivered to its destination node exactly
// LAT clocks later; messages to the same destination that would arrive in
// the same clock are delivered one per clock in order. Block contents are
// not carried. Testbench use only.
module data_subnet_model
  import symnet_pkg::*;
#(
  parameter int unsigned NUM_NODES = 5,
  parameter int unsigned LAT       = 52
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  data_msg_t [NUM_NODES-1:0]       dout,
  output logic      [NUM_NODES-1:0]       dout_ready,
  output data_msg_t [NUM_NODES-1:0]       din
);
  typedef struct {
    longint    due;
    data_msg_t msg;
  } item_t;

  item_t  q [NUM_NODES][$];
  longint now = 0;

  assign dout_ready = '1;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < NUM_NODES; n++) q[n].delete();
      now <= 0;
    end else begin
      now <= now + 1;
      for (int n = 0; n < NUM_NODES; n++) begin
        if (dout[n].valid) begin
          item_t it;
          it.due = now + LAT;
          it.msg = dout[n];
          if (32'(dout[n].dst) < NUM_NODES) q[dout[n].dst].push_back(it);
        end
      end
    end
  end

  always @(negedge clk) begin
    for (int n = 0; n < NUM_NODES; n++) begin
      din[n] = '0;
      if (q[n].size() > 0 && q[n][0].due <= now) begin
        din[n] = q[n][0].msg;
        q[n].pop_front();
      end
    end
  end
endmodule
