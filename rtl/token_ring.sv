// token_ring: the optical token generator and the per-processor delay
// elements, as seen by the electronics.
//
// A token generated once per frame travels past the processors; each delay
// element (a 20 cm fibre loop, 1 ns = one processor clock) hands it to the
// next processor one clock later, so processor n may insert an address
// request in every clock where token[n] is high and no two processors ever
// insert in the same clock. This is modelled as a one-hot shift register of
// NUM_PROC stages that wraps around. The token is restarted by reset at
// processor 0; a stray or lost token is corrected by re-seeding whenever the
// ring is not one-hot (this design's choice).
//
// Ports: token[NUM_PROC-1:0] one-hot, advances by one position per clock.
module token_ring #(
  parameter int unsigned NUM_PROC = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic [NUM_PROC-1:0] token
);
  logic [NUM_PROC-1:0] ring_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ring_q <= NUM_PROC'(1);
    end else if (ring_q == '0 || (ring_q & (ring_q - 1'b1)) != '0) begin
      ring_q <= NUM_PROC'(1);
    end else begin
      ring_q <= (ring_q << 1) | (ring_q >> (NUM_PROC - 1));
    end
  end

  assign token = ring_q;

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(token));
endmodule
