// y_coupler: one upstream 2x1 Y-coupler of the address subnetwork together
// with the waveguide segment behind it, as one pipeline stage.
//
// Light entering either branch leaves on the single output, so the output
// word is the bitwise OR of the two inputs. The token discipline guarantees
// that at most one branch carries a request in any clock; if both do, the
// pulses would collide, which is flagged on `collision` and asserted
// against. Each level of the tree is one clock of propagation (the original design
// counts network latency in stages), so the output is registered when REG
// is 1. An all-zero word means "no light".
module y_coupler #(
  parameter int unsigned W   = 8,
  parameter bit          REG = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_a,
  input  logic [W-1:0] in_b,
  output logic [W-1:0] out,
  output logic         collision
);
  logic [W-1:0] comb;
  assign comb      = in_a | in_b;
  assign collision = (|in_a) && (|in_b);

  if (REG) begin : g_reg
    logic [W-1:0] q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q <= '0;
      else        q <= comb;
    end
    assign out = q;
  end else begin : g_comb
    assign out = comb;
  end

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !collision);
endmodule
