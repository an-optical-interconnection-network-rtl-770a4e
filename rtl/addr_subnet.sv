// addr_subnet: the SYMNET address subnetwork (also used, one bit wide, for
// the snoop line).
//
// N_LEAVES nodes (processors and memory modules, padded to a power of two)
// sit at the leaves of a binary tree. Going up, every tree node is a 2x1
// Y-coupler that merges its two children; at the root the light turns round
// and goes down through 1x2 Y-splitters, so every word that reaches the
// root is delivered to all leaves in the same clock. With L = log2(N_LEAVES)
// levels there are L coupler stages and L splitter stages, that is 2L stages
// as in the original design; stage k of a word inserted in clock t is occupied in
// clock t+k-1, so all leaves see it in clock t+2L-1 (2L-1 registers).
//
// The tree is stored heap-style: internal node n (1..N_LEAVES-1) has the
// children 2n and 2n+1, leaf i is node N_LEAVES+i.
//
// The network is passive: it neither queues nor arbitrates. Correct use
// depends on the token ring letting only one leaf drive per clock; two
// drivers in one clock raise `collision`.
module addr_subnet #(
  parameter int unsigned N_LEAVES = 64,
  parameter int unsigned W        = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_LEAVES-1:0][W-1:0] tx,
  output logic [N_LEAVES-1:0][W-1:0] rx,
  output logic                    collision
);

  logic [2*N_LEAVES-1:0][W-1:0] up;
  logic [2*N_LEAVES-1:0][W-1:0] dn;
  logic [N_LEAVES-1:0]          coll;

  assign coll[0] = 1'b0;
  assign up[0]   = '0;

  for (genvar i = 0; i < N_LEAVES; i++) begin : g_leaf
    assign up[N_LEAVES+i] = tx[i];
    assign rx[i]          = dn[N_LEAVES+i];
  end

  // Upstream couplers.
  for (genvar n = 1; n < N_LEAVES; n++) begin : g_up
    y_coupler #(.W(W), .REG(1'b1)) u_cpl (
      .clk, .rst_n,
      .in_a(up[2*n]), .in_b(up[2*n+1]),
      .out(up[n]), .collision(coll[n])
    );
  end

  // Turn-round at the root.
  assign dn[0] = '0;
  assign dn[1] = up[1];

  // Downstream splitters: node n feeds its children; the deepest level
  // (children are leaves) is not registered.
  for (genvar n = 1; n < N_LEAVES; n++) begin : g_dn
    localparam bit LAST = (n >= N_LEAVES / 2);
    y_splitter #(.W(W), .REG(!LAST)) u_spl (
      .clk, .rst_n,
      .in(dn[n]), .out_a(dn[2*n]), .out_b(dn[2*n+1])
    );
  end

  assign collision = |coll;
endmodule
