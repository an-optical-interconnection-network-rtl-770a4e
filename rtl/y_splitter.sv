// y_splitter: one downstream 1x2 Y-splitter of the address subnetwork with
// the waveguide segment behind it, as one pipeline stage.
//
// The light arriving on the input is divided between the two outputs, so
// both outputs carry the same word. With REG = 1 the stage adds one clock
// of propagation; the last splitter level in front of the photodetectors is
// built with REG = 0 so that a request inserted in clock t reaches every
// node in clock t + 2*log2(N) - 1 (for four nodes: inserted in cycle 1,
// received by all in cycle 4, as in the published example).
module y_splitter #(
  parameter int unsigned W   = 8,
  parameter bit          REG = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in,
  output logic [W-1:0] out_a,
  output logic [W-1:0] out_b
);
  logic [W-1:0] v;

  if (REG) begin : g_reg
    logic [W-1:0] q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) q <= '0;
      else        q <= in;
    end
    assign v = q;
  end else begin : g_comb
    assign v = in;
  end

  assign out_a = v;
  assign out_b = v;
endmodule
