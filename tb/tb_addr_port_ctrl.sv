// tb_addr_port_ctrl: one port controller on a 4-leaf network (L = 2). The
// tree is replaced by a 3-clock delay from tx_o back to rx_i, and the snoop
// line by a 3-clock delay of a scripted snoop answer. Checks: the request
// is driven only in the token clock and inserted_o pulses then; vis_o shows
// it 2L = 4 clocks after insertion; snoop_hi_i is driven on the snoop line
// the next clock; the own snoop answer is reported 4L+1 = 9 clocks after
// insertion with the value that arrived (both high and low, and two
// requests in flight at once).
module tb_addr_port_ctrl;
  import symnet_pkg::*;
  localparam int unsigned NL = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic token;
  addr_req_t req, vis, own_req, tx, rx;
  logic ins, snoop_hi, own_v, own_hi, snoop_tx, snoop_rx;
  int checks = 0, failures = 0;
  int cyc = 0;

  addr_port_ctrl #(.N_LEAVES(NL)) dut (
    .clk, .rst_n, .token_i(token), .req_i(req), .inserted_o(ins), .vis_o(vis),
    .snoop_hi_i(snoop_hi), .own_snoop_valid_o(own_v), .own_snoop_hi_o(own_hi),
    .own_snoop_req_o(own_req), .tx_o(tx), .rx_i(rx), .snoop_tx_o(snoop_tx),
    .snoop_rx_i(snoop_rx)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // network model: 3 clocks (2L-1) for both trees
  addr_req_t dly [3];
  logic      sdly [3];
  always_ff @(posedge clk) begin
    dly[0] <= tx;       dly[1] <= dly[0];  dly[2] <= dly[1];
    sdly[0] <= snoop_tx; sdly[1] <= sdly[0]; sdly[2] <= sdly[1];
  end
  assign rx       = rst_n ? dly[2] : '0;
  // snoop answer: the port itself answers high for addresses with bit 0 set
  assign snoop_hi = vis.valid && vis.addr[0];
  assign snoop_rx = rst_n ? sdly[2] : 1'b0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // token every 4th clock
  assign token = (cyc % 4) == 1;

  int ins_cyc [$];
  addr_req_t ins_req [$];
  int n_own = 0, n_vis = 0;

  always @(negedge clk) if (rst_n) begin
    if (ins) begin
      checks++;
      if (!token || tx !== req) begin failures++; $display("bad insert"); end
      ins_cyc.push_back(cyc);
      ins_req.push_back(req);
    end else if (tx !== '0) begin
      failures++; $display("tx driven without token");
    end
    if (vis.valid) begin
      n_vis++;
      checks++;
      if (!ins_cyc.size() || ins_cyc.size() < n_vis) begin failures++; end
      else if (cyc - ins_cyc[n_vis-1] != 4 || vis !== ins_req[n_vis-1]) begin
        failures++; $display("vis at +%0d", cyc - ins_cyc[n_vis-1]);
      end
    end
    if (own_v) begin
      n_own++;
      checks++;
      if (ins_cyc.size() < n_own) failures++;
      else if (cyc - ins_cyc[n_own-1] != 9 || own_req !== ins_req[n_own-1] ||
               own_hi !== ins_req[n_own-1].addr[0]) begin
        failures++;
        $display("own snoop at +%0d hi=%0d", cyc - ins_cyc[n_own-1], own_hi);
      end
    end
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 12; k++) begin
      @(negedge clk);
      req.valid = 1'b1;
      req.kind  = REQ_READ_MISS;
      req.addr  = BLK_AW'(k * 7 + 3 + (k % 2));
      req.src   = 7'd2;
      req.arg   = NODE_NONE;
      while (!ins) @(negedge clk);
      @(posedge clk); #1;
      req = '0;
      repeat (k % 3) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (n_own != 12 || n_vis != 12) begin failures++; $display("own %0d vis %0d", n_own, n_vis); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
