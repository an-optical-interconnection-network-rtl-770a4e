// tb_mem_ctrl: memory module 1 of 2 on a 4-leaf network (L = 2). Requests
// are driven on rx_i and snoop answers on snoop_rx_i 2L+1 = 5 clocks later
// (one clock to register, 2L clocks until the answer arrives). The module
// must send a data message to the requester exactly for read/write
// misses and upgrades to its own blocks (odd block addresses) answered low,
// 2L+1 clocks after the request arrived, and count write-backs sent to it.
module tb_mem_ctrl;
  import symnet_pkg::*;
  localparam int unsigned NL = 4, MEM_ID = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  addr_req_t rx;
  logic snoop_rx, ovf;
  data_msg_t dout, din;
  logic [31:0] served, wbs;
  int checks = 0, failures = 0;

  mem_ctrl #(.N_LEAVES(NL), .NUM_MEM(2), .MEM_IDX(1), .MEM_ID(MEM_ID), .QDEPTH(4)) dut (
    .clk, .rst_n, .rx_i(rx), .snoop_rx_i(snoop_rx), .dout_o(dout), .dout_ready_i(1'b1),
    .din_i(din), .served_o(served), .writebacks_o(wbs), .overflow_o(ovf)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scripted stream; the expected output is computed independently
  addr_req_t stream [64];
  logic      snp    [64];
  int        exp_out [$];   // index into stream expected at output, in order
  int        cyc = 0;
  int        expect_at [64];

  initial begin
    int n_exp = 0, n_got = 0, wb_sent = 0;
    rx = '0; snoop_rx = 1'b0; din = '0;
    for (int i = 0; i < 64; i++) begin
      stream[i] = '0;
      stream[i].valid = 1'b1;
      stream[i].kind  = req_kind_e'($urandom_range(5, 1));
      stream[i].addr  = BLK_AW'($urandom_range(200));
      stream[i].src   = NODE_W'($urandom_range(3));
      snp[i] = $urandom_range(1);
      if (stream[i].kind inside {REQ_READ_MISS, REQ_WRITE_MISS, REQ_UPGRADE} &&
          stream[i].addr[0] && !snp[i]) begin
        exp_out.push_back(i);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 64 + 10; c++) begin
      @(negedge clk);
      rx = (c < 64) ? stream[c] : '0;
      snoop_rx = (c >= 5 && c - 5 < 64) ? snp[c-5] : 1'b0;
      din = '0;
      if (c % 7 == 3) begin
        din.valid = 1'b1; din.dst = NODE_W'(MEM_ID); din.addr = BLK_AW'(c); wb_sent++;
      end
      // output appears one clock after the match clock (queue is show-ahead)
      @(posedge clk); #1;
      if (dout.valid) begin
        checks++;
        if (n_got >= exp_out.size()) begin failures++; $display("unexpected output"); end
        else begin
          int i;
          i = exp_out[n_got];
          if (dout.addr !== stream[i].addr || dout.dst !== stream[i].src ||
              dout.src !== NODE_W'(MEM_ID) || c - i != 5) begin
            failures++;
            $display("out %0d: addr %0d dst %0d at +%0d, exp addr %0d dst %0d",
                     n_got, dout.addr, dout.dst, c - i, stream[i].addr, stream[i].src);
          end
        end
        n_got++;
      end
    end
    checks++;
    if (n_got != exp_out.size() || served != 32'(exp_out.size())) begin
      failures++; $display("got %0d expected %0d served %0d", n_got, exp_out.size(), served);
    end
    checks++;
    if (wbs != 32'(wb_sent) || ovf) begin failures++; $display("wb %0d exp %0d", wbs, wb_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
