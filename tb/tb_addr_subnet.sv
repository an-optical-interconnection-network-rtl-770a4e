// tb_addr_subnet: an 8-leaf tree (L = 3). Each clock one randomly chosen
// leaf (or none) inserts a random word; every leaf must receive exactly
// that word 2L-1 = 5 clocks later, and nothing in between. Also checks the
// 4-leaf example timing (inserted cycle 1, received cycle 4) with a second
// instance.
module tb_addr_subnet;
  localparam int unsigned N = 8, W = 10, LAT = 5;
  localparam int unsigned N4 = 4, LAT4 = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][W-1:0] tx, rx;
  logic [N4-1:0][W-1:0] tx4, rx4;
  logic coll, coll4;
  int checks = 0, failures = 0;

  addr_subnet #(.N_LEAVES(N), .W(W)) dut (.clk, .rst_n, .tx, .rx, .collision(coll));
  addr_subnet #(.N_LEAVES(N4), .W(W)) dut4 (.clk, .rst_n, .tx(tx4), .rx(rx4), .collision(coll4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] hist [0:LAT];
  logic [W-1:0] hist4 [0:LAT4];

  initial begin
    tx = '0; tx4 = '0;
    for (int i = 0; i <= LAT; i++) hist[i] = '0;
    for (int i = 0; i <= LAT4; i++) hist4[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      for (int i = LAT; i > 0; i--) hist[i] = hist[i-1];
      for (int i = LAT4; i > 0; i--) hist4[i] = hist4[i-1];
      tx = '0; tx4 = '0;
      if ($urandom_range(3) != 0) begin
        int unsigned leaf;
        logic [W-1:0] w;
        leaf = $urandom_range(N - 1);
        w    = W'($urandom_range(1023, 1));
        tx[leaf] = w;
        tx4[leaf % N4] = w;
        hist[0] = w; hist4[0] = w;
      end else begin
        hist[0] = '0; hist4[0] = '0;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (rx[i] !== hist[LAT]) begin
          failures++;
          $display("k=%0d leaf %0d got %h exp %h", k, i, rx[i], hist[LAT]);
        end
      end
      for (int i = 0; i < N4; i++) begin
        checks++;
        if (rx4[i] !== hist4[LAT4]) begin
          failures++;
          $display("k=%0d (4 leaves) leaf %0d got %h exp %h", k, i, rx4[i], hist4[LAT4]);
        end
      end
      checks++;
      if (coll || coll4) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
