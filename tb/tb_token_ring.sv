// tb_token_ring: checks that the token visits processors 0,1,..,N-1 in
// turn, one clock each, starting at processor 0 after reset, and that
// exactly one processor holds it in every clock (TDMA frame of N clocks).
module tb_token_ring;
  localparam int unsigned N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] token;
  int checks = 0, failures = 0;

  token_ring #(.NUM_PROC(N)) dut (.clk, .rst_n, .token);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_seen [N];
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (token !== N'(1)) begin failures++; $display("reset token %b", token); end
    rst_n = 1'b1;
    for (int k = 0; k < 4 * N + 3; k++) begin
      @(negedge clk);
      checks++;
      if (token !== N'(1) << ((k + 1) % N)) begin
        failures++;
        $display("cycle %0d: token %b expected bit %0d", k, token, (k + 1) % N);
      end
    end
    // frame length: distance between two grants of processor 2
    begin
      int first = -1, second = -1;
      for (int k = 0; k < 3 * N; k++) begin
        @(negedge clk);
        if (token[2]) begin
          if (first < 0) first = k; else if (second < 0) second = k;
        end
      end
      checks++;
      if (second - first != N) begin
        failures++;
        $display("frame length %0d, expected %0d", second - first, N);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
