// tb_y_splitter: checks that both outputs of a splitter carry the input
// word, one clock later for a registered stage and in the same clock for
// the unregistered last stage.
module tb_y_splitter;
  localparam int unsigned W = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] in, ra, rb, ca, cb;
  int checks = 0, failures = 0;

  y_splitter #(.W(W), .REG(1'b1)) dut_r (.clk, .rst_n, .in, .out_a(ra), .out_b(rb));
  y_splitter #(.W(W), .REG(1'b0)) dut_c (.clk, .rst_n, .in, .out_a(ca), .out_b(cb));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev;
    in = '0; prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      checks++;
      if (ra !== prev || rb !== prev) begin failures++; $display("reg %h %h exp %h", ra, rb, prev); end
      in = W'($urandom);
      #1;
      checks++;
      if (ca !== in || cb !== in) begin failures++; $display("comb %h %h exp %h", ca, cb, in); end
      prev = in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
