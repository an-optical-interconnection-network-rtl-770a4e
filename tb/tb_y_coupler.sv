// tb_y_coupler: drives a word on at most one branch per clock and checks
// that it leaves the coupler one clock later (registered stage) or in the
// same clock (unregistered stage), and that the collision flag stays low.
module tb_y_coupler;
  localparam int unsigned W = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] a, b, out_r, out_c;
  logic coll_r, coll_c;
  int checks = 0, failures = 0;

  y_coupler #(.W(W), .REG(1'b1)) dut_r (.clk, .rst_n, .in_a(a), .in_b(b), .out(out_r), .collision(coll_r));
  y_coupler #(.W(W), .REG(1'b0)) dut_c (.clk, .rst_n, .in_a(a), .in_b(b), .out(out_c), .collision(coll_c));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev;
    int sel;
    a = '0; b = '0; prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      checks++;
      if (out_r !== prev) begin failures++; $display("reg out %h exp %h", out_r, prev); end
      sel = $urandom_range(2);
      case (sel)
        0: begin a = W'($urandom); b = '0; end
        1: begin a = '0; b = W'($urandom); end
        default: begin a = '0; b = '0; end
      endcase
      #1;
      checks++;
      if (out_c !== (a | b) || coll_c || coll_r) begin failures++; $display("comb out %h", out_c); end
      prev = a | b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
