`timescale 1ns/1ps
// tb_deskew_latch: checks reset to zero, that q takes d on each rising clock
// edge, and that q does not follow d between edges.
module tb_deskew_latch;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] d = '0, q;
  int checks = 0, failures = 0;

  deskew_latch #(.BITS(5)) dut (.clk_latch(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 5'd21;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%0d", q); end
    rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      logic [4:0] v;
      @(negedge clk);
      v = 5'($urandom);
      d = v;
      #2;
      d = ~v;        // change between edges: must not reach q
      #1;
      d = v;
      @(posedge clk);
      #1;
      checks++;
      if (q !== v) begin failures++; $display("FAIL q=%0d expected=%0d", q, v); end
      d = ~v;
      #2;
      checks++;
      if (q !== v) begin failures++; $display("FAIL q moved between edges"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
