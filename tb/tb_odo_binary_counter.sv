`timescale 1ns/1ps
// tb_odo_binary_counter: with Hold low the address stays 0; after Hold rises
// (between clock edges) the address starts counting at the third rising
// read_clk edge (two synchronizer flops), steps by one per cycle through all
// 128 addresses, wraps, and a7 always equals the address LSB.
module tb_odo_binary_counter;
  logic read_clk = 1'b0, rst_n = 1'b0, hold = 1'b0;
  logic [6:0] addr;
  logic a7, reading;
  int checks = 0, failures = 0;

  odo_binary_counter dut (.read_clk(read_clk), .rst_n(rst_n), .hold(hold),
                          .addr(addr), .a7(a7), .reading(reading));

  always #50 read_clk = ~read_clk;   // 10 MHz

  initial begin
    repeat (600) @(posedge read_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_addr(int v, string what);
    checks++;
    if (addr !== 7'(v) || a7 !== addr[0]) begin
      failures++;
      $display("FAIL %s: addr=%0d a7=%b expected %0d", what, addr, a7, v);
    end
  endtask

  initial begin
    int wraps = 0;
    #120 rst_n = 1'b1;
    repeat (5) begin @(posedge read_clk); #1 expect_addr(0, "idle"); end
    @(negedge read_clk);
    #13 hold = 1'b1;
    @(posedge read_clk); #1 expect_addr(0, "sync 1");
    @(posedge read_clk); #1 expect_addr(0, "sync 2");
    for (int i = 1; i <= 300; i++) begin
      @(posedge read_clk); #1 expect_addr(i % 128, "count");
      if (i % 128 == 0) wraps++;
    end
    checks++;
    if (wraps != 2) begin failures++; $display("FAIL wraps=%0d", wraps); end
    // dropping Hold returns the counter to 0
    hold = 1'b0;
    repeat (3) @(posedge read_clk);
    #1 expect_addr(0, "release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
