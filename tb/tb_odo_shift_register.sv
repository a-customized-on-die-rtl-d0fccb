`timescale 1ns/1ps
// tb_odo_shift_register: eight lane clocks, 1.6 ns period, spaced by 0.2 ns,
// feed random 5-bit words into the capture register while the testbench keeps
// the time-ordered list of every word shifted in. Hold is raised between
// edges; the register must freeze at the second lane-0 edge after it, keep its
// contents while the lane clocks run on, and read address p must return the
// p-th most recent word shifted in (address 0 = newest, from lane 0).
module tb_odo_shift_register;
  localparam int LANES = 8, DEPTH = 16;
  logic [LANES-1:0] lane_clk = '0;
  logic rst_n = 1'b0, hold = 1'b0;
  logic [LANES-1:0][4:0] din = '0;
  logic [6:0] rd_addr = '0;
  logic [4:0] rd_data;
  logic frozen;
  int checks = 0, failures = 0;

  int hist_val[$];
  int hist_lane[$];

  odo_shift_register dut (.lane_clk(lane_clk), .rst_n(rst_n), .hold(hold),
                          .din(din), .rd_addr(rd_addr), .rd_data(rd_data),
                          .frozen(frozen));

  for (genvar k = 0; k < LANES; k++) begin : g_clk
    initial begin
      #(5.0 + 0.2 * k);
      forever begin
        lane_clk[k] = 1'b1; #0.8;
        lane_clk[k] = 1'b0; #0.8;
      end
    end
    always @(posedge lane_clk[k])
      if (rst_n && !frozen) begin
        hist_val.push_back(int'(din[k]));
        hist_lane.push_back(k);
      end
    always @(negedge lane_clk[k]) din[k] = 5'($urandom);
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all(string what);
    int n = hist_val.size();
    for (int p = 0; p < LANES * DEPTH; p++) begin
      rd_addr = 7'(p);
      #0.05;
      checks++;
      if (int'(rd_data) != hist_val[n-1-p]) begin
        failures++;
        $display("FAIL %s addr=%0d data=%0d expected=%0d (lane %0d)",
                 what, p, rd_data, hist_val[n-1-p], hist_lane[n-1-p]);
      end
    end
  endtask

  initial begin
    int edges;
    #3 rst_n = 1'b1;
    // run long enough to fill all 128 words and more
    #60.1;
    hold = 1'b1;
    // count lane-0 edges until frozen is seen
    edges = 0;
    while (!frozen) begin
      @(posedge lane_clk[0]);
      edges++;
      #0.01;
    end
    checks++;
    if (edges != 2) begin failures++; $display("FAIL froze after %0d lane-0 edges", edges); end
    checks++;
    if (hist_lane[hist_lane.size()-1] != 0) begin
      failures++; $display("FAIL newest word not from lane 0");
    end
    checks++;
    if (hist_val.size() < 128) begin failures++; $display("FAIL history too short"); end
    read_all("frozen");
    #50;
    read_all("after more clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
