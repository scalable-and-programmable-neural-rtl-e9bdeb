// tb_io_buffer: self-checking test of the I/O buffer (1 KiB, 4 lanes, 6-b elements). The host
// writes 37 elements; TX streams them and the lanes are looped back into RX (through a 3-cycle
// delay), which stores them at another address; the host reads both regions back. Checks the
// round-robin lane order, the stored copy, and the TX time (37 elements over 4 lanes of 6-cycle
// elements).
module tb_io_buffer;
  import imc_pkg::*;
  localparam int BY = 1024, NL = 4, NE = 37, B = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_loc_t cfg;
  logic host_we, tx_busy, rx_busy;
  logic [$clog2(BY)-1:0] host_addr;
  logic [ACT_W-1:0] host_wdata, host_rdata;
  ser_t tx_lanes [NL];
  ser_t rx_lanes [NL];
  ser_t d1 [NL], d2 [NL];

  io_buffer #(.BYTES(BY), .NLANE(NL)) dut (.*);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < NL; l++) begin d1[l] <= '0; d2[l] <= '0; rx_lanes[l] <= '0; end
    end else begin
      d1 <= tx_lanes;
      d2 <= d1;
      rx_lanes <= d2;
    end
  end

  int checks = 0, failures = 0, cyc = 0, t0, lane_first [NL];
  int vals [NE];
  always @(posedge clk) cyc++;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wcfg(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: a, data: d};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  initial begin
    cfg = '0; host_we = 0; host_addr = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NE; i++) begin
      vals[i] = $urandom_range(0, 63);
      @(negedge clk) host_we = 1; host_addr = 10'(100 + i); host_wdata = ACT_W'(vals[i]);
    end
    @(negedge clk) host_we = 0;
    wcfg(16'h4, B);
    wcfg(16'h2, 500);
    wcfg(16'h3, NE);
    wcfg(16'h0, 100);
    @(negedge clk) cfg = '{we: 1'b1, addr: 16'h1, data: NE};
    @(negedge clk) cfg.we = 0;
    t0 = cyc;
    for (int l = 0; l < NL; l++) lane_first[l] = -1;
    while (tx_busy || tx_lanes[0].vld || tx_lanes[1].vld || tx_lanes[2].vld || tx_lanes[3].vld) begin
      for (int l = 0; l < NL; l++) if (tx_lanes[l].vld && lane_first[l] < 0) lane_first[l] = cyc;
      @(negedge clk);
    end
    checks++;
    // the last element (index 36) goes to lane 0 in round 9, so TX ends after 10 rounds of B cycles
    if (cyc - t0 < 10 * B || cyc - t0 > 10 * B + 3) begin failures++; $display("tx took %0d cycles", cyc - t0); end
    for (int l = 1; l < NL; l++) begin
      checks++;
      if (lane_first[l] != lane_first[l-1] + 1) begin failures++; $display("lane %0d starts at %0d", l, lane_first[l]); end
    end
    while (rx_busy) @(negedge clk);
    for (int i = 0; i < NE; i++) begin
      @(negedge clk) host_addr = 10'(500 + i);
      @(negedge clk);
      checks++;
      if (int'(host_rdata) != vals[i]) begin failures++; $display("rx elem %0d = %0d expected %0d", i, host_rdata, vals[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
