// tb_out_buffer: self-checking test of the output buffer (3 lanes, 4-entry FIFOs, 5-b
// elements). Pushes random elements faster than the lanes drain, obeying full, decodes the bit
// streams here and checks every element in order, that full was raised, and that each lane
// streams back to back (one element per 5 cycles while its FIFO is non-empty).
module tb_out_buffer;
  import imc_pkg::*;
  localparam int NL = 3, B = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] bits;
  logic push, full;
  logic [ACT_W-1:0] data [NL];
  ser_t lanes [NL];

  out_buffer #(.NLANE(NL), .DEPTH(4)) dut (.*);

  int checks = 0, failures = 0, fulls = 0, busy_cycles = 0;
  int sent [NL][$];
  int rx [NL][$];
  int sh [NL], nb [NL];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (full) fulls++;
    if (lanes[0].vld) busy_cycles++;
    for (int l = 0; l < NL; l++)
      if (lanes[l].vld) begin
        sh[l] |= int'(lanes[l].dat) << nb[l];
        nb[l]++;
        if (nb[l] == B) begin rx[l].push_back(sh[l]); sh[l] = 0; nb[l] = 0; end
      end
  end

  initial begin
    bits = 4'(B); push = 0;
    for (int l = 0; l < NL; l++) begin data[l] = '0; sh[l] = 0; nb[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      while (full) @(negedge clk);
      push = 1;
      for (int l = 0; l < NL; l++) begin
        data[l] = ACT_W'($urandom_range(0, 31));
        sent[l].push_back(int'(data[l]));
      end
      @(negedge clk) push = 0;
    end
    repeat (60) @(negedge clk);
    for (int l = 0; l < NL; l++) begin
      checks++;
      if (rx[l].size() != 20) begin failures++; $display("lane %0d received %0d", l, rx[l].size()); end
      for (int k = 0; k < rx[l].size() && k < 20; k++) begin
        checks++;
        if (rx[l][k] != sent[l][k]) begin failures++; $display("lane %0d elem %0d: %0d expected %0d", l, k, rx[l][k], sent[l][k]); end
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("full never raised"); end
    checks++;
    if (busy_cycles != 20 * B) begin failures++; $display("lane 0 busy %0d cycles, expected %0d", busy_cycles, 20 * B); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
