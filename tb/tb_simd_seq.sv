// tb_simd_seq: self-checking test of the SIMD instruction controller. Loads a 10-entry program
// whose last word is treated as a loop instruction, runs it with random stalls and checks the
// issued sequence against a reference program counter, the one-per-cycle issue rate without
// stalls, the issued-instruction count and the return to entry 0 when run is cleared.
module tb_simd_seq;
  import imc_pkg::*;
  localparam int D = 16;
  localparam int N = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_loc_t cfg;
  logic run, stall, jump0, issue;
  logic [31:0] instr, n_issued;

  simd_seq #(.DEPTH(D), .IW(32)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] prog [D];
  int pc = 0, done_cnt = 0;

  assign jump0 = (instr == 32'hFFFF_0000);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; run = 0; stall = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      prog[i] = (i == N - 1) ? 32'hFFFF_0000 : $urandom() & 32'h7FFF_FFFF;
      @(negedge clk) cfg = '{we: 1'b1, addr: 16'(i), data: prog[i]};
    end
    @(negedge clk) cfg.we = 0;
    checks++;
    if (issue) begin failures++; $display("issues while stopped"); end
    // no stalls: one instruction per cycle
    run = 1;
    for (int k = 0; k < 3 * N; k++) begin
      #1 checks++;
      if (instr != prog[pc]) begin failures++; $display("cycle %0d: instr %h expected %h", k, instr, prog[pc]); end
      @(negedge clk);
      pc = (pc == N - 1) ? 0 : pc + 1;
      done_cnt++;
    end
    // random stalls
    for (int k = 0; k < 200; k++) begin
      stall = 1'($urandom);
      #1 checks++;
      if (instr != prog[pc]) begin failures++; $display("stall phase: instr %h expected %h", instr, prog[pc]); end
      @(negedge clk);
      if (!stall) begin
        pc = (pc == N - 1) ? 0 : pc + 1;
        done_cnt++;
      end
    end
    stall = 0; run = 0;
    @(negedge clk);
    checks++;
    if (int'(n_issued) != done_cnt) begin failures++; $display("n_issued %0d expected %0d", n_issued, done_cnt); end
    @(negedge clk) run = 1;
    #1 checks++;
    if (instr != prog[0]) begin failures++; $display("restart not at entry 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
