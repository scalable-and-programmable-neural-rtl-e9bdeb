// tb_ocn_switch_block: self-checking test of the disjoint switch block with 6 channels per side.
// Programs random selectors, drives random traffic on all incoming channels and checks every
// outgoing channel one cycle later against the selected side's same-numbered channel (or idle).
module tb_ocn_switch_block;
  import imc_pkg::*;
  localparam int N = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_loc_t cfg;
  ser_t sw_in [4][N];
  ser_t sw_out [4][N];

  ocn_switch_block #(.NCH(N)) dut (.*);

  int checks = 0, failures = 0;
  int sel [4][N];
  ser_t prev [4][N];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    for (int s = 0; s < 4; s++) for (int i = 0; i < N; i++) sw_in[s][i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < N; i++) begin
        sel[s][i] = $urandom_range(0, 3);
        @(negedge clk) cfg = '{we: 1'b1, addr: {6'd0, 2'(s), 1'b0, 7'(i)}, data: 32'(sel[s][i])};
      end
    @(negedge clk) cfg.we = 0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      for (int s = 0; s < 4; s++) for (int i = 0; i < N; i++) begin
        if (k > 0) begin
          automatic ser_t e = (sel[s][i] == 0) ? '0 : prev[(s + sel[s][i]) % 4][i];
          checks++;
          if (sw_out[s][i] != e) begin failures++; $display("side %0d ch %0d: %b expected %b", s, i, sw_out[s][i], e); end
        end
      end
      for (int s = 0; s < 4; s++) for (int i = 0; i < N; i++) begin
        sw_in[s][i] = ser_t'($urandom_range(0, 3));
        prev[s][i] = sw_in[s][i];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
