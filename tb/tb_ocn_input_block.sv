// tb_ocn_input_block: self-checking test of an input block with 16 channels, subsets of 4 and 6
// core lanes. Random directions and tap selections; random traffic on both ends. Checks the far
// end two cycles later and each lane's tap one cycle later against channel (t mod 4) + 4*j.
module tb_ocn_input_block;
  import imc_pkg::*;
  localparam int N = 16, NSUB = 4, NT = 6, S = N / NSUB;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_loc_t cfg;
  ser_t in_outer [N], in_inner [N], out_outer [N], out_inner [N];
  ser_t taps [NT];

  ocn_input_block #(.NCH(N), .NSUB(NSUB), .NTAP(NT)) dut (.*);

  int checks = 0, failures = 0;
  int dir [N], ts [NT];
  ser_t h_out [3][N], h_in [3][N];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    for (int i = 0; i < N; i++) begin in_outer[i] = '0; in_inner[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      dir[i] = $urandom_range(0, 1);
      @(negedge clk) cfg = '{we: 1'b1, addr: 16'(i), data: 32'(dir[i])};
    end
    for (int t = 0; t < NT; t++) begin
      ts[t] = $urandom_range(0, NSUB - 1);
      @(negedge clk) cfg = '{we: 1'b1, addr: 16'h80 | 16'(t), data: 32'(ts[t])};
    end
    @(negedge clk) cfg.we = 0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      if (k >= 2) begin
        for (int i = 0; i < N; i++) begin
          automatic ser_t e = dir[i] ? h_in[1][i] : h_out[1][i];
          automatic ser_t far = dir[i] ? out_outer[i] : out_inner[i];
          checks++;
          if (far != e) begin failures++; $display("ch %0d: %b expected %b", i, far, e); end
        end
        for (int t = 0; t < NT; t++) begin
          automatic int ch = (t % S) + S * ts[t];
          automatic ser_t e = dir[ch] ? h_in[0][ch] : h_out[0][ch];
          checks++;
          if (taps[t] != e) begin failures++; $display("tap %0d: %b expected %b", t, taps[t], e); end
        end
      end
      for (int j = 2; j > 0; j--) begin h_out[j] = h_out[j-1]; h_in[j] = h_in[j-1]; end
      for (int i = 0; i < N; i++) begin
        in_outer[i] = ser_t'($urandom_range(0, 3)); in_inner[i] = ser_t'($urandom_range(0, 3));
        h_out[0][i] = in_outer[i]; h_in[0][i] = in_inner[i];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
