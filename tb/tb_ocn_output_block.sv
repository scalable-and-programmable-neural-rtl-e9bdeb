// tb_ocn_output_block: self-checking test of an output block with 8 channels and 6 core lanes.
// Gives every channel a random direction and either pass-through or a random core lane, drives
// random traffic on both ends and on the lanes, and checks each channel's far end two cycles
// later (entry register, then injection, then exit register) and that the unused end is idle.
module tb_ocn_output_block;
  import imc_pkg::*;
  localparam int N = 8, NS = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_loc_t cfg;
  ser_t in_outer [N], in_inner [N], out_outer [N], out_inner [N];
  ser_t src [NS];
  logic inject_event;

  ocn_output_block #(.NCH(N), .NSRC(NS)) dut (.*);

  int checks = 0, failures = 0, injects = 0;
  int dir [N], ss [N];
  ser_t h_out [3][N], h_in [3][N], h_src [3][NS];

  always @(posedge clk) if (inject_event) injects++;

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
    for (int i = 0; i < NS; i++) src[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      dir[i] = $urandom_range(0, 1);
      ss[i]  = (i % 2 == 0) ? 0 : $urandom_range(1, NS);
      @(negedge clk) cfg = '{we: 1'b1, addr: 16'(i), data: 32'({dir[i][0], 6'(ss[i])})};
    end
    @(negedge clk) cfg.we = 0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      if (k >= 2) begin
        for (int i = 0; i < N; i++) begin
          ser_t e, far, near;
          e = (ss[i] != 0) ? h_src[0][ss[i] - 1] : (dir[i] ? h_in[1][i] : h_out[1][i]);
          far  = dir[i] ? out_outer[i] : out_inner[i];
          near = dir[i] ? out_inner[i] : out_outer[i];
          checks += 2;
          if (far != e) begin failures++; $display("k %0d ch %0d: %b expected %b", k, i, far, e); end
          if (near != '0) begin failures++; $display("ch %0d drives its input end", i); end
        end
      end
      for (int j = 2; j > 0; j--) begin h_out[j] = h_out[j-1]; h_in[j] = h_in[j-1]; h_src[j] = h_src[j-1]; end
      for (int i = 0; i < N; i++) begin
        in_outer[i] = ser_t'($urandom_range(0, 3)); in_inner[i] = ser_t'($urandom_range(0, 3));
        h_out[0][i] = in_outer[i]; h_in[0][i] = in_inner[i];
      end
      for (int i = 0; i < NS; i++) begin src[i] = ser_t'($urandom_range(0, 3)); h_src[0][i] = src[i]; end
    end
    checks++;
    if (injects == 0) begin failures++; $display("no injection seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
