// tb_ocn_tile: self-checking test of one 2x2 OCN tile at full channel count. Programs three
// routes and drives random traffic:
//   core 0 lane 3 -> north arm ch 5 -> switch -> west arm ch 5 -> core 2 lane 1 and the west edge
//   east edge ch 10 -> east arm -> core 1 lane 2, and on through the switch -> south arm -> edge
//   core 3 lane 19 -> south arm ch 11 -> south edge
// and checks every destination against the source with the expected pipeline delay.
module tb_ocn_tile;
  import imc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_loc_t cfg;
  ser_t core_out [4][OUT_LANES];
  ser_t core_in  [4][IN_LANES];
  ser_t arm_in   [4][OCN_CH];
  ser_t arm_out  [4][OCN_CH];
  logic inject_event;

  ocn_tile #(.NCH(OCN_CH)) dut (.*);

  int checks = 0, failures = 0;
  ser_t ha [8], hb [8], hc [8];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wcfg(int part, int a, int d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: 16'((part << 10) | a), data: 32'(d)};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic chk(ser_t got, ser_t e, string what);
    checks++;
    if (got != e) begin failures++; $display("%s: %b expected %b", what, got, e); end
  endtask

  initial begin
    cfg = '0;
    for (int q = 0; q < 4; q++) for (int l = 0; l < OUT_LANES; l++) core_out[q][l] = '0;
    for (int s = 0; s < 4; s++) for (int c = 0; c < OCN_CH; c++) arm_in[s][c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // route A
    wcfg(1, 5, (0 << 6) | (3 + 1));          // north ch5: towards switch, core 0 lane 3
    wcfg(0, (3 << 8) | 5, 1);                // switch: west out ch5 <- north
    wcfg(3, 5, 1);                           // west ch5: inner -> outer
    wcfg(3, 128 + 12 + 1, 1);                // west tap 13 (core 2 lane 1): j = 1 -> ch 5
    // route B
    wcfg(4, 10, 0);                          // east ch10: outer -> inner
    wcfg(4, 128 + 2, 2);                     // east tap 2 (core 1 lane 2): j = 2 -> ch 10
    wcfg(0, (2 << 8) | 10, 3);               // switch: south out ch10 <- east
    wcfg(2, 10, 1 << 6);                     // south ch10: inner -> outer, pass
    // route C
    wcfg(2, 11, (1 << 6) | (OUT_LANES + 19 + 1));  // south ch11: core 3 lane 19, to the edge
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      if (k >= 6) begin
        chk(core_in[2][1], ha[2], "core 2 lane 1");
        chk(arm_out[3][5], ha[3], "west edge ch5");
        chk(core_in[1][2], hb[0], "core 1 lane 2");
        chk(arm_out[2][10], hb[4], "south edge ch10");
        chk(arm_out[2][11], hc[0], "south edge ch11");
      end
      for (int j = 7; j > 0; j--) begin ha[j] = ha[j-1]; hb[j] = hb[j-1]; hc[j] = hc[j-1]; end
      core_out[0][3]  = ser_t'($urandom_range(0, 3));
      arm_in[1][10]   = ser_t'($urandom_range(0, 3));
      core_out[3][19] = ser_t'($urandom_range(0, 3));
      ha[0] = core_out[0][3]; hb[0] = arm_in[1][10]; hc[0] = core_out[3][19];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
