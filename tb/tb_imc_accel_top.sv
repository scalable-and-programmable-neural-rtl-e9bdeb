// tb_imc_accel_top: end-to-end test of the full-size accelerator (4x4 cores of 1152x256 cells,
// default parameters).
//
// Dataflow under test:
//   host -> I/O buffer -> TX lanes -> west arm of tile 0 (channels 0..7)
//        -> taps of core 0 (input-buffer lanes 0..7 and shortcut lane 8)
//        -> switch block -> east arm (channels 0..7) -> taps of core 1
//   cores 0 and 1 hold the same weights (one multicast weight load) and compute the same partial
//   inner products; core 1 sends its BPBS results over the face-to-face link and core 0 adds them
//   -> core 0 CMPT: ReLU, shift, 4-b quantisation, LUT lookup, exchange with the left neighbour
//      datapath, output buffer -> output lanes 0..7 injected on north arm channels 8..15
//   -> switch block -> west arm channels 8..15 -> RX lanes -> I/O buffer -> host read-back.
// Core 0's shortcut buffer runs in bypass mode on a copy of input lane 0. The second input vector
// reuses part of the first (convolution window slide).
// Every received element is compared with a model computed here. Each mechanism used (weight
// multicast, padding, window reuse, BPBS stalls, face-to-face add, shortcut bypass, LUT, exchange, OCN
// injection) is counted and a mechanism that never happens is a failure. Cycle checks: each
// input vector costs exactly 4 CIMA conversions (one per activation bit) and each conversion
// takes at least ADC_LAT cycles.
module tb_imc_accel_top;
  import imc_pkg::*;
  localparam int NCORE = 16;
  localparam int NO = COLS / 4;        // 4-b outputs per core
  localparam int NV = 2;               // input vectors
  localparam int FILL = 3;             // activations per input-buffer bank
  localparam int NX = 8 * FILL;        // activations per vector
  localparam int NRW = NX + 1;         // rows incl. one padding zero
  localparam int NNEW = 8 * (FILL - 1); // new activations of the slid window
  localparam int SH = 5;
  localparam int RX_BASE = 4096;
  localparam int NRX = NV * 4 * 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_req_t cfg;
  logic wl_vld;
  logic [NCORE-1:0] wl_mask;
  logic [ROW_AW-1:0] wl_row;
  logic [COLS-1:0] wl_data;
  logic host_we;
  logic [16:0] host_addr;
  logic [ACT_W-1:0] host_wdata, host_rdata;
  logic tx_busy, rx_busy;
  core_ev_t core_ev [NCORE];
  logic ocn_inject;
  logic [31:0] wl_rows, cfg_rdata;

  imc_accel_top dut (.*);

  int checks = 0, failures = 0;
  int W [NRW][NO];
  int X [NV][NRW];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- mechanism counters ---------------------------------------------------------------------
  int n_mcast = 0, n_pad = 0, n_stall = 0, n_f2f = 0, n_byp = 0, n_lut = 0, n_xch = 0, n_inj = 0;
  int n_reuse = 0;
  int n_conv = 0, conv_t0 = 0, conv_min = 1 << 30;
  always @(posedge clk) if (rst_n) begin
    if (wl_vld && !$onehot0(wl_mask)) n_mcast++;
    if (core_ev[0].pad) n_pad++;
    if (core_ev[0].bpbs_stall || core_ev[1].bpbs_stall) n_stall++;
    if (core_ev[0].f2f) n_f2f++;
    if (core_ev[0].sc_pop && core_ev[0].sc_bypass) n_byp++;
    if (core_ev[0].lut) n_lut++;
    if (core_ev[0].xch) n_xch++;
    if (ocn_inject) n_inj++;
    if (dut.g_core[0].u_core.u_ib.handover && dut.g_core[0].u_core.u_ib.keep[0] != 0) n_reuse++;
  end
  // CIMA conversions of core 0: start (plane accepted) to ADC hand-off
  always @(posedge clk) if (rst_n) begin
    if (dut.g_core[0].u_core.pl_vld && dut.g_core[0].u_core.pl_rdy) conv_t0 = $time / 10;
    if (dut.g_core[0].u_core.adc_vld && dut.g_core[0].u_core.adc_ack) begin
      n_conv++;
      if ($time / 10 - conv_t0 < conv_min) conv_min = $time / 10 - conv_t0;
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired: tx %0d rx %0d conv %0d f2f %0d inj %0d", tx_busy, rx_busy, n_conv, n_f2f, n_inj);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- configuration helpers -----------------------------------------------------------------
  task automatic wcfg(int unit, int a, logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: 24'((unit << 19) | a), data: d};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask
  task automatic core_cfg(int c, int sub, int a, logic [31:0] d);
    wcfg(c, (sub << 16) | a, d);
  endtask
  task automatic tile_cfg(int part, int a, logic [31:0] d);
    wcfg(16, (part << 10) | a, d);
  endtask

  function automatic logic [31:0] bi(bpbs_op_e op, int col = 0, int sh = 0, bit neg = 0,
                                     bit clr = 0, bit f2f = 0);
    bpbs_instr_t i;
    i = '0; i.op = op; i.col = 2'(col); i.shift = 5'(sh); i.neg = neg; i.clr = clr; i.f2f = f2f;
    return 32'(i);
  endfunction
  function automatic logic [31:0] ci(cmpt_op_e op, alu_e a = A_MOV, int dst = 0, src_e sa = S_REG,
                                     int ra = 0, src_e sb = S_IMM, int rb = 0);
    cmpt_instr_t i;
    i = '0; i.op = op; i.alu = a; i.dst = 5'(dst); i.sa = sa; i.ra = 5'(ra); i.sb = sb; i.rb = 5'(rb);
    return 32'(i);
  endfunction

  function automatic int yq(int v, int o);   // core-0 datapath value for output o
    int s = 0;
    for (int r = 0; r < NRW; r++) s += X[v][r] * W[r][o];
    s = 2 * s;                               // core 0 + core 1 (face to face)
    s = (s < 0 ? 0 : s) >>> SH;
    return s > 15 ? 15 : s;
  endfunction

  initial begin
    int n;
    cfg = '0; wl_vld = 0; wl_mask = '0; wl_row = '0; wl_data = '0;
    host_we = 0; host_addr = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- weights: random signed 4-b, multicast to cores 0 and 1 -------------------------------
    for (int r = 0; r < NRW; r++) begin
      logic [COLS-1:0] row;
      for (int k = 0; k < NO; k++) begin
        W[r][k] = (r == 0) ? 0 : $urandom_range(0, 15) - 8;
        for (int j = 0; j < 4; j++) row[4*k + j] = 1'(W[r][k] >> j);
      end
      @(negedge clk) wl_vld = 1; wl_mask = 16'b11; wl_row = ROW_AW'(r); wl_data = row;
    end
    @(negedge clk) wl_vld = 0; wl_mask = '0;

    // ---- activations into the I/O buffer: element i -> TX lane i % 8 ---------------------------
    // Vector 0 fills every bank (3 elements); vector 1 slides the window: each bank keeps the
    // newest element of vector 0 and takes two new ones (16 elements in all).
    X[0][0] = 0;
    for (int i = 0; i < NX; i++) begin
      automatic int l = i % 8, e = i / 8;
      automatic int x = $urandom_range(0, 15);
      X[0][1 + FILL * l + e] = x;
      @(negedge clk) host_we = 1; host_addr = 17'(i); host_wdata = ACT_W'(x);
    end
    X[1][0] = 0;
    for (int l = 0; l < 8; l++) X[1][1 + FILL * l] = X[0][1 + FILL * l + FILL - 1];
    for (int i = 0; i < NNEW; i++) begin
      automatic int l = i % 8, e = 1 + i / 8;
      automatic int x = $urandom_range(0, 15);
      X[1][1 + FILL * l + e] = x;
      @(negedge clk) host_we = 1; host_addr = 17'(NX + i); host_wdata = ACT_W'(x);
    end
    @(negedge clk) host_we = 0;

    // ---- tile 0 network -----------------------------------------------------------------------
    for (int ch = 8; ch < 16; ch++) begin
      tile_cfg(1, ch, {25'd0, 1'b0, 6'(1 + ch - 8)});   // north arm: inject core 0 lane ch-8
      tile_cfg(3, ch, 1);                               // west arm: inner -> outer (to RX)
      wcfg(16, (0 << 10) | (3 << 8) | ch, 1);           // switch: west out <- north in
    end
    for (int ch = 0; ch < 8; ch++) begin
      tile_cfg(4, ch, 1);                               // east arm: inner -> outer
      wcfg(16, (0 << 10) | (1 << 8) | ch, 2);           // switch: east out <- west in
    end
    for (int t = 0; t < 12; t++) begin                  // taps of cores 0 (west) and 1 (east)
      automatic int j = (t < 4 || t == 8) ? 0 : (t < 8) ? 1 : 19;
      tile_cfg(3, 128 | t, j);
      tile_cfg(4, 128 | t, j);
    end

    // ---- cores 0 and 1 ------------------------------------------------------------------------
    for (int c = 0; c < 2; c++) begin
      core_cfg(c, 0, 16'h0000, 32'h4);
      for (int b = 0; b < 8; b++) core_cfg(c, 0, 16'h1000 | b, FILL);
      for (int b = 0; b < 8; b++) core_cfg(c, 0, 16'h3000 | b, 1);     // window reuse
      core_cfg(c, 0, 16'h2000, 1);
      core_cfg(c, 1, 0, 32'(NRW << 6));
      n = 0;
      for (int p = 0; p < 4; p++) begin
        core_cfg(c, 2, n++, bi(B_WAIT_ADC));
        for (int j = 0; j < 4; j++) core_cfg(c, 2, n++, bi(B_MAC, j, p + j, j == 3));
      end
      if (c == 0) core_cfg(c, 2, n++, bi(B_F2F));
      core_cfg(c, 2, n++, bi(B_SEND, 0, 0, 0, 1, c == 1));
      core_cfg(c, 2, n++, bi(B_LOOP));
      core_cfg(c, 2, 16'h4000, 1);
    end
    for (int i = 0; i < 16; i++) core_cfg(0, 3, 16'h2000 | i, 15 - i);   // LUT
    n = 0;
    core_cfg(0, 3, n++, ci(C_WAIT_IN));
    for (int k = 0; k < 4; k++) begin
      core_cfg(0, 3, n++, ci(C_ALU, A_RELU, 0, S_BPBS, k));
      core_cfg(0, 3, n++, ci(C_ALU, A_SRA, 0, S_REG, 0, S_IMM, SH));
      core_cfg(0, 3, n++, ci(C_ALU, A_QNT, 0, S_REG, 0));
      core_cfg(0, 3, n++, ci(C_ALU, A_MOV, R_LUTA, S_REG, 0));
      core_cfg(0, 3, n++, ci(C_ALU, A_MOV, 1, S_REG, R_LUTD));
      core_cfg(0, 3, n++, ci(C_ALU, A_MOV, R_NBR, S_REG, 1));
      core_cfg(0, 3, n++, ci(C_ALU, A_MOV, R_OUT, S_REG, R_NBL));
    end
    core_cfg(0, 3, n++, ci(C_REL_IN));
    core_cfg(0, 3, n++, ci(C_LOOP));
    core_cfg(0, 3, 16'h3000, 32'h41);
    core_cfg(0, 4, 0, {6'd0, 4'd4, 9'd16, 1'b1, 12'd3});   // shortcut bypass, 4 b, latency 3

    // ---- I/O buffer: arm RX, start TX ------------------------------------------------------------
    wcfg(20, 4, 4);
    wcfg(20, 2, RX_BASE);
    wcfg(20, 3, NRX);
    wcfg(20, 0, 0);
    wcfg(20, 1, NX + NNEW);
    @(negedge clk);
    while (tx_busy || rx_busy) @(negedge clk);

    // ---- read back and compare ------------------------------------------------------------------
    for (int i = 0; i < NRX; i++) begin
      automatic int v = i / 32, k = (i / 8) % 4, m = i % 8;
      automatic int src = (m + 15) % 16;                   // left neighbour datapath
      automatic int e = 15 - yq(v, 4 * src + k);
      @(negedge clk) host_addr = 17'(RX_BASE + i);
      @(negedge clk);
      chk(int'(host_rdata) == e, $sformatf("rx %0d (vector %0d, step %0d, lane %0d): %0d expected %0d",
                                           i, v, k, m, host_rdata, e));
    end

    // ---- configuration read-back: register 1 of core 0 datapath m holds the LUT value of its last step
    for (int m = 0; m < 16; m += 5) begin
      core_cfg(0, 3, 16'h4000, 32'((m << 4) | 1));
      chk(cfg_rdata == 32'(15 - yq(NV - 1, 4 * m + 3)), $sformatf("read-back datapath %0d: %0d", m, cfg_rdata));
    end

    // ---- mechanisms and cycle counts ------------------------------------------------------------
    chk(wl_rows == 32'(NRW), $sformatf("weight rows delivered %0d", wl_rows));
    chk(n_mcast == NRW, $sformatf("multicast weight beats %0d", n_mcast));
    chk(n_pad == 1, $sformatf("padding zeros %0d", n_pad));
    chk(n_reuse == NV, $sformatf("window slides %0d", n_reuse));
    chk(n_stall > 0, "no BPBS stall");
    chk(n_f2f == NV, $sformatf("face-to-face adds %0d", n_f2f));
    chk(n_byp == FILL + FILL - 1, $sformatf("shortcut bypass elements %0d", n_byp));
    chk(n_lut == NV * 4, $sformatf("LUT reads %0d", n_lut));
    chk(n_xch == NV * 4, $sformatf("exchange reads %0d", n_xch));
    chk(n_inj > 0, "no OCN injection");
    chk(n_conv == NV * 4, $sformatf("CIMA conversions %0d, expected 4 per vector", n_conv));
    chk(conv_min >= ADC_LAT, $sformatf("conversion took %0d cycles", conv_min));
    $display("mechanisms: reuse %0d multicast %0d pad %0d stall %0d f2f %0d bypass %0d lut %0d xch %0d inject %0d conv %0d (min %0d cycles)",
             n_reuse, n_mcast, n_pad, n_stall, n_f2f, n_byp, n_lut, n_xch, n_inj, n_conv, conv_min);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
