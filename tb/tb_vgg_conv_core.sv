// tb_vgg_conv_core: one full-size core (1152 x 256 cells, default parameters) computing one output
// pixel of a 3x3 convolution with 128 input and 64 output channels, 4-b weights and activations,
// the layer shape of the CIFAR-10 VGG-style network's 128-channel layers.
// The flattened 3x3x128 kernel fills all 1152 rows; the eight input-buffer banks take 144
// activations each. Column counts reach about 300, so the ADC range is set to count >> 2; the
// expected result models that quantisation bit-exactly: for every input plane p, weight bit j and
// output k, code = min(255, (sum_r x_r[p] & w_rk[j]) >> 2), y_k = sum +/-code << (p + j) (minus for
// the weight sign bit). The CMPT engine applies ReLU, a right shift by 6 and 4-b quantisation, and
// each of its 16 datapaths sends its four outputs on its own lane. Two pixels are run; every
// output is checked, and so is the number of array conversions (4 per pixel, >= ADC_LAT cycles).
module tb_vgg_conv_core;
  import imc_pkg::*;
  localparam int R = ROWS, C = COLS, L = C / 4, M = L / 4;
  localparam int FILL = R / IB_LANES;
  localparam int SH = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_req_t cfg;
  ser_t in_lanes [IN_LANES];
  ser_t out_lanes [OUT_LANES];
  logic wl_we;
  logic [ROW_AW-1:0] wl_row;
  logic [C-1:0] wl_data;
  logic signed [ACC_W-1:0] f2f_in [L], f2f_out [L];
  logic f2f_in_vld, f2f_in_ack, f2f_out_vld, f2f_out_ack;
  core_ev_t ev;
  logic signed [ACC_W-1:0] dbg_rdata;

  cimu dut (.*);

  int checks = 0, failures = 0;
  logic [3:0] W [R][L];
  logic [3:0] X [R];
  int n_conv = 0, t0 = 0, tmin = 1 << 30;
  int hist [16];

  always @(posedge clk) if (rst_n) begin
    if (dut.pl_vld && dut.pl_rdy) t0 = $time / 10;
    if (dut.adc_vld && dut.adc_ack) begin
      n_conv++;
      if ($time / 10 - t0 < tmin) tmin = $time / 10 - t0;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output decoders, one per CMPT datapath lane, 4-b elements
  int rx [M][$];
  int sacc [M], nacc [M];
  always @(negedge clk) begin
    for (int m = 0; m < M; m++) if (out_lanes[m].vld) begin
      sacc[m] |= int'(out_lanes[m].dat) << nacc[m];
      nacc[m]++;
      if (nacc[m] == 4) begin rx[m].push_back(sacc[m]); sacc[m] = 0; nacc[m] = 0; end
    end
  end

  task automatic wcfg(int unit, int a, logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: 24'((unit << 16) | a), data: d};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask
  function automatic logic [31:0] bi(bpbs_op_e op, int col = 0, int sh = 0, bit neg = 0, bit clr = 0);
    bpbs_instr_t i;
    i = '0; i.op = op; i.col = 2'(col); i.shift = 5'(sh); i.neg = neg; i.clr = clr;
    return 32'(i);
  endfunction
  function automatic logic [31:0] ci(cmpt_op_e op, alu_e a = A_MOV, int dst = 0, src_e sa = S_REG,
                                     int ra = 0, src_e sb = S_IMM, int rb = 0);
    cmpt_instr_t i;
    i = '0; i.op = op; i.alu = a; i.dst = 5'(dst); i.sa = sa; i.ra = 5'(ra); i.sb = sb; i.rb = 5'(rb);
    return 32'(i);
  endfunction

  task automatic send_lane(int b);
    for (int e = 0; e < FILL; e++)
      for (int i = 0; i < 4; i++) begin
        @(negedge clk) in_lanes[b] = '{vld: 1'b1, dat: X[b * FILL + e][i]};
      end
    @(negedge clk) in_lanes[b] = '0;
  endtask

  function automatic int expect_out(int k);
    int y = 0;
    for (int p = 0; p < 4; p++)
      for (int j = 0; j < 4; j++) begin
        int cnt = 0, code;
        for (int r = 0; r < R; r++) cnt += int'(X[r][p] & W[r][k][j]);
        code = cnt >> 2;
        if (code > 255) code = 255;
        y += (j == 3 ? -code : code) << (p + j);
      end
    y = (y < 0 ? 0 : y) >>> SH;
    return y > 15 ? 15 : y;
  endfunction

  initial begin
    int n;
    cfg = '0; wl_we = 0; wl_row = '0; wl_data = '0; f2f_in_vld = 0; f2f_out_ack = 0;
    for (int l = 0; l < IN_LANES; l++) in_lanes[l] = '0;
    for (int k = 0; k < L; k++) f2f_in[k] = '0;
    for (int m = 0; m < M; m++) begin sacc[m] = 0; nacc[m] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++) begin
      logic [C-1:0] row;
      for (int k = 0; k < L; k++) begin
        W[r][k] = 4'(int'($urandom_range(0, 14)) - 7);   // zero-mean signed weights
        for (int j = 0; j < 4; j++) row[4*k + j] = W[r][k][j];
      end
      @(negedge clk) wl_we = 1; wl_row = ROW_AW'(r); wl_data = row;
    end
    @(negedge clk) wl_we = 0;
    wcfg(0, 16'h0000, 32'h4);
    for (int b = 0; b < 8; b++) wcfg(0, 16'h1000 | b, FILL);
    wcfg(1, 0, 32'((R << 6) | (2 << 2)));          // all rows, ADC shift 2, AND mode
    n = 0;
    for (int p = 0; p < 4; p++) begin
      wcfg(2, n++, bi(B_WAIT_ADC));
      for (int j = 0; j < 4; j++) wcfg(2, n++, bi(B_MAC, j, p + j, j == 3));
    end
    wcfg(2, n++, bi(B_SEND, 0, 0, 0, 1));
    wcfg(2, n++, bi(B_LOOP));
    wcfg(2, 16'h4000, 1);
    n = 0;
    wcfg(3, n++, ci(C_WAIT_IN));
    for (int k = 0; k < 4; k++) begin
      wcfg(3, n++, ci(C_ALU, A_RELU, 0, S_BPBS, k));
      wcfg(3, n++, ci(C_ALU, A_SRA, 0, S_REG, 0, S_IMM, SH));
      wcfg(3, n++, ci(C_ALU, A_QNT, R_OUT, S_REG, 0));
    end
    wcfg(3, n++, ci(C_REL_IN));
    wcfg(3, n++, ci(C_LOOP));
    wcfg(3, 16'h3000, 32'h41);

    for (int px = 0; px < 2; px++) begin
      for (int r = 0; r < R; r++) X[r] = 4'($urandom_range(0, 15));
      fork
        send_lane(0); send_lane(1); send_lane(2); send_lane(3);
        send_lane(4); send_lane(5); send_lane(6); send_lane(7);
      join
      for (int m = 0; m < M; m++) while (rx[m].size() < 4) @(negedge clk);
      for (int m = 0; m < M; m++)
        for (int k = 0; k < 4; k++) begin
          automatic int e = expect_out(4 * m + k);
          hist[e]++;
          checks++;
          if (rx[m][k] != e) begin
            failures++; $display("pixel %0d output %0d: %0d expected %0d", px, 4 * m + k, rx[m][k], e);
          end
        end
      for (int m = 0; m < M; m++) rx[m].delete();
    end
    checks++;
    $display("expected-value histogram %p", hist);
    // the outputs must spread over the 4-b range, not sit at the clip limits
    begin
      automatic int used = 0;
      for (int v = 1; v < 15; v++) if (hist[v] != 0) used++;
      checks++;
      if (used < 6) begin failures++; $display("only %0d unclipped output values seen", used); end
    end
    checks++;
    if (n_conv != 8 || tmin < ADC_LAT) begin
      failures++; $display("conversions %0d, shortest %0d cycles", n_conv, tmin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
