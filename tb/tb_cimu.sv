// tb_cimu: end-to-end test of one core at reduced size (36 rows x 16 columns: 4 BPBS lanes,
// 1 CMPT datapath). Loads signed 4-b weights for 4 outputs over the weight port, programs the
// input buffer (8 banks, 20 activations, one padding row), the CIMA (AND products, 21 active
// rows), the BPBS engine (4 bit-planes x 4 weight columns, face-to-face add, send) and the CMPT
// engine (ReLU, shift right by 2, 4-b quantisation, output), then streams two random 4-b input
// vectors in bit-serially and decodes output lane 0. Each result must equal
// clip(relu(sum_r x[r]*W[r][o] + f2f[o]) >> 2, 0, 15) computed here. Finally the shortcut buffer
// is put in bypass mode and elements sent on its lane must come out round-robin on output
// lanes 16, 17, 18.
module tb_cimu;
  import imc_pkg::*;
  localparam int R = 36, C = 16, L = C / 4;
  localparam int NX = 20;

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

  cimu #(.NROW(R), .NCOL(C)) dut (.*);

  int checks = 0, failures = 0;
  int fills [8] = '{3, 3, 3, 3, 2, 2, 2, 2};
  int W [R][L];
  int X [R];
  int n_pad = 0, n_f2f = 0, n_vec = 0, n_bst = 0;
  always @(posedge clk) begin
    if (ev.pad) n_pad++;
    if (ev.f2f) n_f2f++;
    if (ev.vec_done) n_vec++;
    if (ev.bpbs_stall) n_bst++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output lane decoders (lane 0: CMPT results, 4 b; lane 16: shortcut bypass, 4 b)
  int rx0 [$], rx16 [$];
  int s0 = 0, n0 = 0;
  int s16 [4] = '{0, 0, 0, 0};
  int n16 [4] = '{0, 0, 0, 0};
  always @(negedge clk) begin
    if (out_lanes[0].vld) begin
      s0 |= int'(out_lanes[0].dat) << n0; n0++;
      if (n0 == 4) begin rx0.push_back(s0); s0 = 0; n0 = 0; end
    end
    for (int l = 0; l < 4; l++) if (out_lanes[16 + l].vld) begin
      s16[l] |= int'(out_lanes[16 + l].dat) << n16[l]; n16[l]++;
      if (n16[l] == 4) begin rx16.push_back(s16[l] | (l << 8)); s16[l] = 0; n16[l] = 0; end
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

  task automatic send_elem(int lane, int v);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk) in_lanes[lane] = '{vld: 1'b1, dat: 1'(v >> b)};
    end
    @(negedge clk) in_lanes[lane] = '0;
  endtask

  task automatic send_vector();
    int r = 1;                      // row 0 is the padding zero of bank 0
    int first [8];
    for (int b = 0; b < 8; b++) begin first[b] = r; r += fills[b]; end
    X[0] = 0;
    for (int i = 1; i < 1 + NX; i++) X[i] = $urandom_range(0, 15);
    fork
      for (int e = 0; e < fills[0]; e++) send_elem(0, X[first[0] + e]);
      for (int e = 0; e < fills[1]; e++) send_elem(1, X[first[1] + e]);
      for (int e = 0; e < fills[2]; e++) send_elem(2, X[first[2] + e]);
      for (int e = 0; e < fills[3]; e++) send_elem(3, X[first[3] + e]);
      for (int e = 0; e < fills[4]; e++) send_elem(4, X[first[4] + e]);
      for (int e = 0; e < fills[5]; e++) send_elem(5, X[first[5] + e]);
      for (int e = 0; e < fills[6]; e++) send_elem(6, X[first[6] + e]);
      for (int e = 0; e < fills[7]; e++) send_elem(7, X[first[7] + e]);
    join
  endtask

  initial begin
    int n = 0;
    int expv [L];
    cfg = '0; wl_we = 0; wl_row = '0; wl_data = '0; f2f_in_vld = 0; f2f_out_ack = 0;
    for (int l = 0; l < IN_LANES; l++) in_lanes[l] = '0;
    for (int k = 0; k < L; k++) f2f_in[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // weights
    for (int r = 0; r < R; r++) begin
      logic [C-1:0] row;
      for (int k = 0; k < L; k++) begin
        W[r][k] = $urandom_range(0, 15) - 8;
        for (int j = 0; j < 4; j++) row[4*k + j] = 1'(W[r][k] >> j);
      end
      @(negedge clk) wl_we = 1; wl_row = ROW_AW'(r); wl_data = row;
    end
    @(negedge clk) wl_we = 0;
    // input buffer: 4-b activations, fills, one padding zero in bank 0
    wcfg(0, 16'h0000, 32'h4);
    for (int b = 0; b < 8; b++) wcfg(0, 16'h1000 | b, fills[b]);
    wcfg(0, 16'h2000, 1);
    // CIMA: AND products, shift 0, 21 active rows
    wcfg(1, 0, 32'((1 + NX) << 6));
    // BPBS program
    for (int p = 0; p < 4; p++) begin
      wcfg(2, n++, bi(B_WAIT_ADC));
      for (int j = 0; j < 4; j++) wcfg(2, n++, bi(B_MAC, j, p + j, j == 3));
    end
    wcfg(2, n++, bi(B_F2F));
    wcfg(2, n++, bi(B_SEND, 0, 0, 0, 1));
    wcfg(2, n++, bi(B_LOOP));
    wcfg(2, 16'h4000, 1);
    // CMPT program
    n = 0;
    wcfg(3, n++, ci(C_WAIT_IN));
    for (int k = 0; k < 4; k++) begin
      wcfg(3, n++, ci(C_ALU, A_RELU, 0, S_BPBS, k));
      wcfg(3, n++, ci(C_ALU, A_SRA, 0, S_REG, 0, S_IMM, 2));
      wcfg(3, n++, ci(C_ALU, A_QNT, R_OUT, S_REG, 0));
    end
    wcfg(3, n++, ci(C_REL_IN));
    wcfg(3, n++, ci(C_LOOP));
    wcfg(3, 16'h3000, 32'h41);

    for (int v = 0; v < 2; v++) begin
      for (int k = 0; k < L; k++) f2f_in[k] = $urandom_range(0, 100) - 50;
      f2f_in_vld = 1;
      send_vector();
      for (int k = 0; k < L; k++) begin
        automatic int s = f2f_in[k];
        for (int r = 0; r < 1 + NX; r++) s += X[r] * W[r][k];
        s = (s < 0 ? 0 : s) >>> 2;
        expv[k] = s > 15 ? 15 : s;
      end
      while (rx0.size() < 4) @(negedge clk);
      for (int k = 0; k < L; k++) begin
        checks++;
        if (rx0[k] != expv[k]) begin failures++; $display("vector %0d output %0d: %0d expected %0d", v, k, rx0[k], expv[k]); end
      end
      rx0.delete();
    end
    // shortcut bypass: 4-b elements, latency 5, round-robin to output lanes 16..19
    wcfg(4, 0, {6'd0, 4'd4, 9'd16, 1'b1, 12'd5});
    for (int i = 0; i < 3; i++) send_elem(IB_LANES, 3 * i + 2);
    repeat (40) @(negedge clk);
    checks++;
    if (rx16.size() != 3 || rx16[0] != 2 || rx16[1] != 'h105 || rx16[2] != 'h208) begin failures++; $display("bypass lane 16 got %0d elements", rx16.size()); end
    checks++;
    if (n_pad != 3 || n_f2f != 2 || n_vec != 2) begin
      failures++; $display("pads %0d f2f %0d vectors %0d", n_pad, n_f2f, n_vec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
