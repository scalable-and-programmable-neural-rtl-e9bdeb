// tb_cmpt_simd: self-checking test of the CMPT SIMD engine with 2 datapaths (8 BPBS lanes).
// The program combines two 4-b-weight lanes into an 8-b-weight result (shift by 4 and add),
// max-pools two lanes, averages, adds a shortcut element (residual merge), applies ReLU and a
// right shift, exchanges the value with the neighbouring datapath, looks it up in the shared LUT,
// multiplies by a preloaded register constant and quantises two results to 8 bits into the
// output buffer. The output lanes are decoded here and compared with values computed here from
// the same inputs. Several rounds with random data; the LUT and exchange reads are counted.
module tb_cmpt_simd;
  import imc_pkg::*;
  localparam int M = 2, NL = 4 * M, NS = 16 * M;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_loc_t cfg;
  logic signed [ACC_W-1:0] bres [NL];
  logic bres_vld, bres_rel, sc_vld, sc_rel, lut_event, xch_event, stall_event;
  logic [ACT_W-1:0] sc_vec [NS];
  ser_t lanes [M];
  logic signed [ACC_W-1:0] dbg_rdata;

  cmpt_simd #(.MODS(M)) dut (.*);

  int checks = 0, failures = 0, luts = 0, xchs = 0;
  always @(posedge clk) begin
    if (lut_event) luts++;
    if (xch_event) xchs++;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output lane decoder
  int rx [M][$];
  int sh [M], nb [M];
  always @(negedge clk) begin
    for (int m = 0; m < M; m++)
      if (lanes[m].vld) begin
        sh[m] |= int'(lanes[m].dat) << nb[m];
        nb[m]++;
        if (nb[m] == 8) begin rx[m].push_back(sh[m]); sh[m] = 0; nb[m] = 0; end
      end
  end

  function automatic logic [31:0] ci(cmpt_op_e op, alu_e a = A_MOV, int dst = 0, src_e sa = S_REG,
                                     int ra = 0, int sha = 0, src_e sb = S_IMM, int rb = 0, int shb = 0);
    cmpt_instr_t i;
    i = '0;
    i.op = op; i.alu = a; i.dst = 5'(dst); i.sa = sa; i.ra = 5'(ra); i.sha = 3'(sha);
    i.sb = sb; i.rb = 5'(rb); i.shb = 3'(shb);
    return 32'(i);
  endfunction

  task automatic wcfg(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: a, data: d};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  int n = 0;
  task automatic p(logic [31:0] w);
    wcfg(16'(n++), w);
  endtask

  function automatic int lutf(int i);
    return (i * 7 + 3) & 255;
  endfunction
  function automatic int q8(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  int kconst [M];
  int exp1 [M], exp2 [M];

  initial begin
    cfg = '0; bres_vld = 0; sc_vld = 0;
    for (int i = 0; i < NL; i++) bres[i] = '0;
    for (int i = 0; i < NS; i++) sc_vec[i] = '0;
    for (int m = 0; m < M; m++) begin sh[m] = 0; nb[m] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < LUT_DEPTH; i++) wcfg(16'h2000 | 16'(i), 32'(lutf(i)));
    for (int m = 0; m < M; m++) begin
      kconst[m] = $urandom_range(1, 5);
      wcfg(16'h1000 | 16'(m << 4) | 16'd9, 32'(kconst[m]));
    end
    p(ci(C_WAIT_IN));
    p(ci(C_WAIT_SC));
    p(ci(C_ALU, A_ADD, 1, S_BPBS, 0, 0, S_BPBS, 1, 4));     // r1 = b0 + (b1 << 4)
    p(ci(C_ALU, A_MAX, 2, S_BPBS, 2, 0, S_BPBS, 3, 0));     // r2 = max(b2, b3)
    p(ci(C_ALU, A_AVG, 3, S_REG, 1, 0, S_REG, 2, 0));       // r3 = (r1 + r2) >>> 1
    p(ci(C_ALU, A_ADD, 4, S_REG, 3, 0, S_SC, 3, 1));        // r4 = r3 + (sc[16m+3] << 1)
    p(ci(C_ALU, A_RELU, 5, S_REG, 4));                      // r5 = relu(r4)
    p(ci(C_ALU, A_SRA, 5, S_REG, 5, 0, S_IMM, 3, 0));       // r5 >>>= 3
    p(ci(C_ALU, A_MOV, R_NBL, S_REG, 5));                   // offer r5 to the neighbours
    p(ci(C_ALU, A_MOV, 6, S_REG, R_NBR));                   // r6 = right neighbour's r5
    p(ci(C_ALU, A_MOV, R_LUTA, S_REG, 5));                  // LUT address = r5
    p(ci(C_ALU, A_MOV, 7, S_REG, R_LUTD));                  // r7 = LUT[r5]
    p(ci(C_ALU, A_AVG, 8, S_REG, 7, 0, S_REG, 6, 0));       // r8 = (r7 + r6) >>> 1
    p(ci(C_ALU, A_QNT, R_OUT, S_REG, 8));                   // out <= q8(r8)
    p(ci(C_ALU, A_MUL, 10, S_REG, 9, 0, S_BPBS, 0, 0));     // r10 = k * b0
    p(ci(C_ALU, A_MIN, 10, S_REG, 10, 0, S_IMM, 29, 0));    // r10 = min(r10, 29)
    p(ci(C_ALU, A_QNT, R_OUT, S_REG, 10));                  // out <= q8(r10)
    p(ci(C_REL_IN));
    p(ci(C_REL_SC));
    p(ci(C_LOOP));
    wcfg(16'h3000, 32'h81);                                  // obits 8, run

    for (int round = 0; round < 5; round++) begin
      int r5 [M];
      @(negedge clk);
      for (int i = 0; i < NL; i++) bres[i] = $signed($urandom_range(0, 100)) - 30;
      for (int i = 0; i < NS; i++) sc_vec[i] = ACT_W'($urandom_range(0, 63));
      for (int m = 0; m < M; m++) begin
        int r1, r2, r3, r4;
        r1 = bres[4*m] + (bres[4*m+1] <<< 4);
        r2 = bres[4*m+2] > bres[4*m+3] ? bres[4*m+2] : bres[4*m+3];
        r3 = (r1 + r2) >>> 1;
        r4 = r3 + (int'(sc_vec[16*m+3]) << 1);
        r5[m] = (r4 < 0 ? 0 : r4) >>> 3;
      end
      for (int m = 0; m < M; m++) begin
        exp1[m] = q8((lutf(r5[m] & 255) + r5[(m + 1) % M]) >>> 1);
        exp2[m] = q8((kconst[m] * bres[4*m]) < 29 ? kconst[m] * bres[4*m] : 29);
      end
      bres_vld = 1; sc_vld = 1;
      while (!bres_rel) @(negedge clk);
      bres_vld = 0;
      while (!sc_rel) @(negedge clk);
      sc_vld = 0;
      repeat (20) @(negedge clk);
      for (int m = 0; m < M; m++) begin
        checks += 3;
        if (rx[m].size() != 2) begin
          failures++; $display("round %0d module %0d: %0d outputs", round, m, rx[m].size());
        end else begin
          if (rx[m][0] != exp1[m]) begin failures++; $display("round %0d module %0d: out0 %0d expected %0d", round, m, rx[m][0], exp1[m]); end
          if (rx[m][1] != exp2[m]) begin failures++; $display("round %0d module %0d: out1 %0d expected %0d", round, m, rx[m][1], exp2[m]); end
        end
        rx[m].delete();
      end
    end
    checks++;
    if (luts != 5 || xchs != 5) begin failures++; $display("lut reads %0d, exchanges %0d", luts, xchs); end
    // read-out of the preloaded constants through the configuration path
    for (int m = 0; m < M; m++) begin
      wcfg(16'h4000, 32'((m << 4) | 9));
      checks++;
      if (dbg_rdata != kconst[m]) begin failures++; $display("read-out module %0d: %0d expected %0d", m, dbg_rdata, kconst[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
