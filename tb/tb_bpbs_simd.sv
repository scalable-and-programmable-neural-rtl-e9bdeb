// tb_bpbs_simd: self-checking test of the BPBS SIMD engine with 4 lanes (16 columns).
// Runs the reconstruction program for 4-b activations x 4-b two's-complement weights (four
// bit-planes, four columns per lane, MSB column subtracted) with random ADC codes, per-lane
// gain/offset and local exponents, then adds face-to-face partial sums and a shifted shortcut
// element, sends the result to both the face-to-face port and the CMPT side, and compares each
// lane with a sum computed here. Random gaps between ADC vectors exercise the stall; without
// gaps the program must take exactly one cycle per instruction.
module tb_bpbs_simd;
  import imc_pkg::*;
  localparam int L = 4, NC = 4 * L;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_loc_t cfg;
  logic adc_vld, adc_ack, sc_vld, sc_rel, f2f_in_vld, f2f_in_ack, f2f_out_vld, f2f_out_ack;
  logic res_vld, res_rel, stall_event, f2f_event;
  logic [ADC_BITS-1:0] adc [NC];
  logic [ACT_W-1:0] sc_vec [NC];
  logic signed [ACC_W-1:0] f2f_in [L], f2f_out [L], res [L];

  bpbs_simd #(.LANES(L)) dut (.*);

  int checks = 0, failures = 0, stalls = 0, f2fs = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (stall_event) stalls++;
    if (f2f_event) f2fs++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] bi(bpbs_op_e op, int col = 0, int sh = 0, bit neg = 0,
                                     bit src = 0, bit lexp = 0, bit clr = 0, bit f2f = 0);
    bpbs_instr_t i;
    i = '0;
    i.op = op; i.col = 2'(col); i.shift = 5'(sh); i.neg = neg; i.src = src;
    i.lexp = lexp; i.clr = clr; i.f2f = f2f;
    return 32'(i);
  endfunction

  task automatic wcfg(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: a, data: d};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  int codes [4][NC];
  int gain [L], offs [L], lex [L];
  longint expv [L];
  int n_prog;

  task automatic one_run(int gapmax, output int took);
    int t0;
    for (int p = 0; p < 4; p++) for (int c = 0; c < NC; c++) codes[p][c] = $urandom_range(0, 255);
    for (int k = 0; k < L; k++) begin
      f2f_in[k] = $signed($urandom_range(0, 2000)) - 1000;
      expv[k] = f2f_in[k];
    end
    for (int c = 0; c < NC; c++) sc_vec[c] = ACT_W'($urandom_range(0, 255));
    for (int k = 0; k < L; k++) begin
      for (int p = 0; p < 4; p++)
        for (int j = 0; j < 4; j++) begin
          longint v = (longint'(codes[p][4*k + j]) * gain[k] + offs[k]) <<< (p + j);
          expv[k] += (j == 3) ? -v : v;
        end
      expv[k] += (longint'(sc_vec[4*k + 1]) * gain[k] + offs[k]) <<< (2 + lex[k]);
    end
    f2f_in_vld = 1; sc_vld = 1;
    t0 = -1;
    for (int p = 0; p < 4; p++) begin
      @(negedge clk);
      for (int c = 0; c < NC; c++) adc[c] = ADC_BITS'(codes[p][c]);
      adc_vld = 1;
      do @(posedge clk); while (!adc_ack);
      if (t0 < 0) t0 = cyc;
      @(negedge clk) adc_vld = 0;
      repeat ($urandom_range(0, gapmax)) @(negedge clk);
    end
    while (!res_vld) @(negedge clk);
    took = cyc - t0;
    for (int k = 0; k < L; k++) begin
      checks += 2;
      if (longint'(res[k]) != expv[k]) begin failures++; $display("lane %0d res %0d expected %0d", k, res[k], expv[k]); end
      if (longint'(f2f_out[k]) != expv[k]) begin failures++; $display("lane %0d f2f_out %0d expected %0d", k, f2f_out[k], expv[k]); end
    end
    checks++;
    if (!f2f_out_vld) begin failures++; $display("f2f_out not valid"); end
    @(negedge clk) res_rel = 1; f2f_out_ack = 1;
    @(negedge clk) res_rel = 0; f2f_out_ack = 0;
  endtask

  initial begin
    int took;
    cfg = '0; adc_vld = 0; sc_vld = 0; f2f_in_vld = 0; f2f_out_ack = 0; res_rel = 0;
    for (int c = 0; c < NC; c++) begin adc[c] = '0; sc_vec[c] = '0; end
    for (int k = 0; k < L; k++) f2f_in[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < L; k++) begin
      gain[k] = $urandom_range(1, 4); offs[k] = $urandom_range(0, 40) - 20; lex[k] = $urandom_range(0, 3);
      wcfg(16'h1000 | 16'(k), 32'(gain[k]));
      wcfg(16'h2000 | 16'(k), 32'(offs[k]));
      wcfg(16'h3000 | 16'(k), 32'(lex[k]));
    end
    n_prog = 0;
    for (int p = 0; p < 4; p++) begin
      wcfg(16'(n_prog++), bi(B_WAIT_ADC));
      for (int j = 0; j < 4; j++) wcfg(16'(n_prog++), bi(B_MAC, j, p + j, j == 3));
    end
    wcfg(16'(n_prog++), bi(B_F2F));
    wcfg(16'(n_prog++), bi(B_WAIT_SC));
    wcfg(16'(n_prog++), bi(B_MAC, 1, 2, 0, 1, 1));
    wcfg(16'(n_prog++), bi(B_REL_SC));
    wcfg(16'(n_prog++), bi(B_SEND, 0, 0, 0, 0, 0, 0, 1));
    wcfg(16'(n_prog++), bi(B_SEND, 0, 0, 0, 0, 0, 1, 0));
    wcfg(16'(n_prog++), bi(B_LOOP));
    wcfg(16'h4000, 32'h1);                         // run
    one_run(0, took);
    // from the cycle plane 0 is acknowledged, one cycle per instruction up to the second SEND
    checks++;
    if (took != n_prog - 1) begin failures++; $display("program took %0d cycles, expected %0d", took, n_prog - 1); end
    for (int r = 0; r < 3; r++) one_run(6, took);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    checks++;
    if (f2fs != 4) begin failures++; $display("f2f adds %0d, expected 4", f2fs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
