// cmpt_simd: compute (CMPT) SIMD engine following the BPBS engine.
//
// MODS datapaths, each multiplexed over four BPBS lanes (datapath m sees lanes 4m..4m+3, i.e.
// 16 CIMA columns), run one instruction stream from a 128-entry instruction buffer. An ALU
// instruction reads two operands, each from a BPBS result, a shortcut-buffer element, a register
// or a 5-bit immediate, and each shifted left by 0..7 (multiplication by 2^n). The ALU does ADD,
// SUB, MUL, MAX, MIN, RELU, AVG ((a+b)>>>1), MOV, SRA (a>>>b) and QNT (clip to 0..2^obits-1).
// The result goes to a register or to the output buffer.
// Registers per datapath: 0..15 general purpose (preloadable through the configuration bus);
// 16/17 read the exchange value of the left/right neighbour datapath (writing either sets this
// datapath's own exchange value); 18 is the LUT address and 19 returns the shared LUT entry at
// that address (sigmoid, tanh, ...) with no further instruction; writing 20 pushes to the output
// buffer. WAIT_IN/REL_IN and WAIT_SC/REL_SC synchronise with the BPBS results and the shortcut
// vector; LOOP returns to entry 0.
// Config (cfg.addr[15:12]): 0 instruction buffer, 1 register preload (module addr[9:4], register
// addr[3:0]), 2 LUT entry addr[7:0], 3 control {obits[7:4], run[0]}, 4 read-out select
// {module[9:4], register[3:0]}: dbg_rdata then shows that register (for debugging).
// The datapath count, muxing, ALU functions, register file, special registers, shared LUT and
// output buffer follow the published design; encodings, widths, the LUT size (256 x 16 b) and the
// one-cycle execute are this design's choices.
module cmpt_simd
  import imc_pkg::*;
#(
  parameter int MODS = CMPT_MODS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_loc_t                 cfg,
  input  logic signed [ACC_W-1:0]  bres [4*MODS],
  input  logic                     bres_vld,
  output logic                     bres_rel,
  input  logic                     sc_vld,
  input  logic [ACT_W-1:0]         sc_vec [16*MODS],
  output logic                     sc_rel,
  output ser_t                     lanes [MODS],
  output logic                     lut_event,
  output logic                     xch_event,
  output logic                     stall_event,
  output logic signed [ACC_W-1:0]  dbg_rdata     // register selected for read-out
);
  typedef logic signed [ACC_W-1:0] word_t;

  logic        run;
  logic [3:0]  obits;
  word_t       rf   [MODS][NREG];
  word_t       xch  [MODS];
  logic [7:0]  luta [MODS];
  logic [5:0]  dbg_m;
  logic [3:0]  dbg_r;
  logic signed [LUT_W-1:0] lut [LUT_DEPTH];

  logic        issue, stall, jump0;
  logic [31:0] iraw;
  cmpt_instr_t ins;
  cfg_loc_t    seq_cfg;
  logic        obuf_full;
  logic [ACT_W-1:0] odata [MODS];
  word_t       res  [MODS];

  assign seq_cfg = '{we: cfg.we && cfg.addr[15:12] == 4'd0, addr: cfg.addr, data: cfg.data};
  simd_seq #(.DEPTH(IMEM_DEPTH), .IW(32)) u_seq (
    .clk, .rst_n, .cfg(seq_cfg), .run, .stall, .jump0, .issue, .instr(iraw), .n_issued());

  assign ins   = cmpt_instr_t'(iraw);
  assign jump0 = (ins.op == C_LOOP);

  always_comb begin
    stall = 1'b0;
    if (issue) begin
      unique case (ins.op)
        C_WAIT_IN: stall = !bres_vld;
        C_WAIT_SC: stall = !sc_vld;
        C_ALU:     stall = (int'(ins.dst) == R_OUT) && obuf_full;
        default:   stall = 1'b0;
      endcase
    end
  end
  wire exec = issue && !stall;
  assign bres_rel    = exec && ins.op == C_REL_IN;
  assign sc_rel      = exec && ins.op == C_REL_SC;
  assign stall_event = issue && stall;

  function automatic word_t rd_reg(int m, logic [4:0] r);
    unique case (int'(r))
      R_NBL:   return xch[(m + MODS - 1) % MODS];
      R_NBR:   return xch[(m + 1) % MODS];
      R_LUTA:  return word_t'(luta[m]);
      R_LUTD:  return word_t'(lut[luta[m]]);
      default: return (int'(r) < NREG) ? rf[m][r[3:0]] : '0;
    endcase
  endfunction

  function automatic word_t operand(int m, src_e s, logic [4:0] r, logic [2:0] sh);
    word_t v;
    unique case (s)
      S_BPBS:  v = bres[4*m + int'(r[1:0])];
      S_SC:    v = word_t'({1'b0, sc_vec[16*m + int'(r[3:0])]});
      S_REG:   v = rd_reg(m, r);
      default: v = word_t'(r);
    endcase
    return v <<< sh;
  endfunction

  function automatic word_t alu(alu_e op, word_t a, word_t b);
    word_t mx;
    mx = word_t'((1 << obits) - 1);
    unique case (op)
      A_ADD:   return a + b;
      A_SUB:   return a - b;
      A_MUL:   return a * b;
      A_MAX:   return (a > b) ? a : b;
      A_MIN:   return (a < b) ? a : b;
      A_RELU:  return (a < 0) ? '0 : a;
      A_AVG:   return (a + b) >>> 1;
      A_SRA:   return a >>> b[4:0];
      A_QNT:   return (a < 0) ? '0 : ((a > mx) ? mx : a);
      default: return a;   // A_MOV
    endcase
  endfunction

  always_comb begin
    for (int m = 0; m < MODS; m++) begin
      res[m]   = alu(ins.alu, operand(m, ins.sa, ins.ra, ins.sha), operand(m, ins.sb, ins.rb, ins.shb));
      odata[m] = res[m][ACT_W-1:0];
    end
  end

  wire do_alu = exec && ins.op == C_ALU;
  assign lut_event = do_alu && (int'(ins.ra) == R_LUTD && ins.sa == S_REG);
  assign xch_event = do_alu && ((int'(ins.ra) == R_NBL || int'(ins.ra) == R_NBR) && ins.sa == S_REG);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      dbg_m <= '0;
      dbg_r <= '0;
      obits <= 4'd4;
      for (int m = 0; m < MODS; m++) begin
        xch[m]  <= '0;
        luta[m] <= '0;
        for (int r = 0; r < NREG; r++) rf[m][r] <= '0;
      end
      for (int i = 0; i < LUT_DEPTH; i++) lut[i] <= '0;
    end else begin
      if (cfg.we) begin
        unique case (cfg.addr[15:12])
          4'd1: rf[int'(cfg.addr[9:4]) % MODS][cfg.addr[3:0]] <= cfg.data;
          4'd2: lut[cfg.addr[7:0]] <= cfg.data[LUT_W-1:0];
          4'd3: {obits, run} <= {cfg.data[7:4], cfg.data[0]};
          4'd4: {dbg_m, dbg_r} <= cfg.data[9:0];
          default: ;
        endcase
      end
      if (do_alu) begin
        for (int m = 0; m < MODS; m++) begin
          if (int'(ins.dst) < NREG)                          rf[m][ins.dst[3:0]] <= res[m];
          else if (int'(ins.dst) == R_NBL || int'(ins.dst) == R_NBR) xch[m]  <= res[m];
          else if (int'(ins.dst) == R_LUTA)                  luta[m] <= res[m][7:0];
        end
      end
    end
  end

  assign dbg_rdata = rf[int'(dbg_m) % MODS][dbg_r];

  out_buffer #(.NLANE(MODS), .DEPTH(OBUF_DEPTH)) u_obuf (
    .clk, .rst_n, .bits(obits), .push(do_alu && int'(ins.dst) == R_OUT), .data(odata),
    .full(obuf_full), .lanes);

endmodule
