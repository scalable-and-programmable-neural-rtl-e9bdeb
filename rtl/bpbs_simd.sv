// bpbs_simd: bit-parallel/bit-serial (BPBS) reconstruction SIMD engine.
//
// LANES datapaths, each serving four adjacent CIMA columns (lane k owns columns 4k..4k+3, one
// column per weight bit for 4-b weights). All lanes execute the same instruction from a
// 128-entry instruction buffer (simd_seq), one per cycle:
//   WAIT_ADC  stall until the CIMA has a new vector of ADC codes, latch it and release the CIMA
//   MAC       x = code (or shortcut element) of column 4k+col; v = x*gain[k] + offset[k]
//             (ADC gain/offset correction, batch-norm scale and bias); acc +/-= v << sh with
//             sh = shift (+ local exponent lexp[k]); the shift applies the binary weight
//             2^(input bit + weight bit) and neg the sign of a two's-complement weight MSB
//   F2F       stall until the face-to-face neighbour core offers its partial sums, add them
//   SEND      hand all accumulators to the CMPT SIMD (or, with f2f, to the neighbour core),
//             stalling while the previous hand-off is still unread; clr clears the accumulators
//   CLR, WAIT_SC / REL_SC (shortcut vector), NOP (pipeline alignment), LOOP (back to entry 0)
// Config (cfg.addr[15:12]): 0 instruction buffer, 1 gain[addr[5:0]], 2 offset, 3 local
// exponent, 4 run (data[0]). Lane/column muxing, the instruction buffer size, the
// shift-and-scale and barrel-shift stages, the accumulator, the shortcut input and the F2F input
// follow the published design. The instruction encoding, the stall handshakes and a one-cycle
// execute (the stages are not pipelined here, so there are no hazards) are this design's choices.
// The hand-off assertion at the end samples rst_n on the clock (disable iff), so lint reports rst_n
// as used both synchronously and asynchronously; no flop uses it synchronously.
module bpbs_simd
  import imc_pkg::*;
#(
  parameter int LANES = BPBS_LANES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_loc_t                 cfg,
  // CIMA
  input  logic                     adc_vld,
  output logic                     adc_ack,
  input  logic [ADC_BITS-1:0]      adc [4*LANES],
  // shortcut buffer
  input  logic                     sc_vld,
  input  logic [ACT_W-1:0]         sc_vec [4*LANES],
  output logic                     sc_rel,
  // face-to-face connection
  input  logic signed [ACC_W-1:0]  f2f_in [LANES],
  input  logic                     f2f_in_vld,
  output logic                     f2f_in_ack,
  output logic signed [ACC_W-1:0]  f2f_out [LANES],
  output logic                     f2f_out_vld,
  input  logic                     f2f_out_ack,
  // to the CMPT SIMD
  output logic signed [ACC_W-1:0]  res [LANES],
  output logic                     res_vld,
  input  logic                     res_rel,
  // activity
  output logic                     stall_event,
  output logic                     f2f_event
);
  logic              run;
  logic [7:0]        gain   [LANES];
  logic signed [15:0] offset [LANES];
  logic [3:0]        lexp   [LANES];
  logic [ADC_BITS-1:0] adc_q [4*LANES];
  logic signed [ACC_W-1:0] acc [LANES];

  logic        issue, stall, jump0;
  logic [31:0] iraw;
  bpbs_instr_t ins;
  cfg_loc_t    seq_cfg;

  assign seq_cfg = '{we: cfg.we && cfg.addr[15:12] == 4'd0, addr: cfg.addr, data: cfg.data};

  simd_seq #(.DEPTH(IMEM_DEPTH), .IW(32)) u_seq (
    .clk, .rst_n, .cfg(seq_cfg), .run, .stall, .jump0, .issue, .instr(iraw), .n_issued());

  assign ins   = bpbs_instr_t'(iraw);
  assign jump0 = (ins.op == B_LOOP);

  always_comb begin
    stall = 1'b0;
    if (issue) begin
      unique case (ins.op)
        B_WAIT_ADC: stall = !adc_vld;
        B_F2F:      stall = !f2f_in_vld;
        B_SEND:     stall = ins.f2f ? f2f_out_vld : res_vld;
        B_WAIT_SC:  stall = !sc_vld;
        default:    stall = 1'b0;
      endcase
    end
  end

  wire exec = issue && !stall;
  assign adc_ack     = exec && ins.op == B_WAIT_ADC;
  assign f2f_in_ack  = exec && ins.op == B_F2F;
  assign sc_rel      = exec && ins.op == B_REL_SC;
  assign stall_event = issue && stall;
  assign f2f_event   = f2f_in_ack;

  // configuration of the lane registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      for (int k = 0; k < LANES; k++) begin
        gain[k]   <= 8'd1;
        offset[k] <= '0;
        lexp[k]   <= '0;
      end
    end else if (cfg.we) begin
      unique case (cfg.addr[15:12])
        4'd1: gain[cfg.addr[5:0]]   <= cfg.data[7:0];
        4'd2: offset[cfg.addr[5:0]] <= cfg.data[15:0];
        4'd3: lexp[cfg.addr[5:0]]   <= cfg.data[3:0];
        4'd4: run                   <= cfg.data[0];
        default: ;
      endcase
    end
  end

  // shift-and-scale followed by the barrel shifter, per lane
  function automatic logic signed [ACC_W-1:0] term(int k);
    logic signed [ACC_W-1:0] x, v;
    logic [5:0] sh;
    x  = ins.src ? ACC_W'(sc_vec[4*k + int'(ins.col)]) : ACC_W'(adc_q[4*k + int'(ins.col)]);
    v  = x * $signed({24'd0, gain[k]}) + ACC_W'(offset[k]);
    sh = {1'b0, ins.shift} + (ins.lexp ? {2'b0, lexp[k]} : 6'd0);
    v  = v <<< sh;
    return ins.neg ? -v : v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_vld     <= 1'b0;
      f2f_out_vld <= 1'b0;
      for (int k = 0; k < LANES; k++) begin
        acc[k]     <= '0;
        res[k]     <= '0;
        f2f_out[k] <= '0;
      end
      for (int c = 0; c < 4*LANES; c++) adc_q[c] <= '0;
    end else begin
      if (res_rel)     res_vld     <= 1'b0;
      if (f2f_out_ack) f2f_out_vld <= 1'b0;
      if (exec) begin
        unique case (ins.op)
          B_WAIT_ADC: adc_q <= adc;
          B_MAC:      for (int k = 0; k < LANES; k++) acc[k] <= acc[k] + term(k);
          B_F2F:      for (int k = 0; k < LANES; k++) acc[k] <= acc[k] + f2f_in[k];
          B_CLR:      for (int k = 0; k < LANES; k++) acc[k] <= '0;
          B_SEND: begin
            for (int k = 0; k < LANES; k++) begin
              if (ins.f2f) f2f_out[k] <= acc[k];
              else         res[k]     <= acc[k];
              if (ins.clr) acc[k]     <= '0;
            end
            if (ins.f2f) f2f_out_vld <= 1'b1;
            else         res_vld     <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // a hand-off is never overwritten before it was read
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
      exec && ins.op == B_SEND && !ins.f2f |-> !res_vld || res_rel);

endmodule
