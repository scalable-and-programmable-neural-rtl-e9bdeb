// cimu: one compute-in-memory unit (core).
//
// Data enters on IN_LANES bit-serial lanes: lanes 0..7 feed the eight line buffers of the input
// buffer, lanes 8..11 the shortcut buffer. The input buffer sends each assembled input vector to
// the CIMA as bit-planes; the CIMA returns 256 ADC codes per plane; the BPBS SIMD combines them
// (shift, scale, accumulate, optionally add partial sums from the face-to-face neighbour) into
// multi-bit inner products; the CMPT SIMD applies element-wise and cross-element operations and
// quantises; its output buffer drives output lanes 0..15. The shortcut buffer either supplies
// both SIMD engines or, in bypass mode, drives output lanes 16..19 directly. Weights arrive one
// row per cycle on the weight-loading port.
// Config: cfg.addr[18:16] selects 0 input buffer, 1 CIMA control {active_rows[17:6],
// adc_shift[5:2], ext[1], xnor[0]}, 2 BPBS SIMD, 3 CMPT SIMD, 4 shortcut buffer; cfg.addr[15:0]
// is the address inside that unit. The composition follows the published core; lane counts and
// the address map are this design's choices.
module cimu
  import imc_pkg::*;
#(
  parameter int NROW = ROWS,
  parameter int NCOL = COLS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cfg_req_t                 cfg,          // we already qualified for this core
  input  ser_t                     in_lanes  [IN_LANES],
  output ser_t                     out_lanes [OUT_LANES],
  // weight loading
  input  logic                     wl_we,
  input  logic [ROW_AW-1:0]        wl_row,
  input  logic [NCOL-1:0]          wl_data,
  // face-to-face connection
  input  logic signed [ACC_W-1:0]  f2f_in [NCOL/4],
  input  logic                     f2f_in_vld,
  output logic                     f2f_in_ack,
  output logic signed [ACC_W-1:0]  f2f_out [NCOL/4],
  output logic                     f2f_out_vld,
  input  logic                     f2f_out_ack,
  output core_ev_t                 ev,
  output logic signed [ACC_W-1:0]  dbg_rdata     // CMPT register selected for read-out
);
  localparam int LANES = NCOL / 4;
  localparam int MODS  = LANES / 4;

  cfg_loc_t sub [5];
  for (genvar u = 0; u < 5; u++) begin : g_cfg
    assign sub[u] = '{we: cfg.we && int'(cfg.addr[18:16]) == u, addr: cfg.addr[15:0], data: cfg.data};
  end

  // CIMA control register
  logic            c_xnor, c_ext;
  logic [3:0]      c_shift;
  logic [ROW_AW:0] c_rows;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_xnor  <= 1'b0;
      c_ext   <= 1'b0;
      c_shift <= '0;
      c_rows  <= (ROW_AW+1)'(NROW);
    end else if (sub[1].we) begin
      {c_rows, c_shift, c_ext, c_xnor} <= cfg.data[ROW_AW+6:0];
    end
  end

  ser_t ib_lanes [IB_LANES];
  ser_t sc_in    [SC_LANES];
  ser_t sc_out   [SC_LANES];
  ser_t cm_out   [MODS];
  for (genvar l = 0; l < IB_LANES; l++) begin : g_ibl
    assign ib_lanes[l] = in_lanes[l];
  end
  for (genvar l = 0; l < SC_LANES; l++) begin : g_scl
    assign sc_in[l]                = in_lanes[IB_LANES + l];
    assign out_lanes[OUT_LANES - SC_LANES + l] = sc_out[l];
  end
  for (genvar l = 0; l < OUT_LANES - SC_LANES; l++) begin : g_cml
    if (l < MODS) begin : g_on
      assign out_lanes[l] = cm_out[l];
    end else begin : g_off
      assign out_lanes[l] = '0;
    end
  end

  // input buffer -> CIMA
  logic              pl_vld, pl_rdy;
  logic [2*NROW-1:0] plane;
  input_buffer #(.NROW(NROW), .NBANK(IB_LANES)) u_ib (
    .clk, .rst_n, .cfg(sub[0]), .lanes(ib_lanes), .plane_vld(pl_vld), .plane_rdy(pl_rdy),
    .plane, .xbits(), .vec_done(ev.vec_done), .pad_event(ev.pad));

  logic                adc_vld, adc_ack;
  logic [ADC_BITS-1:0] adc [NCOL];
  cima #(.NROW(NROW), .NCOL(NCOL), .LAT(ADC_LAT)) u_cima (
    .clk, .rst_n, .cfg_xnor(c_xnor), .cfg_ext(c_ext), .cfg_adc_shift(c_shift),
    .cfg_active_rows(c_rows), .wr_en(wl_we), .wr_row(wl_row), .wr_data(wl_data),
    .plane_vld(pl_vld), .plane_rdy(pl_rdy), .plane, .adc_vld, .adc_ack, .adc);

  // shortcut buffer
  logic             sc_vld, sc_rel_b, sc_rel_c;
  logic [ACT_W-1:0] sc_vec [NCOL];
  shortcut_buffer #(.VEC(NCOL), .NLANE(SC_LANES), .FDEPTH(256)) u_sc (
    .clk, .rst_n, .cfg(sub[4]), .lanes_in(sc_in), .lanes_out(sc_out), .sc_vld, .sc_vec,
    .sc_rel(sc_rel_b | sc_rel_c), .pop_event(ev.sc_pop), .bypass_mode(ev.sc_bypass));

  // BPBS SIMD -> CMPT SIMD
  logic signed [ACC_W-1:0] bres [LANES];
  logic bres_vld, bres_rel;
  bpbs_simd #(.LANES(LANES)) u_bpbs (
    .clk, .rst_n, .cfg(sub[2]), .adc_vld, .adc_ack, .adc, .sc_vld, .sc_vec, .sc_rel(sc_rel_b),
    .f2f_in, .f2f_in_vld, .f2f_in_ack, .f2f_out, .f2f_out_vld, .f2f_out_ack,
    .res(bres), .res_vld(bres_vld), .res_rel(bres_rel), .stall_event(ev.bpbs_stall),
    .f2f_event(ev.f2f));

  cmpt_simd #(.MODS(MODS)) u_cmpt (
    .clk, .rst_n, .cfg(sub[3]), .bres, .bres_vld, .bres_rel, .sc_vld, .sc_vec,
    .sc_rel(sc_rel_c), .lanes(cm_out), .lut_event(ev.lut), .xch_event(ev.xch),
    .stall_event(ev.cmpt_stall), .dbg_rdata);

endmodule
