// imc_accel_top: scalable in-memory-computing neural-network inference accelerator.
//
// An NR x NC array of compute-in-memory cores (cimu) is joined by a configurable on-chip network
// built from 2x2 tiles (ocn_tile); adjacent tiles join arm to arm. Weights reach the cores over
// a separate weight-loading network (wl_network) fed from an external weight buffer. A 128 kB I/O
// buffer (io_buffer) sends activations into the network and collects results: its TX lanes drive
// channels 0..7, and its RX lanes listen on channels 8..15, of the west arm of the upper-left
// tile. Horizontally adjacent cores (columns 2k and 2k+1) are paired by face-to-face connections
// for summing partial inner products. Everything is programmed through one configuration write
// bus: cfg.addr[23:19] selects core 0..NR*NC-1 (index row*NC + column), tile 16+t (t = tile row
// * NC/2 + tile column) or the I/O buffer (20); the lower bits go to that unit. cfg_rdata reads back
// the CMPT register that a core was last told to show (CMPT config 4), for debugging.
// Array size, tiling, the separate weight network and the I/O buffer follow the published design;
// the address map, boundary wiring and pairing for face-to-face links are this design's choices.
module imc_accel_top
  import imc_pkg::*;
#(
  parameter int NR   = 4,
  parameter int NC   = 4,
  parameter int NROW = ROWS,
  parameter int NCOL = COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_req_t          cfg,
  // weight-loading stream from the weight buffer
  input  logic              wl_vld,
  input  logic [NR*NC-1:0]  wl_mask,
  input  logic [ROW_AW-1:0] wl_row,
  input  logic [NCOL-1:0]   wl_data,
  // host port of the I/O buffer
  input  logic              host_we,
  input  logic [16:0]       host_addr,
  input  logic [ACT_W-1:0]  host_wdata,
  output logic [ACT_W-1:0]  host_rdata,
  output logic              tx_busy,
  output logic              rx_busy,
  // activity
  output core_ev_t          core_ev [NR*NC],
  output logic              ocn_inject,
  output logic [31:0]       wl_rows,
  // configuration read-back: the CMPT register last selected for read-out in any core
  output logic [31:0]       cfg_rdata
);
  localparam int NCORE = NR * NC;
  localparam int TR = NR / 2;
  localparam int TC = NC / 2;
  localparam int NT = TR * TC;
  localparam int LANES = NCOL / 4;

  // ---- configuration decode -----------------------------------------------------------------
  cfg_req_t core_cfg [NCORE];
  cfg_loc_t tile_cfg [NT];
  cfg_loc_t io_cfg;
  for (genvar i = 0; i < NCORE; i++) begin : g_ccfg
    assign core_cfg[i] = '{we: cfg.we && int'(cfg.addr[23:19]) == i, addr: cfg.addr, data: cfg.data};
  end
  for (genvar t = 0; t < NT; t++) begin : g_tcfg
    assign tile_cfg[t] = '{we: cfg.we && int'(cfg.addr[23:19]) == 16 + t, addr: cfg.addr[15:0],
                           data: cfg.data};
  end
  assign io_cfg = '{we: cfg.we && cfg.addr[23:19] == 5'd20, addr: cfg.addr[15:0], data: cfg.data};

  // ---- weight loading -----------------------------------------------------------------------
  logic [NCORE-1:0]  c_we;
  logic [ROW_AW-1:0] c_row;
  logic [NCOL-1:0]   c_data;
  wl_network #(.NCORE(NCORE), .NCOL(NCOL), .STAGES(2)) u_wl (
    .clk, .rst_n, .in_vld(wl_vld), .in_mask(wl_mask), .in_row(wl_row), .in_data(wl_data),
    .core_we(c_we), .core_row(c_row), .core_data(c_data), .n_rows(wl_rows));

  // ---- cores ------------------------------------------------------------------------------------
  ser_t core_in  [NCORE][IN_LANES];
  ser_t core_out [NCORE][OUT_LANES];
  logic signed [ACC_W-1:0] f2f [NCORE][LANES];
  logic f2f_vld [NCORE];
  logic f2f_ack [NCORE];
  logic signed [ACC_W-1:0] core_dbg [NCORE];
  logic [4:0] rd_core;      // core whose CMPT read-out select was written last

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_core <= '0;
    else if (cfg.we && int'(cfg.addr[23:19]) < NCORE && cfg.addr[18:16] == 3'd3 &&
             cfg.addr[15:12] == 4'd4)
      rd_core <= cfg.addr[23:19];
  end
  assign cfg_rdata = 32'(core_dbg[int'(rd_core) % NCORE]);   // ack given by the core that consumes core i's f2f output

  for (genvar i = 0; i < NCORE; i++) begin : g_core
    localparam int P = i ^ 1;   // face-to-face partner: same row, column 2k <-> 2k+1
    cimu #(.NROW(NROW), .NCOL(NCOL)) u_core (
      .clk, .rst_n, .cfg(core_cfg[i]), .in_lanes(core_in[i]), .out_lanes(core_out[i]),
      .wl_we(c_we[i]), .wl_row(c_row), .wl_data(c_data),
      .f2f_in(f2f[P]), .f2f_in_vld(f2f_vld[P]), .f2f_in_ack(f2f_ack[P]),
      .f2f_out(f2f[i]), .f2f_out_vld(f2f_vld[i]), .f2f_out_ack(f2f_ack[i]),
      .ev(core_ev[i]), .dbg_rdata(core_dbg[i]));
  end

  // ---- on-chip network ------------------------------------------------------------------------
  ser_t arm_in  [NT][4][OCN_CH];
  ser_t arm_out [NT][4][OCN_CH];
  ser_t t_cin   [NT][4][OUT_LANES];
  ser_t t_cout  [NT][4][IN_LANES];
  logic t_inj   [NT];
  ser_t io_tx   [IO_LANES];
  ser_t io_rx   [IO_LANES];

  for (genvar tr = 0; tr < TR; tr++) begin : g_tr
    for (genvar tc = 0; tc < TC; tc++) begin : g_tc
      localparam int T = tr * TC + tc;
      for (genvar q = 0; q < 4; q++) begin : g_q
        localparam int CI = (2*tr + q/2) * NC + (2*tc + q%2);
        assign t_cin[T][q]  = core_out[CI];
        assign core_in[CI]  = t_cout[T][q];
      end
      ocn_tile #(.NCH(OCN_CH)) u_tile (
        .clk, .rst_n, .cfg(tile_cfg[T]), .core_out(t_cin[T]), .core_in(t_cout[T]),
        .arm_in(arm_in[T]), .arm_out(arm_out[T]), .inject_event(t_inj[T]));

      for (genvar ch = 0; ch < OCN_CH; ch++) begin : g_ch
        // north arm: from the tile above, or nothing at the edge
        if (tr > 0) begin : g_n
          assign arm_in[T][0][ch] = arm_out[T - TC][2][ch];
        end else begin : g_n0
          assign arm_in[T][0][ch] = '0;
        end
        // south arm
        if (tr < TR - 1) begin : g_s
          assign arm_in[T][2][ch] = arm_out[T + TC][0][ch];
        end else begin : g_s0
          assign arm_in[T][2][ch] = '0;
        end
        // east arm
        if (tc < TC - 1) begin : g_e
          assign arm_in[T][1][ch] = arm_out[T + 1][3][ch];
        end else begin : g_e0
          assign arm_in[T][1][ch] = '0;
        end
        // west arm: neighbour tile, the I/O buffer (tile 0) or nothing
        if (tc > 0) begin : g_w
          assign arm_in[T][3][ch] = arm_out[T - 1][1][ch];
        end else if (T == 0 && ch < IO_LANES) begin : g_wio
          assign arm_in[T][3][ch] = io_tx[ch];
        end else begin : g_w0
          assign arm_in[T][3][ch] = '0;
        end
      end
    end
  end

  for (genvar l = 0; l < IO_LANES; l++) begin : g_iorx
    assign io_rx[l] = arm_out[0][3][IO_LANES + l];
  end

  always_comb begin
    ocn_inject = 1'b0;
    for (int t = 0; t < NT; t++) ocn_inject |= t_inj[t];
  end

  // ---- I/O buffer ---------------------------------------------------------------------------
  io_buffer #(.BYTES(131072), .NLANE(IO_LANES)) u_io (
    .clk, .rst_n, .cfg(io_cfg), .host_we, .host_addr, .host_wdata, .host_rdata,
    .tx_lanes(io_tx), .rx_lanes(io_rx), .tx_busy, .rx_busy);

endmodule
