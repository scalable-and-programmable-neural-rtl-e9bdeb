// ocn_tile: on-chip network of one 2x2 tile of cores.
//
// A switch block sits at the tile centre with four arms: the north and south arms are output
// blocks running vertically between the left and right core of the upper and lower row; the west
// and east arms are input blocks running horizontally between the upper and lower core of the
// left and right column. Each arm's outer end meets the facing arm of the neighbouring tile.
// Core numbering: q = 2*row + column inside the tile (0 upper-left, 1 upper-right, 2 lower-left,
// 3 lower-right). Output lanes of cores 0/1 enter the north arm (sources 1..20 / 21..40), of
// cores 2/3 the south arm; input lanes of cores 0/2 tap the west arm (taps 0..11 / 12..23), of
// cores 1/3 the east arm. Config cfg.addr[12:10] selects the switch block (0), north (1), south
// (2), west (3) or east (4) arm. The composition of switch, output and input blocks follows the
// published tile; the arm placement is this design's reading of it.
module ocn_tile
  import imc_pkg::*;
#(
  parameter int NCH = OCN_CH
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cfg_loc_t cfg,
  input  ser_t     core_out [4][OUT_LANES],
  output ser_t     core_in  [4][IN_LANES],
  input  ser_t     arm_in   [4][NCH],      // from the neighbouring tile, per arm N,E,S,W
  output ser_t     arm_out  [4][NCH],
  output logic     inject_event
);
  ser_t sw_in  [4][NCH];
  ser_t sw_out [4][NCH];
  ser_t osrc   [2][2*OUT_LANES];
  ser_t taps   [2][2*IN_LANES];
  cfg_loc_t pc [5];
  logic ev [2];

  for (genvar p = 0; p < 5; p++) begin : g_cfg
    assign pc[p] = '{we: cfg.we && int'(cfg.addr[12:10]) == p, addr: cfg.addr, data: cfg.data};
  end

  ocn_switch_block #(.NCH(NCH)) u_sw (.clk, .rst_n, .cfg(pc[0]), .sw_in, .sw_out);

  // north (core 0 left, core 1 right) and south (core 2, core 3) output blocks
  for (genvar a = 0; a < 2; a++) begin : g_out
    localparam int SIDE = 2 * a;   // 0 north, 2 south
    for (genvar l = 0; l < OUT_LANES; l++) begin : g_src
      assign osrc[a][l]             = core_out[2*a][l];
      assign osrc[a][OUT_LANES + l] = core_out[2*a + 1][l];
    end
    ocn_output_block #(.NCH(NCH), .NSRC(2*OUT_LANES)) u_ob (
      .clk, .rst_n, .cfg(pc[1 + a]), .in_outer(arm_in[SIDE]), .in_inner(sw_out[SIDE]),
      .out_outer(arm_out[SIDE]), .out_inner(sw_in[SIDE]), .src(osrc[a]), .inject_event(ev[a]));
  end

  // west (core 0 upper, core 2 lower) and east (core 1, core 3) input blocks
  for (genvar a = 0; a < 2; a++) begin : g_in
    localparam int SIDE = (a == 0) ? 3 : 1;
    ocn_input_block #(.NCH(NCH), .NSUB(IN_SUB), .NTAP(2*IN_LANES)) u_ib (
      .clk, .rst_n, .cfg(pc[3 + a]), .in_outer(arm_in[SIDE]), .in_inner(sw_out[SIDE]),
      .out_outer(arm_out[SIDE]), .out_inner(sw_in[SIDE]), .taps(taps[a]));
    for (genvar l = 0; l < IN_LANES; l++) begin : g_tap
      assign core_in[a][l]     = taps[a][l];
      assign core_in[a + 2][l] = taps[a][IN_LANES + l];
    end
  end

  assign inject_event = ev[0] | ev[1];
endmodule
