// ocn_switch_block: repeater-buffered switch block at the centre of a 2x2 tile.
//
// Four sides (0 north, 1 east, 2 south, 3 west) of NCH single-bit-serial channels meet here. The
// block is disjoint: outgoing channel i of a side can only be driven by incoming channel i of one
// of the three other sides, chosen by a 2-bit selector (0 off, k = side (s+k) mod 4). Every
// outgoing channel is registered (the repeater buffer), so the block adds one cycle.
// Config: cfg.addr[9:8] outgoing side, cfg.addr[6:0] channel, cfg.data[1:0] selector. The
// disjoint topology and registering follow the published design; the selector encoding is this
// design's choice.
module ocn_switch_block
  import imc_pkg::*;
#(
  parameter int NCH = OCN_CH
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cfg_loc_t cfg,
  input  ser_t     sw_in  [4][NCH],
  output ser_t     sw_out [4][NCH]
);
  logic [1:0] sel [4][NCH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 4; s++)
        for (int i = 0; i < NCH; i++) begin
          sel[s][i]    <= '0;
          sw_out[s][i] <= '0;
        end
    end else begin
      if (cfg.we && int'(cfg.addr[6:0]) < NCH) sel[cfg.addr[9:8]][cfg.addr[6:0]] <= cfg.data[1:0];
      for (int s = 0; s < 4; s++)
        for (int i = 0; i < NCH; i++)
          sw_out[s][i] <= (sel[s][i] == 2'd0) ? '0 : sw_in[(s + int'(sel[s][i])) % 4][i];
    end
  end
endmodule
