// ocn_output_block: OCN segment that carries core outputs onto the network.
//
// NCH channels run between the switch block ("inner" end) and the neighbouring tile ("outer"
// end), passing between a left and a right core. Each channel is bidirectional, its direction
// set by configuration (dir 0: outer to inner, 1: inner to outer), and is registered where it
// enters and where it leaves the segment (two cycles). Between the two registers any of the NSRC
// output lanes of the two cores (full connectivity) may be driven onto the channel instead of the
// passing traffic. Config: cfg.addr[6:0] channel, cfg.data = {dir[6], src[5:0]} with src 0 pass
// through and src k driving core lane k-1. Channel count, bidirectionality, registering and full
// output connectivity follow the published design; the encodings are this design's choices.
module ocn_output_block
  import imc_pkg::*;
#(
  parameter int NCH  = OCN_CH,
  parameter int NSRC = 2 * OUT_LANES
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cfg_loc_t cfg,
  input  ser_t     in_outer  [NCH],
  input  ser_t     in_inner  [NCH],
  output ser_t     out_outer [NCH],
  output ser_t     out_inner [NCH],
  input  ser_t     src       [NSRC],
  output logic     inject_event
);
  logic       dir  [NCH];
  logic [5:0] ssel [NCH];
  ser_t       r1   [NCH];
  ser_t       r2   [NCH];

  always_comb begin
    inject_event = 1'b0;
    for (int i = 0; i < NCH; i++) begin
      out_inner[i] = dir[i] ? '0 : r2[i];
      out_outer[i] = dir[i] ? r2[i] : '0;
      if (ssel[i] != '0 && src[int'(ssel[i]) - 1].vld) inject_event = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) begin
        dir[i]  <= 1'b0;
        ssel[i] <= '0;
        r1[i]   <= '0;
        r2[i]   <= '0;
      end
    end else begin
      if (cfg.we && int'(cfg.addr[6:0]) < NCH && int'(cfg.data[5:0]) <= NSRC)
        {dir[cfg.addr[6:0]], ssel[cfg.addr[6:0]]} <= cfg.data[6:0];
      for (int i = 0; i < NCH; i++) begin
        r1[i] <= dir[i] ? in_inner[i] : in_outer[i];
        r2[i] <= (ssel[i] == '0) ? r1[i] : src[int'(ssel[i]) - 1];
      end
    end
  end
endmodule
