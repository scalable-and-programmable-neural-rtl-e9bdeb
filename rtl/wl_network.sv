// wl_network: weight-loading network from the weight buffer to the cores' CIMA write ports.
//
// A weight row (one bit per column) enters with a destination mask; the network carries it over
// STAGES register stages and writes it into that row of every core whose mask bit is set, so the
// same weights can be replicated into several cores (data-level parallelism) in one transfer.
// One row per cycle, no back-pressure. The dedicated network and its purpose follow the
// published design; the multicast mask and the pipeline depth are this design's choices.
module wl_network
  import imc_pkg::*;
#(
  parameter int NCORE  = 16,
  parameter int NCOL   = COLS,
  parameter int STAGES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_vld,
  input  logic [NCORE-1:0]  in_mask,
  input  logic [ROW_AW-1:0] in_row,
  input  logic [NCOL-1:0]   in_data,
  output logic [NCORE-1:0]  core_we,
  output logic [ROW_AW-1:0] core_row,
  output logic [NCOL-1:0]   core_data,
  output logic [31:0]       n_rows          // rows delivered (per transfer, not per core)
);
  logic              v [STAGES];
  logic [NCORE-1:0]  m [STAGES];
  logic [ROW_AW-1:0] r [STAGES];
  logic [NCOL-1:0]   d [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES; s++) begin
        v[s] <= 1'b0;
        m[s] <= '0;
        r[s] <= '0;
        d[s] <= '0;
      end
      n_rows <= '0;
    end else begin
      v[0] <= in_vld;
      m[0] <= in_mask;
      r[0] <= in_row;
      d[0] <= in_data;
      for (int s = 1; s < STAGES; s++) begin
        v[s] <= v[s-1];
        m[s] <= m[s-1];
        r[s] <= r[s-1];
        d[s] <= d[s-1];
      end
      if (v[STAGES-1] && m[STAGES-1] != '0) n_rows <= n_rows + 1'b1;
    end
  end

  assign core_we   = v[STAGES-1] ? m[STAGES-1] : '0;
  assign core_row  = r[STAGES-1];
  assign core_data = d[STAGES-1];
endmodule
