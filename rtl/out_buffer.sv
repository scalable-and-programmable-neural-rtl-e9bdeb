// out_buffer: output buffer of the CMPT SIMD.
//
// One small FIFO per CMPT datapath stores final quantized output activations; each FIFO drains
// through its own serialiser, so the buffer turns the results into NLANE parallel bit streams
// (bits per element set by `bits`) for the OCN output block. A push writes one element into every
// FIFO at once, as all datapaths execute the same instruction; full is raised while any FIFO is
// full so that the SIMD engine stalls rather than drops data. Storing and reshaping into parallel
// bit streams follow the published design; FIFO depth and the all-lanes push are this design's
// choices.
module out_buffer
  import imc_pkg::*;
#(
  parameter int NLANE = CMPT_MODS,
  parameter int DEPTH = OBUF_DEPTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       bits,
  input  logic             push,
  input  logic [ACT_W-1:0] data [NLANE],
  output logic             full,
  output ser_t             lanes [NLANE]
);
  localparam int AW = $clog2(DEPTH);

  logic [ACT_W-1:0] mem [NLANE][DEPTH];
  logic [AW-1:0]    wp  [NLANE];
  logic [AW-1:0]    rp  [NLANE];
  logic [AW:0]      cnt [NLANE];
  logic             rdy [NLANE];
  logic             pop [NLANE];

  always_comb begin
    full = 1'b0;
    for (int l = 0; l < NLANE; l++) if (cnt[l] == (AW+1)'(DEPTH)) full = 1'b1;
  end

  for (genvar l = 0; l < NLANE; l++) begin : g_lane
    assign pop[l] = (cnt[l] != '0) && rdy[l];

    act_ser u_ser (.clk, .rst_n, .bits, .load(pop[l]), .data(mem[l][rp[l]]), .rdy(rdy[l]),
                   .lane(lanes[l]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wp[l]  <= '0;
        rp[l]  <= '0;
        cnt[l] <= '0;
      end else begin
        if (push && !full) begin
          mem[l][wp[l]] <= data[l];
          wp[l]         <= wp[l] + 1'b1;
        end
        if (pop[l]) rp[l] <= rp[l] + 1'b1;
        cnt[l] <= cnt[l] + (AW+1)'(push && !full) - (AW+1)'(pop[l]);
      end
    end
  end

endmodule
