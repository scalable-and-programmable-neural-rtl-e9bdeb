// shortcut_buffer: the core's auxiliary buffer that bypasses the CIMA.
//
// Activations arrive on SC_LANES bit-serial lanes of their own and enter a FIFO together with
// their arrival time. The head leaves the FIFO only once it is at least `latency` cycles old,
// which lets a mapping delay a shortcut (residual) path to meet the layer pipeline. A leaving
// element goes either
//   * to the SIMD engines (bypass=0): it is written into a vector of up to 256 elements, one per
//     CIMA column; when vec_len elements are in, sc_vld rises and stays until sc_rel, or
//   * straight back onto the OCN (bypass=1): round-robin over SC_LANES output serialisers,
//     independent of the rest of the core (used for depth-wise shuffles and path delays).
// One element leaves per cycle at most. Config (cfg.addr[15:12]==0): {bits[25:22],
// vec_len[21:13], bypass[12], latency[11:0]}. The two destinations, the FIFO synchronisation and
// the 256-element limit follow the published design; lane counts, FIFO depth, time-stamping and
// the register layout are this design's choices.
module shortcut_buffer
  import imc_pkg::*;
#(
  parameter int VEC    = COLS,
  parameter int NLANE  = SC_LANES,
  parameter int FDEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_loc_t         cfg,
  input  ser_t             lanes_in  [NLANE],
  output ser_t             lanes_out [NLANE],
  output logic             sc_vld,
  output logic [ACT_W-1:0] sc_vec [VEC],
  input  logic             sc_rel,
  output logic             pop_event,    // pulse: an element left the FIFO
  output logic             bypass_mode
);
  localparam int AW = $clog2(FDEPTH);

  logic [11:0] cfg_lat;
  logic        cfg_bypass;
  logic [8:0]  cfg_len;
  logic [3:0]  cfg_bits;

  logic [ACT_W-1:0] fdat [FDEPTH];
  logic [15:0]      fts  [FDEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;
  logic [15:0]      now;
  logic [$clog2(VEC+1)-1:0] idx;
  logic [$clog2(NLANE)-1:0] rr;

  logic             dvld [NLANE];
  logic [ACT_W-1:0] ddat [NLANE];
  logic             srdy [NLANE];
  logic             sload [NLANE];
  logic             pop;
  logic [15:0]      age;

  assign bypass_mode = cfg_bypass;

  for (genvar l = 0; l < NLANE; l++) begin : g_lane
    act_deser u_des (.clk, .rst_n, .bits(cfg_bits), .lane(lanes_in[l]), .vld(dvld[l]), .data(ddat[l]));
    act_ser   u_ser (.clk, .rst_n, .bits(cfg_bits), .load(sload[l]), .data(fdat[rp]),
                     .rdy(srdy[l]), .lane(lanes_out[l]));
    assign sload[l] = pop && cfg_bypass && (rr == l);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_lat    <= '0;
      cfg_bypass <= 1'b0;
      cfg_len    <= 9'(VEC);
      cfg_bits   <= 4'd4;
    end else if (cfg.we && cfg.addr[15:12] == 4'd0) begin
      {cfg_bits, cfg_len, cfg_bypass, cfg_lat} <= cfg.data[25:0];
    end
  end

  assign age = now - fts[rp];
  assign pop = (cnt != '0) && (age >= 16'(cfg_lat)) &&
               (cfg_bypass ? srdy[rr] : !sc_vld);
  assign pop_event = pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp     <= '0;
      rp     <= '0;
      cnt    <= '0;
      now    <= '0;
      idx    <= '0;
      rr     <= '0;
      sc_vld <= 1'b0;
      for (int i = 0; i < VEC; i++) sc_vec[i] <= '0;
    end else begin
      logic [AW-1:0] w;
      logic [AW:0]   c;
      now <= now + 1'b1;
      w = wp;
      c = cnt;
      if (pop) begin
        rp <= rp + 1'b1;
        c  = c - 1'b1;
        if (cfg_bypass) begin
          rr <= rr + 1'b1;
        end else begin
          sc_vec[int'(idx)] <= fdat[rp];
          if (int'(idx) + 1 >= int'(cfg_len)) begin
            idx    <= '0;
            sc_vld <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
      end
      if (sc_rel) sc_vld <= 1'b0;
      for (int l = 0; l < NLANE; l++) begin
        if (dvld[l] && c < (AW+1)'(FDEPTH)) begin
          fdat[w] <= ddat[l];
          fts[w]  <= now;
          w = w + 1'b1;
          c = c + 1'b1;
        end
      end
      wp  <= w;
      cnt <= c;
    end
  end

endmodule
