// input_buffer: the core's configurable input buffer.
//
// Eight line-buffer banks each take activations from one bit-serial OCN lane. A bank's fill is
// pad_lead[b] zeros produced by the local padding logic (one per cycle) followed by fill_cnt[b]
// elements from its lane. The banks are packed one after another from row 0 upward, so a
// flattened kernel always sits at the base of the array and unused upper rows can be gated.
// With nfill=2 the buffer takes two fills and adds the second element-wise onto the first
// (saturating to the activation width), which sums activations produced by two other cores.
// A completed vector is copied to a sequencing register (ping-pong), so the next vector can fill
// while the current one is sent to the CIMA as xbits bit-planes, LSB plane first, one per
// plane_vld/plane_rdy handshake. An element arriving while its bank is writing a padding zero,
// is full or is handing over waits in a one-entry holding register per bank.
//
// Convolutional window reuse: with keep[b] > 0 a bank, once it has handed a vector over, starts
// its next fill by moving its last keep[b] elements down to the front of its region and then takes
// only fill_cnt[b] - keep[b] new elements from its lane. With a window stored column by column this
// slides a stride-1 kernel by one pixel (for 3x3, two of three window columns stay). A write to
// the restart register begins the next fill from scratch (first window of a row). Not used with
// nfill2.
// Config (cfg.addr[15:12]): 0 ctrl {nfill2[5], xbits[3:0]}; 1 fill_cnt of bank addr[2:0];
// 2 pad_lead of bank addr[2:0]; 3 keep of bank addr[2:0]; 4 restart. The bank count, the
// padding/packing functions and window reuse follow the published design; bank sizes, the
// packing order, the ping-pong copy, the shift form of the reuse and the add-on-write form of the
// element-wise adder are this design's choices. Lanes deliver one element per bit-serial frame;
// the faster input multiplexing of the original line buffers is not modelled.
module input_buffer
  import imc_pkg::*;
#(
  parameter int NROW   = ROWS,
  parameter int NBANK  = IB_LANES
) (
  input  logic                clk,
  input  logic                rst_n,
  input  cfg_loc_t            cfg,
  input  ser_t                lanes [NBANK],
  output logic                plane_vld,
  input  logic                plane_rdy,
  output logic [2*NROW-1:0]   plane,
  output logic [3:0]          xbits,
  output logic                vec_done,     // pulse: a vector has finished sequencing
  output logic                pad_event     // pulse: a padding zero was written
);
  localparam int VW = 2 * NROW;            // room for the 2304-row configuration
  localparam int CW = $clog2(VW + 1);

  logic [3:0]   cfg_xbits;
  logic         cfg_nfill2;
  logic [CW-1:0] fill_cnt [NBANK];
  logic [CW-1:0] pad_lead [NBANK];
  logic [CW-1:0] keep     [NBANK];
  logic          restart;

  logic [ACT_W-1:0] vec  [VW];
  logic [ACT_W-1:0] seqv [VW];
  logic [CW-1:0]    ptr  [NBANK];
  logic [CW-1:0]    base [NBANK];
  logic             fill_no;
  logic             seq_busy;
  logic [3:0]       seq_b;

  logic             dvld [NBANK];
  logic [ACT_W-1:0] ddat [NBANK];
  logic             hvld [NBANK];   // element held because its bank could not take it yet
  logic [ACT_W-1:0] hdat [NBANK];
  logic             evld [NBANK];   // element offered to the bank this cycle
  logic [ACT_W-1:0] edat [NBANK];
  logic             take [NBANK];
  logic             all_done;

  logic handover, any_rows;

  assign restart = cfg.we && cfg.addr[15:12] == 4'd4;

  assign xbits    = cfg_xbits;
  assign any_rows = (base[NBANK-1] + pad_lead[NBANK-1] + fill_cnt[NBANK-1]) != '0;
  assign handover = all_done && any_rows && !seq_busy && !(cfg_nfill2 && !fill_no);

  for (genvar b = 0; b < NBANK; b++) begin : g_des
    act_deser u_des (.clk, .rst_n, .bits(cfg_xbits), .lane(lanes[b]), .vld(dvld[b]), .data(ddat[b]));
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_hold
    assign evld[b] = hvld[b] || dvld[b];
    assign edat[b] = hvld[b] ? hdat[b] : ddat[b];
    assign take[b] = evld[b] && !(all_done && any_rows) && ptr[b] >= pad_lead[b] &&
                     ptr[b] < pad_lead[b] + fill_cnt[b];
  end

  // banks are packed densely from row 0
  always_comb begin
    logic [CW-1:0] acc;
    acc = '0;
    for (int b = 0; b < NBANK; b++) begin
      base[b] = acc;
      acc     = acc + pad_lead[b] + fill_cnt[b];
    end
  end

  always_comb begin
    all_done = 1'b1;
    for (int b = 0; b < NBANK; b++)
      if (ptr[b] != pad_lead[b] + fill_cnt[b]) all_done = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_xbits  <= 4'd4;
      cfg_nfill2 <= 1'b0;
      for (int b = 0; b < NBANK; b++) begin
        fill_cnt[b] <= '0;
        pad_lead[b] <= '0;
        keep[b]     <= '0;
      end
    end else if (cfg.we) begin
      unique case (cfg.addr[15:12])
        4'd0: {cfg_nfill2, cfg_xbits} <= {cfg.data[5], cfg.data[3:0]};
        4'd1: fill_cnt[cfg.addr[2:0]] <= cfg.data[CW-1:0];
        4'd2: pad_lead[cfg.addr[2:0]] <= cfg.data[CW-1:0];
        4'd3: keep[cfg.addr[2:0]]     <= cfg.data[CW-1:0];
        default: ;
      endcase
    end
  end

  function automatic logic [ACT_W-1:0] sat_add(logic [ACT_W-1:0] a, logic [ACT_W-1:0] b, logic [3:0] nb);
    logic [ACT_W:0] s;
    logic [ACT_W:0] mx;
    s  = {1'b0, a} + {1'b0, b};
    mx = (ACT_W+1)'((1 << nb) - 1);
    return (s > mx) ? mx[ACT_W-1:0] : s[ACT_W-1:0];
  endfunction

  // fill side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANK; b++) begin
        ptr[b]  <= '0;
        hvld[b] <= 1'b0;
        hdat[b] <= '0;
      end
      fill_no   <= 1'b0;
      pad_event <= 1'b0;
    end else if (restart) begin
      for (int b = 0; b < NBANK; b++) ptr[b] <= '0;
      fill_no <= 1'b0;
    end else begin
      pad_event <= 1'b0;
      // an element that cannot be written this cycle waits in the holding register; a second
      // one arriving meanwhile replaces it (the mapping must pace the lanes to avoid this)
      for (int b = 0; b < NBANK; b++) begin
        if (take[b]) begin
          hvld[b] <= hvld[b] && dvld[b];
          hdat[b] <= ddat[b];
        end else if (dvld[b]) begin
          hvld[b] <= 1'b1;
          hdat[b] <= ddat[b];
        end
      end
      if (all_done && any_rows) begin
        // a fill is complete: either start the second fill or hand the vector over
        if (cfg_nfill2 && !fill_no) begin
          fill_no <= 1'b1;
          for (int b = 0; b < NBANK; b++) ptr[b] <= '0;
        end else if (!seq_busy) begin
          fill_no <= 1'b0;
          for (int b = 0; b < NBANK; b++) begin
            if (!cfg_nfill2 && keep[b] != '0 && keep[b] <= fill_cnt[b]) begin
              // slide the window: keep the newest keep[b] elements, refill the rest
              for (int i = 0; i < VW; i++)
                if (i < int'(keep[b]))
                  vec[int'(base[b]) + int'(pad_lead[b]) + i] <=
                      vec[int'(base[b]) + int'(pad_lead[b]) + int'(fill_cnt[b]) - int'(keep[b]) + i];
              ptr[b] <= pad_lead[b] + keep[b];
            end else begin
              ptr[b] <= '0;
            end
          end
        end
      end else begin
        for (int b = 0; b < NBANK; b++) begin
          if (ptr[b] < pad_lead[b]) begin
            vec[int'(base[b]) + int'(ptr[b])] <= fill_no ? vec[int'(base[b]) + int'(ptr[b])] : '0;
            ptr[b]    <= ptr[b] + 1'b1;
            pad_event <= 1'b1;
          end else if (take[b]) begin
            vec[int'(base[b]) + int'(ptr[b])] <= fill_no ?
                sat_add(vec[int'(base[b]) + int'(ptr[b])], edat[b], cfg_xbits) : edat[b];
            ptr[b] <= ptr[b] + 1'b1;
          end
        end
      end
    end
  end

  // sequencing side

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_busy <= 1'b0;
      seq_b    <= '0;
      vec_done <= 1'b0;
    end else begin
      vec_done <= 1'b0;
      if (handover) begin
        seqv     <= vec;
        seq_busy <= 1'b1;
        seq_b    <= '0;
      end else if (seq_busy && plane_rdy) begin
        if (seq_b + 1'b1 >= cfg_xbits) begin
          seq_busy <= 1'b0;
          vec_done <= 1'b1;
        end
        seq_b <= seq_b + 1'b1;
      end
    end
  end

  assign plane_vld = seq_busy;
  always_comb begin
    for (int r = 0; r < VW; r++) plane[r] = seqv[r][seq_b[2:0]];
  end

endmodule
