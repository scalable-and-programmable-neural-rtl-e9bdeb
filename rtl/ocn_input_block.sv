// ocn_input_block: OCN segment that feeds core inputs from the network.
//
// Like the output block, NCH bidirectional channels run between the switch block (inner end) and
// the neighbouring tile (outer end), registered on entry and exit (two cycles). Here the channels
// pass between an upper and a lower core, and each of their NTAP input lanes listens to one
// channel of a fixed subset of NSUB channels: lane t may tap channels (t mod S) + S*j,
// j = 0..NSUB-1, S = NCH/NSUB. Taps read the entry register, so a tapped channel still travels on.
// Config: cfg.addr[7]=0: channel cfg.addr[6:0] direction cfg.data[0] (0 outer->inner);
// cfg.addr[7]=1: lane cfg.addr[4:0] selects j = cfg.data[4:0]. Channel count, 20-channel subsets
// and registering follow the published design; the subset pattern and encodings are this
// design's choices.
module ocn_input_block
  import imc_pkg::*;
#(
  parameter int NCH  = OCN_CH,
  parameter int NSUB = IN_SUB,
  parameter int NTAP = 2 * IN_LANES
) (
  input  logic     clk,
  input  logic     rst_n,
  input  cfg_loc_t cfg,
  input  ser_t     in_outer  [NCH],
  input  ser_t     in_inner  [NCH],
  output ser_t     out_outer [NCH],
  output ser_t     out_inner [NCH],
  output ser_t     taps      [NTAP]
);
  localparam int S = NCH / NSUB;

  logic       dir  [NCH];
  logic [4:0] tsel [NTAP];
  ser_t       r1   [NCH];
  ser_t       r2   [NCH];

  always_comb begin
    for (int i = 0; i < NCH; i++) begin
      out_inner[i] = dir[i] ? '0 : r2[i];
      out_outer[i] = dir[i] ? r2[i] : '0;
    end
    for (int t = 0; t < NTAP; t++) taps[t] = r1[(t % S) + S * int'(tsel[t])];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCH; i++) begin
        dir[i] <= 1'b0;
        r1[i]  <= '0;
        r2[i]  <= '0;
      end
      for (int t = 0; t < NTAP; t++) tsel[t] <= '0;
    end else begin
      if (cfg.we) begin
        if (!cfg.addr[7] && int'(cfg.addr[6:0]) < NCH) dir[cfg.addr[6:0]] <= cfg.data[0];
        if (cfg.addr[7] && int'(cfg.addr[4:0]) < NTAP && int'(cfg.data[4:0]) < NSUB)
          tsel[cfg.addr[4:0]] <= cfg.data[4:0];
      end
      for (int i = 0; i < NCH; i++) begin
        r1[i] <= dir[i] ? in_inner[i] : in_outer[i];
        r2[i] <= r1[i];
      end
    end
  end
endmodule
