// io_buffer: the test chip's input-output activation buffer.
//
// A BYTES-entry memory of 8-b activations with a host port (write, or registered read) and two
// streaming engines on the OCN boundary:
//   TX sends tx_count elements starting at tx_base, element i on lane i mod NLANE (round robin,
//      waiting for that lane's serialiser);
//   RX stores rx_count elements arriving on its NLANE lanes at rx_base upward; elements finishing
//      in the same cycle are stored in lane order.
// Config (cfg.addr[3:0]): 0 tx_base, 1 tx_count (starts TX), 2 rx_base, 3 rx_count (arms RX),
// 4 element bits. The 128 kB size and the role (activations to and from the host) follow the
// published design; the streaming engines are this design's choice.
module io_buffer
  import imc_pkg::*;
#(
  parameter int BYTES = 131072,
  parameter int NLANE = IO_LANES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_loc_t         cfg,
  input  logic             host_we,
  input  logic [$clog2(BYTES)-1:0] host_addr,
  input  logic [ACT_W-1:0] host_wdata,
  output logic [ACT_W-1:0] host_rdata,
  output ser_t             tx_lanes [NLANE],
  input  ser_t             rx_lanes [NLANE],
  output logic             tx_busy,
  output logic             rx_busy
);
  localparam int AW = $clog2(BYTES);

  logic [ACT_W-1:0] mem [BYTES];
  logic [AW-1:0]    tx_ptr, rx_ptr;
  logic [AW:0]      tx_left, rx_left;
  logic [3:0]       bits;
  logic [$clog2(NLANE)-1:0] rr;

  logic             srdy [NLANE];
  logic             sload [NLANE];
  logic             dvld [NLANE];
  logic [ACT_W-1:0] ddat [NLANE];
  logic             tx_go;

  assign tx_busy = (tx_left != '0);
  assign rx_busy = (rx_left != '0);
  assign tx_go   = tx_busy && srdy[rr];

  for (genvar l = 0; l < NLANE; l++) begin : g_lane
    assign sload[l] = tx_go && (rr == l);
    act_ser   u_ser (.clk, .rst_n, .bits, .load(sload[l]), .data(mem[tx_ptr]), .rdy(srdy[l]),
                     .lane(tx_lanes[l]));
    act_deser u_des (.clk, .rst_n, .bits, .lane(rx_lanes[l]), .vld(dvld[l]), .data(ddat[l]));
  end

  always_ff @(posedge clk) begin
    host_rdata <= mem[host_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_ptr  <= '0;
      rx_ptr  <= '0;
      tx_left <= '0;
      rx_left <= '0;
      bits    <= 4'd4;
      rr      <= '0;
    end else begin
      logic [AW-1:0] p;
      logic [AW:0]   n;
      if (host_we) mem[host_addr] <= host_wdata;
      if (tx_go) begin
        tx_ptr  <= tx_ptr + 1'b1;
        tx_left <= tx_left - 1'b1;
        rr      <= (int'(rr) == NLANE - 1) ? '0 : rr + 1'b1;
      end
      p = rx_ptr;
      n = rx_left;
      for (int l = 0; l < NLANE; l++) begin
        if (dvld[l] && n != '0) begin
          mem[p] <= ddat[l];
          p = p + 1'b1;
          n = n - 1'b1;
        end
      end
      rx_ptr  <= p;
      rx_left <= n;
      if (cfg.we) begin
        unique case (cfg.addr[3:0])
          4'd0: tx_ptr  <= cfg.data[AW-1:0];
          4'd1: begin tx_left <= cfg.data[AW:0]; rr <= '0; end
          4'd2: rx_ptr  <= cfg.data[AW-1:0];
          4'd3: rx_left <= cfg.data[AW:0];
          4'd4: bits    <= cfg.data[3:0];
          default: ;
        endcase
      end
    end
  end
endmodule
