// act_deser: deserialiser for one bit-serial lane (see act_ser). It collects `bits` consecutive
// valid bits, LSB first, and pulses vld for one cycle with the assembled element.
module act_deser
  import imc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       bits,
  input  ser_t             lane,
  output logic             vld,
  output logic [ACT_W-1:0] data
);
  logic [ACT_W-1:0] acc;
  logic [3:0]       n;
  logic [3:0]       nb;
  logic [ACT_W-1:0] nxt;

  assign nb = (bits == 4'd0) ? 4'd1 : bits;

  always_comb begin
    nxt = acc;
    nxt[n[2:0]] = lane.dat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      n    <= '0;
      vld  <= 1'b0;
      data <= '0;
    end else begin
      vld <= 1'b0;
      if (lane.vld) begin
        if (n + 1'b1 >= nb) begin
          vld  <= 1'b1;
          data <= nxt;
          acc  <= '0;
          n    <= '0;
        end else begin
          acc <= nxt;
          n   <= n + 1'b1;
        end
      end
    end
  end
endmodule
