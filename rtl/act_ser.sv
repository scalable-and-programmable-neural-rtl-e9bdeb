// act_ser: serialiser for one bit-serial lane. An element loaded with load (when rdy) is sent
// LSB first over `bits` cycles with vld high; the next element may be loaded in the cycle the
// last bit leaves, so back-to-back elements stream without gaps. Bit-serial lanes are this
// design's choice for carrying multi-bit activations over single-wire OCN channels.
module act_ser
  import imc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       bits,     // element width 1..8
  input  logic             load,
  input  logic [ACT_W-1:0] data,
  output logic             rdy,
  output ser_t             lane
);
  logic [ACT_W-1:0] sh;
  logic [3:0]       left;

  assign rdy      = (left <= 4'd1);
  assign lane.vld = (left != 4'd0);
  assign lane.dat = sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (load && rdy) begin
      sh   <= data;
      left <= (bits == 4'd0) ? 4'd1 : bits;
    end else if (left != 4'd0) begin
      sh   <= sh >> 1;
      left <= left - 1'b1;
    end
  end
endmodule
