// simd_seq: instruction controller of a SIMD engine.
//
// Holds a DEPTH-entry instruction buffer written through the configuration bus (cfg.addr[15:12]
// == 0, entry cfg.addr[6:0]) and, while run is set, issues the instruction at the program
// counter every cycle. The consuming datapath raises stall to hold the current instruction (a
// wait that is not yet satisfied, a full buffer) and jump0 to continue at entry 0 instead of the
// next entry, so a program is normally one loop body. Clearing run returns the counter to 0.
// The 128-entry buffer and the one-instruction-per-cycle issue follow the published design; the
// stall/loop handshake is this design's choice. Issued instructions are counted in n_issued.
module simd_seq
  import imc_pkg::*;
#(
  parameter int DEPTH = IMEM_DEPTH,
  parameter int IW    = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_loc_t      cfg,
  input  logic          run,
  input  logic          stall,
  input  logic          jump0,
  output logic          issue,        // instr is valid this cycle
  output logic [IW-1:0] instr,
  output logic [31:0]   n_issued      // instructions that completed
);
  localparam int AW = $clog2(DEPTH);

  logic [IW-1:0] imem [DEPTH];
  logic [AW-1:0] pc;

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.addr[15:12] == 4'd0) imem[cfg.addr[AW-1:0]] <= cfg.data[IW-1:0];
  end

  assign issue = run;
  assign instr = run ? imem[pc] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      n_issued <= '0;
    end else if (!run) begin
      pc <= '0;
    end else if (!stall) begin
      pc       <= jump0 ? '0 : pc + 1'b1;
      n_issued <= n_issued + 1'b1;
    end
  end

endmodule
