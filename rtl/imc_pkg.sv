// imc_pkg: sizes, bus types and instruction formats shared by the in-memory-computing
// accelerator. The array sizes (1152x256 bit cells, 8-b ADCs, 64 BPBS lanes, 16 CMPT datapaths,
// 128-entry instruction buffers, 16 general registers, 80 OCN channels, 20-channel input taps,
// 4x4 cores) follow the published design. Bit-serial lane framing, the configuration bus,
// instruction encodings, lane counts per core and all widths not listed above are this design's
// own choices.
package imc_pkg;

  // ---- compute-in-memory array -------------------------------------------------------------
  localparam int ROWS      = 1152;          // bit-cell rows
  localparam int COLS      = 256;           // compute lines / columns
  localparam int EXT_ROWS  = 2 * ROWS;      // rows seen in the 2304x128 configuration
  localparam int ADC_BITS  = 8;
  localparam int ADC_LAT   = 10;            // digital cycles per conversion (200 MHz / 20 MS/s)
  localparam int ROW_AW    = 12;            // row address / active-row count width

  // ---- activations and SIMD datapaths ------------------------------------------------------
  localparam int ACT_W      = 8;            // widest activation (1..8 bit precision)
  localparam int ACC_W      = 32;           // accumulator / datapath word
  localparam int BPBS_LANES = COLS / 4;     // one BPBS datapath per four columns
  localparam int CMPT_MODS  = BPBS_LANES / 4; // one CMPT datapath per four BPBS lanes
  localparam int IMEM_DEPTH = 128;          // instruction buffer entries
  localparam int NREG       = 16;           // CMPT general-purpose registers
  localparam int LUT_DEPTH  = 256;
  localparam int LUT_W      = 16;
  localparam int OBUF_DEPTH = 8;            // output-buffer entries per CMPT datapath

  // ---- core ports and on-chip network ------------------------------------------------------
  localparam int IB_LANES  = 8;             // input-buffer lanes, one per line buffer
  localparam int SC_LANES  = 4;             // shortcut-buffer input and bypass output lanes
  localparam int IN_LANES  = IB_LANES + SC_LANES;
  localparam int OUT_LANES = CMPT_MODS + SC_LANES;
  localparam int OCN_CH    = 80;
  localparam int IN_SUB    = 20;            // channels an input lane may tap
  localparam int IO_LANES  = 8;

  // One bit-serial lane / channel: an element of N bits is sent LSB first on N consecutive
  // cycles with vld high.
  typedef struct packed {
    logic vld;
    logic dat;
  } ser_t;

  // Global configuration write bus and the core-local view of it.
  typedef struct packed {
    logic        we;
    logic [23:0] addr;
    logic [31:0] data;
  } cfg_req_t;

  typedef struct packed {
    logic        we;
    logic [15:0] addr;
    logic [31:0] data;
  } cfg_loc_t;

  // ---- BPBS SIMD instruction ---------------------------------------------------------------
  typedef enum logic [3:0] {
    B_NOP      = 4'd0,
    B_WAIT_ADC = 4'd1,   // stall for a new ADC vector and latch it
    B_MAC      = 4'd2,   // acc +/-= ((x*gain + offset) << shift)
    B_F2F      = 4'd3,   // stall for the neighbour core's partial sums and add them
    B_SEND     = 4'd4,   // hand the accumulators to the CMPT SIMD (or the F2F port)
    B_CLR      = 4'd5,
    B_WAIT_SC  = 4'd6,   // stall for a shortcut vector
    B_REL_SC   = 4'd7,   // release the shortcut vector
    B_LOOP     = 4'd8    // continue at address 0
  } bpbs_op_e;

  typedef struct packed {
    logic [15:0] rsvd;
    logic        f2f;    // SEND: to the face-to-face port instead of the CMPT SIMD
    logic        clr;    // SEND: clear the accumulator
    logic        lexp;   // MAC: add the lane's local exponent to the shift
    logic [4:0]  shift;  // MAC: binary weight 2^shift
    logic        neg;    // MAC: subtract (sign bit of a two's-complement weight)
    logic        src;    // MAC: 0 ADC code, 1 shortcut element
    logic [1:0]  col;    // MAC: which of the lane's four columns
    bpbs_op_e    op;
  } bpbs_instr_t;

  // ---- CMPT SIMD instruction ---------------------------------------------------------------
  typedef enum logic [2:0] {
    C_NOP     = 3'd0,
    C_WAIT_IN = 3'd1,    // stall until BPBS results are available
    C_REL_IN  = 3'd2,    // release them
    C_WAIT_SC = 3'd3,
    C_REL_SC  = 3'd4,
    C_ALU     = 3'd5,
    C_LOOP    = 3'd6
  } cmpt_op_e;

  typedef enum logic [3:0] {
    A_ADD = 4'd0, A_SUB = 4'd1, A_MUL = 4'd2, A_MAX = 4'd3, A_MIN = 4'd4,
    A_RELU = 4'd5, A_AVG = 4'd6, A_MOV = 4'd7, A_SRA = 4'd8, A_QNT = 4'd9
  } alu_e;

  typedef enum logic [1:0] {
    S_BPBS = 2'd0,       // BPBS result of lane 4*m + r[1:0]
    S_SC   = 2'd1,       // shortcut element 16*m + r[3:0]
    S_REG  = 2'd2,       // register r
    S_IMM  = 2'd3        // immediate r (0..31)
  } src_e;

  // register numbers above the general-purpose file
  localparam int R_NBL  = 16;  // read: left neighbour's exchange value; write: own exchange value
  localparam int R_NBR  = 17;  // read: right neighbour's exchange value; write: own exchange value
  localparam int R_LUTA = 18;  // write: LUT address
  localparam int R_LUTD = 19;  // read: LUT data at that address
  localparam int R_OUT  = 20;  // write: push to the output buffer

  typedef struct packed {
    logic [2:0] shb;     // left shift of operand b
    logic [4:0] rb;
    src_e       sb;
    logic [2:0] sha;     // left shift of operand a
    logic [4:0] ra;
    src_e       sa;
    logic [4:0] dst;
    alu_e       alu;
    cmpt_op_e   op;
  } cmpt_instr_t;

  // activity pulses of one core, counted by testbenches and usable as performance counters
  typedef struct packed {
    logic vec_done;    // an input vector finished sequencing into the CIMA
    logic pad;         // the input buffer wrote a padding zero
    logic bpbs_stall;  // the BPBS engine waited
    logic cmpt_stall;  // the CMPT engine waited
    logic f2f;         // partial sums from the neighbour core were added
    logic sc_pop;      // the shortcut buffer released an element
    logic sc_bypass;   // ... while in bypass mode
    logic lut;         // a LUT value was read
    logic xch;         // a neighbour exchange value was read
  } core_ev_t;

endpackage
