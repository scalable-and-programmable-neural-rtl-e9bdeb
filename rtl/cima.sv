// cima: behavioural, bit-true model of the compute-in-memory array (CIMA).
//
// The real block is a mixed-signal macro: 1152 rows x 256 columns of SRAM bit cells whose
// 1-b products (AND or XNOR of a stored weight bit and an input bit) are summed as charge on each
// column's compute line and digitised by an 8-b SAR ADC per column. This model keeps the
// digital behaviour only: each column count is the number of active rows whose product is 1,
// and the ADC code is that count right-shifted by adc_shift and saturated to 8 bits. Rows at or
// above active_rows are gated (weights are packed at the base of the array). In the 2304x128
// configuration (ext=1) column pair 2c/2c+1 forms one column of 2304 rows: column 2c sees input
// bits 0..1151, column 2c+1 sees bits 1152..2303, and the summed code is reported at index 2c
// (index 2c+1 reads 0).
//
// Interface: weights are written one row (256 bits) per cycle through wr_*. An input bit-plane
// is accepted with plane_vld && plane_rdy; after LAT cycles all codes appear on adc with
// adc_vld held until adc_ack. One conversion is in flight at a time. The array sizes and the
// 8-b ADC follow the published design; the shift-and-saturate ADC transfer, the conversion
// latency (10 cycles: a 200 MHz digital clock against 20 MS/s ADC outputs) and the handshake are
// this model's choices.
module cima
  import imc_pkg::*;
#(
  parameter int NROW = ROWS,
  parameter int NCOL = COLS,
  parameter int LAT  = ADC_LAT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration
  input  logic                     cfg_xnor,      // 1: XNOR products, 0: AND products
  input  logic                     cfg_ext,       // 1: 2*NROW x NCOL/2 configuration
  input  logic [3:0]               cfg_adc_shift,
  input  logic [ROW_AW:0]          cfg_active_rows,
  // weight write port
  input  logic                     wr_en,
  input  logic [ROW_AW-1:0]        wr_row,
  input  logic [NCOL-1:0]          wr_data,
  // input bit-plane
  input  logic                     plane_vld,
  output logic                     plane_rdy,
  input  logic [2*NROW-1:0]        plane,
  // digitised column results
  output logic                     adc_vld,
  input  logic                     adc_ack,
  output logic [ADC_BITS-1:0]      adc [NCOL]
);

  logic [NCOL-1:0] cells [NROW];

  typedef enum logic [1:0] {IDLE, CONV, FULL} st_e;
  st_e st;
  logic [$clog2(LAT+1)-1:0] cnt;
  logic [ADC_BITS-1:0] code [NCOL];

  assign plane_rdy = (st == IDLE);
  assign adc_vld   = (st == FULL);
  assign adc       = code;

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_row) < NROW) cells[int'(wr_row)] <= wr_data;
  end

  // column count of one physical column for one half of the input plane
  function automatic int colcount(int c, int half);
    int n = 0;
    for (int r = 0; r < NROW; r++) begin
      if (r < int'(cfg_active_rows)) begin
        logic x, w;
        x = plane[half*NROW + r];
        w = cells[r][c];
        if (cfg_xnor ? (x ~^ w) : (x & w)) n++;
      end
    end
    return n;
  endfunction

  function automatic logic [ADC_BITS-1:0] quant(int n);
    int q = n >> cfg_adc_shift;
    return (q > (1 << ADC_BITS) - 1) ? ADC_BITS'((1 << ADC_BITS) - 1) : ADC_BITS'(q);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= IDLE;
      cnt <= '0;
      for (int c = 0; c < NCOL; c++) code[c] <= '0;
    end else begin
      unique case (st)
        IDLE: if (plane_vld) begin
          // sample the plane: the charge is shared at once, the ADC then takes LAT cycles
          for (int c = 0; c < NCOL; c++) begin
            if (!cfg_ext)        code[c] <= quant(colcount(c, 0));
            else if (c % 2 == 0) code[c] <= quant(colcount(c, 0) + colcount(c + 1, 1));
            else                 code[c] <= '0;
          end
          cnt <= '0;
          st  <= CONV;
        end
        CONV: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) >= LAT - 1) st <= FULL;
        end
        FULL: if (adc_ack) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

endmodule
