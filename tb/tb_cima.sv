// tb_cima: self-checking test of the CIMA model at a reduced size (32 rows x 8 columns).
// Loads random weights, applies random bit-planes in AND, XNOR, row-gated and 2x-rows modes and
// compares every ADC code with a count worked out here from the testbench's own copy of the
// weights. Also checks the conversion latency (LAT cycles after the sampling edge) and that the
// result is held until acknowledged.
module tb_cima;
  import imc_pkg::*;
  localparam int R = 32, C = 8, LAT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_xnor, cfg_ext, wr_en, plane_vld, plane_rdy, adc_vld, adc_ack;
  logic [3:0] cfg_adc_shift;
  logic [ROW_AW:0] cfg_active_rows;
  logic [ROW_AW-1:0] wr_row;
  logic [C-1:0] wr_data;
  logic [2*R-1:0] plane;
  logic [ADC_BITS-1:0] adc [C];

  cima #(.NROW(R), .NCOL(C), .LAT(LAT)) dut (.*);

  logic [C-1:0] w [R];
  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_code(int c, logic xn, logic ext, int rows, int sh);
    int n = 0;
    if (ext && c % 2 == 1) return 0;
    for (int h = 0; h < (ext ? 2 : 1); h++)
      for (int r = 0; r < rows && r < R; r++) begin
        logic p = xn ? ~(plane[h*R + r] ^ w[r][c + h]) : (plane[h*R + r] & w[r][c + h]);
        n += int'(p);
      end
    n = n >> sh;
    return n > 255 ? 255 : n;
  endfunction

  task automatic run_case(logic xn, logic ext, int rows, int sh);
    int n;
    @(negedge clk);
    cfg_xnor = xn; cfg_ext = ext; cfg_active_rows = (ROW_AW+1)'(rows); cfg_adc_shift = 4'(sh);
    for (int i = 0; i < 2*R; i++) plane[i] = 1'($urandom);
    plane_vld = 1;
    @(posedge clk);
    #1 plane_vld = 0;
    n = 0;
    while (!adc_vld) begin
      @(posedge clk); #1 n++;
    end
    checks++;
    if (n != LAT) begin failures++; $display("latency %0d, expected %0d", n, LAT); end
    repeat (3) @(posedge clk);
    #1 checks++;
    if (!adc_vld || plane_rdy) begin failures++; $display("result not held"); end
    for (int c = 0; c < C; c++) begin
      checks++;
      if (int'(adc[c]) != expect_code(c, xn, ext, rows, sh)) begin
        failures++;
        $display("col %0d code %0d expected %0d (xnor=%0d ext=%0d rows=%0d)", c, adc[c],
                 expect_code(c, xn, ext, rows, sh), xn, ext, rows);
      end
    end
    @(negedge clk) adc_ack = 1;
    @(negedge clk) adc_ack = 0;
    checks++;
    if (!plane_rdy) begin failures++; $display("not ready after ack"); end
  endtask

  initial begin
    wr_en = 0; plane_vld = 0; adc_ack = 0; cfg_xnor = 0; cfg_ext = 0; cfg_adc_shift = 0;
    cfg_active_rows = R; wr_row = 0; wr_data = 0; plane = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++) begin
      @(negedge clk);
      w[r] = C'($urandom);
      wr_en = 1; wr_row = ROW_AW'(r); wr_data = w[r];
    end
    @(negedge clk) wr_en = 0;
    for (int k = 0; k < 4; k++) begin
      run_case(0, 0, R, 0);
      run_case(1, 0, R, 0);
      run_case(0, 0, 9 + k, 0);
      run_case(1, 0, R, 2);
      run_case(0, 1, R, 0);
      run_case(1, 1, 20, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
