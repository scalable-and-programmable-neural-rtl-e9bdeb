// tb_wl_network: self-checking test of the weight-loading network (4 cores, 8 columns). Sends
// rows with random multicast masks, including gaps, and checks two cycles later that exactly the
// masked cores are written with that row and data, plus the count of delivered rows.
module tb_wl_network;
  import imc_pkg::*;
  localparam int NCR = 4, NCL = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_vld;
  logic [NCR-1:0] in_mask, core_we;
  logic [ROW_AW-1:0] in_row, core_row;
  logic [NCL-1:0] in_data, core_data;
  logic [31:0] n_rows;

  wl_network #(.NCORE(NCR), .NCOL(NCL), .STAGES(2)) dut (.*);

  int checks = 0, failures = 0, sent = 0;
  logic hv [3];
  logic [NCR-1:0] hm [3];
  logic [ROW_AW-1:0] hr [3];
  logic [NCL-1:0] hd [3];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_vld = 0; in_mask = '0; in_row = '0; in_data = '0;
    for (int j = 0; j < 3; j++) begin hv[j] = 0; hm[j] = '0; hr[j] = '0; hd[j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      if (k >= 2) begin
        logic [NCR-1:0] e;
        e = hv[1] ? hm[1] : '0;
        checks++;
        if (core_we != e) begin failures++; $display("k %0d: we %b expected %b", k, core_we, e); end
        if (e != '0) begin
          checks++;
          if (core_row != hr[1] || core_data != hd[1]) begin failures++; $display("k %0d: row/data wrong", k); end
        end
      end
      for (int j = 2; j > 0; j--) begin hv[j] = hv[j-1]; hm[j] = hm[j-1]; hr[j] = hr[j-1]; hd[j] = hd[j-1]; end
      in_vld = (k < 190) && ($urandom_range(0, 3) != 0);
      in_mask = NCR'($urandom);
      in_row = ROW_AW'($urandom_range(0, 1151));
      in_data = NCL'($urandom);
      if (in_vld && in_mask != '0) sent++;
      hv[0] = in_vld; hm[0] = in_mask; hr[0] = in_row; hd[0] = in_data;
    end
    checks++;
    if (int'(n_rows) != sent) begin failures++; $display("n_rows %0d expected %0d", n_rows, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
