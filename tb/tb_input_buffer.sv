// tb_input_buffer: self-checking test of the input buffer with 4 banks and 16 physical rows.
// Fills the banks bit-serially with random 4-b activations and per-bank zero padding, collects
// the bit-planes sent to the CIMA (with random back-pressure) and rebuilds each row's value,
// which must equal the densely packed vector expected here. Then repeats with two summed fills
// (saturating add) and checks that a second vector can fill while the first is still sequencing.
// Last, window reuse: banks 0 and 3 keep the newest 1 and 2 elements of the previous vector and
// take only the rest from their lanes; the shifted-and-refilled vector is checked row by row.
module tb_input_buffer;
  import imc_pkg::*;
  localparam int R = 16, NB = 4, VW = 2*R;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_loc_t cfg;
  ser_t lanes [NB];
  logic plane_vld, plane_rdy, vec_done, pad_event;
  logic [VW-1:0] plane;
  logic [3:0] xbits;

  input_buffer #(.NROW(R), .NBANK(NB)) dut (.*);

  int checks = 0, failures = 0, pads = 0, dones = 0;
  int fill [NB] = '{3, 2, 0, 4};
  int padl [NB] = '{1, 0, 2, 0};
  int exp_v [VW];
  int got_v [VW];
  int data1 [NB][8];
  int data2 [NB][8];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (pad_event) pads++;
    if (vec_done) dones++;
  end

  task automatic wcfg(logic [15:0] a, logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: a, data: d};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic send_lane(int l, int n, int vals [8], int gap);
    for (int e = 0; e < n; e++) begin
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        lanes[l] = '{vld: 1'b1, dat: 1'(vals[e] >> b)};
      end
      @(negedge clk) lanes[l] = '0;
      repeat (gap) @(negedge clk);
    end
  endtask

  task automatic fill_all(int vals [NB][8]);
    fork
      send_lane(0, fill[0], vals[0], 0);
      send_lane(1, fill[1], vals[1], 1);
      send_lane(2, fill[2], vals[2], 0);
      send_lane(3, fill[3], vals[3], 2);
    join
  endtask

  // collect xbits planes, with random stalls
  task automatic collect(int stall_first);
    for (int i = 0; i < VW; i++) got_v[i] = 0;
    repeat (stall_first) @(negedge clk);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      while (!plane_vld) @(negedge clk);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      for (int i = 0; i < VW; i++) got_v[i] |= int'(plane[i]) << b;
      plane_rdy = 1;
      @(negedge clk) plane_rdy = 0;
    end
  endtask

  function automatic void build_expect(int a [NB][8], int b [NB][8], bit two);
    int r = 0;
    for (int k = 0; k < NB; k++) begin
      for (int p = 0; p < padl[k]; p++) exp_v[r++] = 0;
      for (int e = 0; e < fill[k]; e++) begin
        int s = two ? a[k][e] + b[k][e] : a[k][e];
        exp_v[r++] = s > 15 ? 15 : s;
      end
    end
  endfunction

  task automatic compare(string what);
    int used = 0;
    for (int k = 0; k < NB; k++) used += fill[k] + padl[k];
    for (int i = 0; i < used; i++) begin
      checks++;
      if (got_v[i] != exp_v[i]) begin
        failures++;
        $display("%s: row %0d got %0d expected %0d", what, i, got_v[i], exp_v[i]);
      end
    end
  endtask

  initial begin
    cfg = '0; plane_rdy = 0;
    for (int l = 0; l < NB; l++) lanes[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wcfg(16'h0000, 32'h4);                       // 4-b activations, one fill
    for (int k = 0; k < NB; k++) begin
      wcfg(16'h1000 | 16'(k), 32'(fill[k]));
      wcfg(16'h2000 | 16'(k), 32'(padl[k]));
    end
    for (int k = 0; k < NB; k++) for (int e = 0; e < 8; e++) begin
      data1[k][e] = $urandom_range(0, 15);
      data2[k][e] = $urandom_range(0, 15);
    end
    // vector 1, then vector 2 filled while vector 1 waits for the CIMA
    fill_all(data1);
    fill_all(data2);
    build_expect(data1, data2, 0);
    collect(5);
    compare("vector 1");
    build_expect(data2, data1, 0);
    collect(0);
    compare("vector 2 (ping-pong)");
    // two summed fills
    wcfg(16'h0000, 32'h24);
    fill_all(data1);
    fill_all(data2);
    build_expect(data1, data2, 1);
    collect(0);
    compare("summed fills");
    // window reuse
    wcfg(16'h0000, 32'h4);
    wcfg(16'h3000, 1);
    wcfg(16'h3003, 2);
    wcfg(16'h4000, 0);                          // restart: first window filled in full
    fill_all(data1);
    build_expect(data1, data1, 0);
    collect(0);
    compare("first window");
    fork
      send_lane(0, fill[0] - 1, data2[0], 0);
      send_lane(1, fill[1], data2[1], 1);
      send_lane(3, fill[3] - 2, data2[3], 0);
    join
    begin
      int nxt [NB][8];
      for (int e = 0; e < 8; e++) begin
        nxt[0][e] = (e < 1) ? data1[0][fill[0] - 1 + e] : data2[0][e - 1];
        nxt[1][e] = data2[1][e];
        nxt[2][e] = 0;
        nxt[3][e] = (e < 2) ? data1[3][fill[3] - 2 + e] : data2[3][e - 2];
      end
      build_expect(nxt, nxt, 0);
    end
    collect(0);
    compare("slid window");
    repeat (5) @(negedge clk);
    checks++;
    if (pads != 18) begin failures++; $display("padding cycles %0d, expected 18", pads); end
    checks++;
    if (dones != 5) begin failures++; $display("vectors done %0d, expected 5", dones); end
    checks++;
    if (plane_vld) begin failures++; $display("spurious plane"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
