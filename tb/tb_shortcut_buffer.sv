// tb_shortcut_buffer: self-checking test of the shortcut buffer (8-element vector, 2 lanes).
// SIMD mode: sends 8 random elements with a configured latency of 30 cycles and checks that the
// vector appears no earlier than 30 cycles after the last element arrived, holds the right
// values and clears on release. Bypass mode: sends elements and decodes the two output lanes
// here, checking values, round-robin order and the minimum delay.
module tb_shortcut_buffer;
  import imc_pkg::*;
  localparam int V = 8, NL = 2, LATC = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_loc_t cfg;
  ser_t lanes_in [NL];
  ser_t lanes_out [NL];
  logic sc_vld, sc_rel, pop_event, bypass_mode;
  logic [ACT_W-1:0] sc_vec [V];

  shortcut_buffer #(.VEC(V), .NLANE(NL), .FDEPTH(16)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wcfg(logic [31:0] d);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: 16'h0, data: d};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic send(int l, int v);
    for (int b = 0; b < 4; b++) begin
      @(negedge clk);
      lanes_in[l] = '{vld: 1'b1, dat: 1'(v >> b)};
    end
    @(negedge clk) lanes_in[l] = '0;
  endtask

  int vals [V];
  int last_in;
  // bypass-mode receiver
  int rx_val [$];
  int rx_lane [$];
  int rx_time [$];
  int sh [NL], nb [NL];
  always @(negedge clk) begin
    for (int l = 0; l < NL; l++) begin
      if (lanes_out[l].vld) begin
        sh[l] |= int'(lanes_out[l].dat) << nb[l];
        nb[l]++;
        if (nb[l] == 4) begin
          rx_val.push_back(sh[l]); rx_lane.push_back(l); rx_time.push_back(cyc);
          sh[l] = 0; nb[l] = 0;
        end
      end
    end
  end

  initial begin
    cfg = '0; sc_rel = 0;
    for (int l = 0; l < NL; l++) begin lanes_in[l] = '0; sh[l] = 0; nb[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // bits=4, vec_len=8, bypass=0, latency=30
    wcfg({4'd4, 9'(V), 1'b0, 12'(LATC)});
    for (int i = 0; i < V; i++) vals[i] = $urandom_range(0, 15);
    for (int i = 0; i < V; i += 2) fork
      send(0, vals[i]);
      send(1, vals[i+1]);
    join
    last_in = cyc;
    while (!sc_vld) @(posedge clk);
    checks++;
    if (cyc - last_in < LATC) begin failures++; $display("vector after %0d cycles, < %0d", cyc - last_in, LATC); end
    checks++;
    if (cyc - last_in > LATC + 4) begin failures++; $display("vector late: %0d cycles", cyc - last_in); end
    for (int i = 0; i < V; i++) begin
      checks++;
      if (int'(sc_vec[i]) != vals[i]) begin failures++; $display("sc_vec[%0d]=%0d expected %0d", i, sc_vec[i], vals[i]); end
    end
    @(negedge clk) sc_rel = 1;
    @(negedge clk) sc_rel = 0;
    checks++;
    if (sc_vld) begin failures++; $display("not released"); end

    // bypass mode, latency 12
    wcfg({4'd4, 9'(V), 1'b1, 12'd12});
    for (int i = 0; i < 6; i += 2) fork
      send(0, vals[i]);
      send(1, vals[i+1]);
    join
    repeat (60) @(negedge clk);
    checks++;
    if (rx_val.size() != 6) begin failures++; $display("bypass delivered %0d elements", rx_val.size()); end
    for (int i = 0; i < rx_val.size() && i < 6; i++) begin
      checks++;
      if (rx_val[i] != vals[i] || rx_lane[i] != i % NL) begin
        failures++;
        $display("bypass %0d: value %0d lane %0d, expected %0d lane %0d", i, rx_val[i], rx_lane[i], vals[i], i % NL);
      end
    end
    checks++;
    if (sc_vld) begin failures++; $display("bypass data reached the SIMD vector"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
