// tb_imrr_switch: end-to-end test of the switch at its default size (16 x 16,
// RTT = 4 slots, RTT+1 = 5 queues per input, 64-byte cells). tb_switch_driver
// supplies the traffic and the scoreboard; this bench also watches the selectors
// and line cards and counts how often each mechanism of the scheduler occurred:
// grants to the preferential input, grants by smallest fanout, fanout splitting
// (a cell served in part), head-of-line removal, multicast copies in one slot,
// multi-cell packets and back-pressure. Each must occur at least once.
module tb_imrr_switch;
  import imrr_pkg::*;
  localparam int unsigned N = N_PORTS;
  localparam int unsigned RTT = RTT_SLOTS;
  localparam int unsigned QPS = QPS_DEF;
  localparam int unsigned CW = CELL_BITS;
  localparam int unsigned WW = $clog2(N + 1);

  logic clk = 0, rst_n;
  logic [N-1:0] in_valid, in_last, in_ready, out_valid;
  logic [CW-1:0] in_cell [N];
  logic [N-1:0] in_fanout [N];
  logic [CW-1:0] out_cell [N];
  logic [WW-1:0] match_size;
  int checks, failures, n_full, n_lat;
  logic done;

  always #5 clk = ~clk;

  imrr_switch dut (.*);

  tb_switch_driver #(.N(N), .RTT(RTT), .QPS(QPS), .CELL_W(CW)) drv (
    .clk, .rst_n, .in_valid, .in_cell, .in_fanout, .in_last, .in_ready,
    .out_valid, .out_cell, .match_size,
    .checks, .failures, .n_full_slots(n_full), .n_lat_ok(n_lat), .done);

  // mechanism counters, one per selector or line card
  int c_pref [N], c_minf [N], c_split [N], c_pop [N], c_mcast [N];
  int n_pref, n_minf, n_split, n_pop, n_mcast, n_bp = 0, n_pkt = 0;
  for (genvar j = 0; j < N; j++) begin : g_mo
    initial begin c_pref[j] = 0; c_minf[j] = 0; end
    always @(posedge clk) if (rst_n && dut.g_out[j].u_os.gnt_valid) begin
      if (dut.g_out[j].u_os.req[dut.g_out[j].u_os.pref]) c_pref[j]++;
      else c_minf[j]++;
    end
  end
  for (genvar i = 0; i < N; i++) begin : g_mi
    initial begin c_split[i] = 0; c_pop[i] = 0; c_mcast[i] = 0; end
    always @(posedge clk) if (rst_n && dut.g_in[i].u_lc.tx_valid) begin
      if (dut.g_in[i].u_lc.pop != '0) c_pop[i]++; else c_split[i]++;
      if ($countones(dut.g_in[i].u_lc.tx_mask) > 1) c_mcast[i]++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < int'(N); i++) begin
      if (in_valid[i] && !in_ready[i]) n_bp++;
      if (in_valid[i] && in_ready[i] && !in_last[i]) n_pkt++;
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int f;
    repeat (5) @(posedge clk);
    wait (done);
    f = failures;
    n_pref = c_pref.sum(); n_minf = c_minf.sum(); n_split = c_split.sum();
    n_pop = c_pop.sum(); n_mcast = c_mcast.sum();
    $display("preferential grants=%0d smallest-fanout grants=%0d split=%0d removed=%0d multicast sends=%0d back-pressure=%0d packet cells=%0d",
             n_pref, n_minf, n_split, n_pop, n_mcast, n_bp, n_pkt);
    if (n_pref == 0 || n_minf == 0 || n_split == 0 || n_pop == 0 || n_mcast == 0 || n_bp == 0 || n_pkt == 0 || n_lat == 0)
      f++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, f);
    $finish;
  end
endmodule
