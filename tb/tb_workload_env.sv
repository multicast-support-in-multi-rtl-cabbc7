// tb_workload_env: one switch at the default size (16 x 16, RTT = 4) with QPS
// queues per pointer value, run through the traffic patterns used to evaluate
// IMRR, each after a fresh reset, with every active input kept overloaded:
//   0 uniform multicast cells: every output in the fanout with probability 1/2
//   1 gathered: only 5 inputs active, each output in the fanout with probability
//     3.66/16 (binomial fanout of mean 3.66, an empty fanout is drawn again)
//   2 unicast / broadcast, half of the cells each
//   3 unicast / uniform multicast, each half of the offered output load
//   4 uniform multicast packets of 1 to 16 cells with one fanout set per packet
//   5 uniform unicast cells
// For each run it reports the saturation throughput (copies delivered per output
// and slot, slots 300 to 1500), the rate of fully served cells per active input,
// the mean matching size (crossbar edges per slot) and the mean matching
// persistency (edges kept from one slot to the next), and returns the
// throughputs in thr. Checks: every copy reaches exactly the outputs of its
// cell, intact, and every accepted cell is fully delivered in the drain that
// follows. With QPS = 1 the throughput must also lie in a band around the values
// reported for this scheduler at RTT = 4: about 0.95 for multicast cells, about
// 0.57 for gathered traffic, about 0.99 and 0.81 for the two mixes, about 0.8 for
// multicast packets and 0.6 for unicast only (head-of-line blocking).
module tb_workload_env #(
  parameter int unsigned QPS = 1
) (
  output int  checks,
  output int  failures,
  output real thr [6],
  output logic done
);
  import imrr_pkg::*;
  localparam int unsigned N = N_PORTS;
  localparam int unsigned CW = CELL_BITS;
  localparam int unsigned WW = $clog2(N + 1);
  localparam int RUN_SLOTS = 1500;
  localparam int WARM = 300;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid = '0, in_last = '0, in_ready, out_valid;
  logic [CW-1:0] in_cell [N];
  logic [N-1:0] in_fanout [N];
  logic [CW-1:0] out_cell [N];
  logic [WW-1:0] match_size;

  always #5 clk = ~clk;

  imrr_switch #(.QPS(QPS)) dut (.*);

  logic [N-1:0] owed [int];
  int slot = 0, copies = 0, cells_done = 0, match_sum = 0, persist_sum = 0, meas = 0;
  logic [N-1:0] prev_cfg_v = '0;
  logic [$clog2(N)-1:0] prev_cfg_i [N];

  function automatic logic [CW-1:0] make_cell(int id);
    logic [CW-1:0] c;
    for (int w = 0; w < int'(CW / 32); w++) c[w*32 +: 32] = 32'(id) ^ (32'(w) * 32'h7F4A7C15);
    return c;
  endfunction

  function automatic logic [N-1:0] fan_bits(int permille);
    logic [N-1:0] f;
    do begin
      for (int j = 0; j < int'(N); j++) f[j] = ($urandom_range(0, 999) < permille);
    end while (f == '0);
    return f;
  endfunction

  function automatic logic [N-1:0] draw_fanout(int mode);
    case (mode)
      1: return fan_bits(229);
      // half of the cells broadcast
      2: return ($urandom_range(0, 1) == 0) ? N'(1) << $urandom_range(0, N - 1) : '1;
      // half of the offered copies multicast: one multicast cell (mean fanout 8)
      // per 8 unicast cells
      3: return ($urandom_range(0, 8) != 0) ? N'(1) << $urandom_range(0, N - 1) : fan_bits(500);
      5: return N'(1) << $urandom_range(0, N - 1);
      default: return fan_bits(500);
    endcase
  endfunction

  // deliveries, matching statistics
  always @(posedge clk) if (rst_n) begin
    int p;
    slot <= slot + 1;
    for (int j = 0; j < int'(N); j++) if (out_valid[j]) begin
      int id;
      id = int'(out_cell[j][31:0]);
      checks++;
      if (!owed.exists(id) || !owed[id][j] || out_cell[j] !== make_cell(id)) begin
        failures++; $display("output %0d: unexpected cell %h", j, id);
      end else begin
        owed[id][j] = 1'b0;
        if (owed[id] == '0) begin owed.delete(id); if (slot >= WARM && slot < RUN_SLOTS) cells_done++; end
        if (slot >= WARM && slot < RUN_SLOTS) copies++;
      end
    end
    if (slot >= WARM && slot < RUN_SLOTS) begin
      p = 0;
      for (int j = 0; j < int'(N); j++)
        if (dut.cfg_valid[j] && prev_cfg_v[j] && dut.cfg_idx[j] == prev_cfg_i[j]) p++;
      match_sum += int'(match_size);
      persist_sum += p;
      meas++;
    end
    prev_cfg_v <= dut.cfg_valid;
    prev_cfg_i <= dut.cfg_idx;
  end

  initial begin
    int seq [N], pkt_left [N];
    logic [N-1:0] pkt_fan [N], acc;
    int active, t0, run_id;
    real cell_rate;
    string names [6] = '{"uniform multicast", "gathered (5 inputs, mean fanout 3.66)", "unicast/broadcast 50/50 cells",
                         "unicast/multicast 50/50 load", "multicast packets 1-16 cells", "uniform unicast"};
    real lo [6] = '{0.90, 0.52, 0.96, 0.75, 0.72, 0.55};
    real hi [6] = '{0.98, 0.65, 1.00, 0.87, 0.88, 0.65};
    checks = 0; failures = 0; done = 0;
    foreach (thr[m]) thr[m] = 0.0;
    foreach (in_cell[i]) begin in_cell[i] = '0; in_fanout[i] = '0; end
    foreach (prev_cfg_i[j]) prev_cfg_i[j] = '0;
    for (int mode = 0; mode < 6; mode++) begin
      // fresh reset
      @(negedge clk);
      rst_n = 0; in_valid = '0;
      repeat (3) @(negedge clk);
      slot = 0; copies = 0; cells_done = 0; match_sum = 0; persist_sum = 0; meas = 0;
      foreach (seq[i]) begin seq[i] = 0; pkt_left[i] = 0; pkt_fan[i] = '0; end
      rst_n = 1;
      active = (mode == 1) ? 5 : int'(N);
      while (slot < RUN_SLOTS) begin
        for (int i = 0; i < active; i++) if (!in_valid[i]) begin
          int id;
          if (pkt_left[i] == 0) begin
            pkt_left[i] = (mode == 4) ? $urandom_range(1, 16) : 1;
            pkt_fan[i] = draw_fanout(mode);
          end
          id = (mode << 24) | (i << 16) | (seq[i] & 16'hffff);
          in_valid[i] = 1'b1;
          in_cell[i] = make_cell(id);
          in_fanout[i] = pkt_fan[i];
          in_last[i] = (pkt_left[i] == 1);
        end
        #1;
        acc = in_valid & in_ready;
        for (int i = 0; i < int'(N); i++) if (acc[i]) owed[int'(in_cell[i][31:0])] = in_fanout[i];
        @(posedge clk);
        @(negedge clk);
        for (int i = 0; i < int'(N); i++) if (acc[i]) begin
          in_valid[i] = 1'b0; seq[i]++; pkt_left[i]--;
        end
      end
      in_valid = '0;
      t0 = slot;
      while (owed.size() > 0 && slot < t0 + 30000) @(negedge clk);
      checks++;
      if (owed.size() != 0) begin failures++; $display("%s: %0d cells not delivered", names[mode], owed.size()); owed.delete(); end
      thr[mode] = real'(copies) / real'(meas * N);
      cell_rate = real'(cells_done) / real'(meas * active);
      $display("QPS=%0d %-40s throughput %0.3f  cells/input/slot %0.3f  mean matching %0.2f  mean persistency %0.2f",
               QPS, names[mode], thr[mode], cell_rate, real'(match_sum) / real'(meas), real'(persist_sum) / real'(meas));
      if (QPS == 1) begin
        checks++;
        if (thr[mode] < lo[mode] || thr[mode] > hi[mode]) begin
          failures++; $display("%s: throughput outside %0.2f..%0.2f", names[mode], lo[mode], hi[mode]);
        end
      end
    end
    done = 1;
  end
endmodule
