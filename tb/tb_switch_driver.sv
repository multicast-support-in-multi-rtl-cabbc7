// tb_switch_driver: traffic source and scoreboard for the whole switch.
//
// Every cell carries a unique id (input, sequence number) repeated, scrambled,
// across its payload, and the scoreboard keeps the outputs each id still owes.
// Each delivered cell must be owed to that output and intact; cells delivered in
// the same slot from one input must be the same cell; at the end every cell must
// have reached its whole fanout set. The run has four phases:
//   1. latency: single cells into an empty switch; each must leave exactly in the
//      slot given by the queue pointer timing (request in the first slot at or
//      after arrival+1 whose pointer names the cell's queue group, output RTT+1
//      slots later);
//   2. broadcast overload: every input is kept full of broadcast cells; after the
//      pipeline has filled, every output must deliver a cell in every slot (100 %
//      throughput under broadcast overload);
//   3. mixed random traffic: packets of 1..PKT_MAX cells sharing one fanout set,
//      a mix of unicast, broadcast and random multicast fanouts, with back-pressure;
//   4. drain: no arrivals until every owed copy has been delivered.
module tb_switch_driver #(
  parameter int unsigned N = 16,
  parameter int unsigned RTT = 4,
  parameter int unsigned QPS = 1,
  parameter int unsigned CELL_W = 512,
  parameter int unsigned BCAST_SLOTS = 200,
  parameter int unsigned RAND_SLOTS = 1500,
  parameter int unsigned PKT_MAX = 16,
  parameter int unsigned LOAD_PCT = 6,
  localparam int unsigned WW = $clog2(N + 1)
) (
  input  logic              clk,
  output logic              rst_n,
  output logic [N-1:0]      in_valid,
  output logic [CELL_W-1:0] in_cell   [N],
  output logic [N-1:0]      in_fanout [N],
  output logic [N-1:0]      in_last,
  input  logic [N-1:0]      in_ready,
  input  logic [N-1:0]      out_valid,
  input  logic [CELL_W-1:0] out_cell  [N],
  input  logic [WW-1:0]     match_size,
  output int                checks,
  output int                failures,
  output int                n_full_slots,
  output int                n_lat_ok,
  output logic              done
);
  localparam int unsigned K = QPS * (RTT + 1);
  localparam logic [N-1:0] ALL = '1;

  int slot = 0;                 // slots since reset release
  logic [N-1:0] owed [int];     // id -> outputs still to receive it
  int wq [N];                   // queue that takes the next packet of each input
  int seq [N];
  int pkt_left [N];
  logic [N-1:0] pkt_fan [N];
  int phase = 0;
  int n_cells = 0, n_copies = 0;

  function automatic logic [CELL_W-1:0] make_cell(int id);
    logic [CELL_W-1:0] c;
    for (int w = 0; w < int'(CELL_W / 32); w++)
      c[w*32 +: 32] = (w == 0) ? 32'(id) : (32'(id) ^ (32'(w) * 32'h9E3779B9));
    return c;
  endfunction

  function automatic logic [N-1:0] rand_fanout();
    int r;
    logic [N-1:0] f;
    r = $urandom_range(0, 9);
    if (r < 3)      f = N'(1) << $urandom_range(0, N - 1);   // unicast
    else if (r < 4) f = ALL;                                 // broadcast
    else begin
      f = N'($urandom);
      if (f == '0) f = N'(1) << $urandom_range(0, N - 1);
    end
    return f;
  endfunction

  always @(posedge clk) if (rst_n) slot <= slot + 1;

  // scoreboard: deliveries
  always @(posedge clk) begin
    if (rst_n) begin
      int src_id [N];
      foreach (src_id[i]) src_id[i] = -1;
      for (int j = 0; j < int'(N); j++) begin
        if (out_valid[j]) begin
          int id, src;
          id = int'(out_cell[j][31:0]);
          src = id >>> 20;
          checks++;
          n_copies++;
          if (!owed.exists(id) || !owed[id][j] || out_cell[j] !== make_cell(id) || src >= int'(N)) begin
            failures++;
            $display("slot %0d: output %0d got unexpected cell %h", slot, j, id);
          end else begin
            owed[id][j] = 1'b0;
            if (owed[id] == '0) owed.delete(id);
            if (src_id[src] >= 0 && src_id[src] != id) begin
              failures++;
              $display("slot %0d: input %0d sent two cells in one slot", slot, src);
            end
            src_id[src] = id;
          end
        end
      end
      if (phase == 2 && out_valid == ALL) n_full_slots++;
    end
  end

  // accept bookkeeping for one input; called after a posedge for cells offered
  task automatic note_accept(int i, logic acc);
    if (acc) begin
      if (in_last[i]) wq[i] = (wq[i] + 1) % K;
      seq[i]++;
      n_cells++;
      if (pkt_left[i] > 0) pkt_left[i]--;
    end
  endtask

  task automatic offer(int i, logic [N-1:0] fan, logic last);
    int id;
    id = (i << 20) | seq[i];
    in_valid[i] = 1'b1;
    in_cell[i] = make_cell(id);
    in_fanout[i] = fan;
    in_last[i] = last;
  endtask

  task automatic register_offer(int i);
    int id;
    id = (i << 20) | seq[i];
    owed[id] = in_fanout[i];
  endtask

  initial begin
    int exp_slot, a, grp, i0, t0, bcast_from;
    logic [N-1:0] f0;
    logic [N-1:0] acc;
    checks = 0; failures = 0; n_full_slots = 0; n_lat_ok = 0; done = 0;
    rst_n = 0; in_valid = '0; in_last = '0;
    for (int i = 0; i < int'(N); i++) begin
      in_cell[i] = '0; in_fanout[i] = '0; wq[i] = 0; seq[i] = 0; pkt_left[i] = 0; pkt_fan[i] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // ---- phase 1: latency of single cells in an empty switch
    phase = 1;
    for (int n = 0; n < 6; n++) begin
      i0 = $urandom_range(0, N - 1);
      f0 = rand_fanout();
      repeat ($urandom_range(0, 3)) @(negedge clk);
      offer(i0, f0, 1'b1);
      a = slot;
      grp = wq[i0] / QPS;
      exp_slot = a + 1;
      while (exp_slot % (RTT + 1) != grp) exp_slot++;
      exp_slot += RTT + 1;
      #1;
      checks++;
      if (!in_ready[i0]) begin failures++; $display("input %0d not ready when empty", i0); end
      register_offer(i0);
      @(posedge clk);
      note_accept(i0, 1'b1);
      @(negedge clk);
      in_valid = '0;
      // wait for the whole fanout to come out
      t0 = slot;
      while (owed.exists((i0 << 20) | (seq[i0] - 1)) && slot < t0 + 4 * int'(RTT) + 20) begin
        #1;
        if (out_valid != '0) begin
          checks++;
          if (slot != exp_slot || out_valid != f0) begin
            failures++;
            $display("latency: cell of input %0d left in slot %0d to %b, expected slot %0d to %b", i0, slot, out_valid, exp_slot, f0);
          end else n_lat_ok++;
        end
        @(negedge clk);
      end
      checks++;
      if (owed.exists((i0 << 20) | (seq[i0] - 1))) begin failures++; $display("latency cell lost"); end
      repeat (2) @(negedge clk);
    end

    // ---- phase 2: broadcast overload
    bcast_from = slot;
    for (int t = 0; t < int'(BCAST_SLOTS); t++) begin
      phase = (slot >= bcast_from + 3 * int'(K) + 2 * int'(RTT) + 4) ? 2 : 0;
      for (int i = 0; i < int'(N); i++) if (!in_valid[i]) offer(i, ALL, 1'b1);
      #1;
      for (int i = 0; i < int'(N); i++) if (in_valid[i] && in_ready[i]) register_offer(i);
      acc = in_valid & in_ready;
      @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) begin
        note_accept(i, acc[i]);
        if (acc[i]) in_valid[i] = 1'b0;
      end
      if (phase == 2) begin
        checks++;
      end
    end
    phase = 3;
    in_valid = '0;
    checks++;
    if (n_full_slots < int'(BCAST_SLOTS) - 3 * int'(K) - 2 * int'(RTT) - 6) begin
      failures++;
      $display("broadcast overload: only %0d full slots", n_full_slots);
    end

    // ---- phase 3: mixed random packet traffic
    for (int t = 0; t < int'(RAND_SLOTS); t++) begin
      for (int i = 0; i < int'(N); i++) begin
        if (!in_valid[i]) begin
          if (pkt_left[i] == 0 && $urandom_range(0, 99) < int'(LOAD_PCT)) begin
            pkt_left[i] = $urandom_range(1, PKT_MAX);
            pkt_fan[i] = rand_fanout();
          end
          if (pkt_left[i] > 0) offer(i, pkt_fan[i], pkt_left[i] == 1);
        end
      end
      #1;
      for (int i = 0; i < int'(N); i++) if (in_valid[i] && in_ready[i]) register_offer(i);
      acc = in_valid & in_ready;
      @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) begin
        note_accept(i, acc[i]);
        if (acc[i]) in_valid[i] = 1'b0;
      end
    end
    // finish the packets still being offered
    while (in_valid != '0 || pkt_left.sum() != 0) begin
      for (int i = 0; i < int'(N); i++)
        if (!in_valid[i] && pkt_left[i] > 0) offer(i, pkt_fan[i], pkt_left[i] == 1);
      #1;
      for (int i = 0; i < int'(N); i++) if (in_valid[i] && in_ready[i]) register_offer(i);
      acc = in_valid & in_ready;
      @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) begin
        note_accept(i, acc[i]);
        if (acc[i]) in_valid[i] = 1'b0;
      end
    end

    // ---- phase 4: drain
    t0 = slot;
    while (owed.size() > 0 && slot < t0 + 20000) @(negedge clk);
    checks++;
    if (owed.size() != 0) begin
      failures++;
      $display("%0d cells never fully delivered", owed.size());
    end
    $display("cells=%0d copies delivered=%0d full broadcast slots=%0d exact-latency cells=%0d slots=%0d",
             n_cells, n_copies, n_full_slots, n_lat_ok, slot);
    done = 1;
  end
endmodule
