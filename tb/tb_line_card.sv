// tb_line_card: random packet arrivals (1 to 4 cells, occasionally an empty
// fanout) and random partial grants into a line card with 3 queues of 4 cells.
// A model of the queues checks every slot: packet-by-packet round-robin queue
// assignment and back-pressure, the HoL residual fanout and length of each queue,
// the cell and mask sent to the crossbar, and removal of a cell only once all of
// its outputs have been served. Counts partial (split) and completing grants.
module tb_line_card;
  localparam int unsigned N = 6;
  localparam int unsigned K = 3;
  localparam int unsigned CW = 32;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned QW = $clog2(K);
  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic in_valid, in_last, in_ready;
  logic [CW-1:0] in_cell;
  logic [N-1:0] in_fanout;
  logic [K-1:0] hol_valid;
  logic [N-1:0] hol_fanout [K];
  logic [LW-1:0] q_len [K];
  logic gnt_valid, tx_valid;
  logic [QW-1:0] gnt_queue;
  logic [N-1:0] gnt_mask, tx_mask;
  logic [CW-1:0] tx_cell;

  line_card #(.N(N), .K(K), .CELL_W(CW), .DEPTH(DEPTH)) dut (.*);

  typedef struct { logic [CW-1:0] data; logic [N-1:0] fan; } ent_t;
  ent_t mq [K][$];
  logic [N-1:0] mserved [K];
  int wq = 0;
  int checks = 0, failures = 0, n_split = 0, n_done = 0, n_block = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] resid;
    int q;
    bit acc;
    in_valid = 0; in_last = 0; in_cell = '0; in_fanout = '0;
    gnt_valid = 0; gnt_queue = '0; gnt_mask = '0;
    foreach (mserved[k]) mserved[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      // arrival
      in_valid = ($urandom_range(0, 2) != 0);
      in_cell = $urandom;
      in_fanout = ($urandom_range(0, 19) == 0) ? '0 : N'($urandom);
      in_last = ($urandom_range(0, 2) == 0);
      // grant for a random non-empty queue, a random non-empty part of its residue
      gnt_valid = 0; gnt_queue = '0; gnt_mask = '0;
      q = $urandom_range(0, K - 1);
      if (mq[q].size() > 0 && $urandom_range(0, 1) == 1) begin
        resid = mq[q][0].fan & ~mserved[q];
        gnt_valid = 1; gnt_queue = QW'(q);
        gnt_mask = resid & N'($urandom);
        if (gnt_mask == '0) gnt_mask = resid;
      end
      #1;
      checks++;
      if (in_ready !== (mq[wq].size() < DEPTH)) begin failures++; $display("t=%0d in_ready %0d", t, in_ready); end
      if (!in_ready) n_block++;
      for (int k = 0; k < K; k++) begin
        checks++;
        if (hol_valid[k] !== (mq[k].size() > 0) || q_len[k] !== LW'(mq[k].size()) ||
            (mq[k].size() > 0 && hol_fanout[k] !== (mq[k][0].fan & ~mserved[k]))) begin
          failures++; $display("t=%0d queue %0d state v=%0d len=%0d fan=%b", t, k, hol_valid[k], q_len[k], hol_fanout[k]);
        end
      end
      checks++;
      if (tx_valid !== gnt_valid || tx_mask !== gnt_mask || (gnt_valid && tx_cell !== mq[q][0].data)) begin
        failures++; $display("t=%0d tx v=%0d mask=%b cell=%h", t, tx_valid, tx_mask, tx_cell);
      end
      acc = in_valid && mq[wq].size() < DEPTH;
      @(posedge clk);
      // model update
      if (gnt_valid) begin
        resid = mq[q][0].fan & ~mserved[q] & ~gnt_mask;
        if (resid == '0) begin void'(mq[q].pop_front()); mserved[q] = '0; n_done++; end
        else begin mserved[q] |= gnt_mask; n_split++; end
      end
      if (acc) begin
        if (in_fanout != '0) mq[wq].push_back('{in_cell, in_fanout});
        if (in_last) wq = (wq + 1) % K;
      end
      @(negedge clk);
    end
    $display("split grants=%0d completing grants=%0d back-pressure slots=%0d", n_split, n_done, n_block);
    checks++;
    if (n_split == 0 || n_done == 0 || n_block == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
