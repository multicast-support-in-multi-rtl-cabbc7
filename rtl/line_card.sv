// line_card: input port of the IMRR switch, holding the multicast queues.
//
// Arriving cells carry a payload and a fanout set (bit j = output j; a unicast
// cell has one bit set). The line card has K FIFO queues, K = RTT+1 (or
// 2(RTT+1)), so that a head-of-line (HoL) cell waiting RTT slots for its grants
// does not block requests for the other queues. Cells are assigned to queues
// packet by packet: all cells of a packet go to the same queue and the next
// packet goes to the next queue in round-robin order (in_last marks the last
// cell of a packet). in_ready is low when the queue taking the current packet is
// full; the sender must then hold the cell. A cell with an empty fanout set is
// dropped on arrival.
//
// For every queue the card reports the residual fanout of the HoL cell (the
// outputs still to be served) and the queue length to its input selector. When
// the selector returns grants (gnt_valid, the queue they belong to and the mask
// of granting outputs), the card presents that queue's HoL cell to the crossbar
// (tx_valid/tx_cell) in the same slot and marks those outputs as served. Outputs
// that were not granted stay in the residual fanout and are requested again the
// next time the queue comes round (fanout splitting). When no output is left the
// cell leaves the queue. The queue structure and removal rule follow the
// IMRR scheme; the queue-assignment order and the handshake are this design's own.
module line_card #(
  parameter int unsigned N      = 16,
  parameter int unsigned K      = 5,
  parameter int unsigned CELL_W = 512,
  parameter int unsigned DEPTH  = 32,
  localparam int unsigned QW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LW    = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // arriving cells
  input  logic              in_valid,
  input  logic [CELL_W-1:0] in_cell,
  input  logic [N-1:0]      in_fanout,
  input  logic              in_last,
  output logic              in_ready,
  // queue state towards the input selector
  output logic [K-1:0]      hol_valid,
  output logic [N-1:0]      hol_fanout [K],
  output logic [LW-1:0]     q_len      [K],
  // grants from the input selector
  input  logic              gnt_valid,
  input  logic [QW-1:0]     gnt_queue,
  input  logic [N-1:0]      gnt_mask,
  // towards the crossbar
  output logic              tx_valid,
  output logic [CELL_W-1:0] tx_cell,
  output logic [N-1:0]      tx_mask
);

  logic [QW-1:0]       wr_q;
  logic [N-1:0]        served  [K];
  logic [CELL_W+N-1:0] head    [K];
  logic [K-1:0]        empty, full, push, pop;

  assign in_ready = !full[wr_q];

  for (genvar k = 0; k < K; k++) begin : g_q
    assign push[k] = in_valid && in_ready && (|in_fanout) && (wr_q == QW'(k));
    mc_fifo #(.W(CELL_W + N), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push      (push[k]),
      .push_data ({in_fanout, in_cell}),
      .pop       (pop[k]),
      .head      (head[k]),
      .empty     (empty[k]),
      .full      (full[k]),
      .count     (q_len[k])
    );
    assign hol_valid[k]  = !empty[k];
    assign hol_fanout[k] = empty[k] ? '0 : (head[k][CELL_W +: N] & ~served[k]);
  end

  // Cell sent to the crossbar for the granted queue.
  always_comb begin
    tx_mask  = gnt_valid ? (gnt_mask & hol_fanout[gnt_queue]) : '0;
    tx_valid = |tx_mask;
    tx_cell  = head[gnt_queue][CELL_W-1:0];
  end

  // Residual fanout bookkeeping and HoL removal.
  always_comb begin
    pop = '0;
    if (tx_valid && ((hol_fanout[gnt_queue] & ~tx_mask) == '0)) pop[gnt_queue] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q <= '0;
      for (int k = 0; k < K; k++) served[k] <= '0;
    end else begin
      if (in_valid && in_ready && in_last)
        wr_q <= (wr_q == QW'(K - 1)) ? '0 : wr_q + 1'b1;
      if (tx_valid) begin
        if (pop[gnt_queue]) served[gnt_queue] <= '0;
        else                served[gnt_queue] <= served[gnt_queue] | tx_mask;
      end
    end
  end

  // Every grant must be for an output the HoL cell still needs.
  a_grant_needed: assert property (@(posedge clk) disable iff (!rst_n)
    gnt_valid |-> ((gnt_mask & ~hol_fanout[gnt_queue]) == '0));

endmodule
