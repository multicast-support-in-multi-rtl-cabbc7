// input_selector: the IMRR input selector (IS) of one input port.
//
// Each IS sits on its own chip. It keeps the queue pointer rtt, which is reset to
// 0 and advances by one (modulo RTT+1) every slot whatever happened, so it needs
// no information from other chips. In every slot the IS looks at the QPS queues
// of group rtt (queues QPS*rtt .. QPS*rtt+QPS-1 of its line card):
//   * QPS = 1 (RTT+1 queues): the single queue of the group is taken;
//   * QPS = 2 (k = 2(RTT+1) queues): the non-empty queue with the larger weight,
//     queue length plus HoL fanout, is taken; ties go to the lower queue.
// If the taken queue holds a cell, the IS sends one request to every output in
// the residual fanout set of its HoL cell, with a weight equal to that fanout.
// Grants come back RTT slots later. Because a queue is visited once every RTT+1
// slots, only one request per queue is in flight; the IS remembers which queue
// each slot's request came from in an RTT-deep shift register and hands the
// returning grant mask to the line card together with that queue index. The
// visiting order and the weights follow the published IMRR scheme; the shift register is
// this design's way of matching grants to queues.
module input_selector #(
  parameter int unsigned N     = 16,
  parameter int unsigned RTT   = 4,
  parameter int unsigned QPS   = 1,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned K    = QPS * (RTT + 1),
  localparam int unsigned QW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned PW   = (RTT > 0) ? $clog2(RTT + 1) : 1,
  localparam int unsigned LW   = $clog2(DEPTH + 1),
  localparam int unsigned WW   = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // queue state from the line card
  input  logic [K-1:0]  hol_valid,
  input  logic [N-1:0]  hol_fanout [K],
  input  logic [LW-1:0] q_len      [K],
  // request towards the output selectors
  output logic          req_valid,
  output logic [N-1:0]  req_mask,
  output logic [WW-1:0] req_weight,
  // grants from the output selectors (bit j = output j), RTT slots after the request
  input  logic [N-1:0]  gnt_in,
  // grants towards the line card
  output logic          gnt_valid,
  output logic [QW-1:0] gnt_queue,
  output logic [N-1:0]  gnt_mask,
  // current queue pointer
  output logic [PW-1:0] rtt_ptr
);

  import imrr_pkg::popcount;

  logic [QW-1:0] sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rtt_ptr <= '0;
    else if (RTT > 0) rtt_ptr <= (rtt_ptr == PW'(RTT)) ? '0 : rtt_ptr + 1'b1;
  end

  // Queue choice within the current group.
  always_comb begin
    logic [LW:0] best_w, w;
    logic        found;
    sel_q  = QW'(QPS * rtt_ptr);
    best_w = '0;
    found  = 1'b0;
    for (int c = 0; c < QPS; c++) begin
      w = (LW + 1)'(q_len[QPS * rtt_ptr + c]) +
          (LW + 1)'(popcount(64'(hol_fanout[QPS * rtt_ptr + c]), N));
      if (hol_fanout[QPS * rtt_ptr + c] != '0 && (!found || w > best_w)) begin
        found  = 1'b1;
        best_w = w;
        sel_q  = QW'(QPS * rtt_ptr + c);
      end
    end
  end

  assign req_mask   = hol_fanout[sel_q];
  assign req_valid  = hol_valid[sel_q] && (req_mask != '0);
  assign req_weight = WW'(popcount(64'(req_mask), N));

  // Which queue the grants arriving now belong to.
  logic          ret_v;
  logic [QW-1:0] ret_q;

  if (RTT == 0) begin : g_now
    assign ret_v = req_valid;
    assign ret_q = sel_q;
  end else begin : g_track
    logic          pend_v [RTT];
    logic [QW-1:0] pend_q [RTT];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < RTT; s++) begin
          pend_v[s] <= 1'b0;
          pend_q[s] <= '0;
        end
      end else begin
        pend_v[0] <= req_valid;
        pend_q[0] <= sel_q;
        for (int s = 1; s < RTT; s++) begin
          pend_v[s] <= pend_v[s-1];
          pend_q[s] <= pend_q[s-1];
        end
      end
    end
    assign ret_v = pend_v[RTT-1];
    assign ret_q = pend_q[RTT-1];
  end

  assign gnt_valid = ret_v && (gnt_in != '0);
  assign gnt_queue = ret_q;
  assign gnt_mask  = ret_v ? gnt_in : '0;

  a_grant_expected: assert property (@(posedge clk) disable iff (!rst_n)
    (gnt_in != '0) |-> ret_v);

endmodule
