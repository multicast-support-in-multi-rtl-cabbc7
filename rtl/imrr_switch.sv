// imrr_switch: N x N input-queued multicast switch with a fully distributed
// (one chip per selector) IMRR scheduler.
//
// Structure: N line cards hold the multicast FIFOs; N input selectors (IS) and N
// output selectors (OS) form the scheduler, every selector on its own chip; each
// IS reaches all OSs through a request link of REQ_LAT slots and each OS answers
// through a grant link of GNT_LAT slots, REQ_LAT + GNT_LAT = RTT; the crossbar
// forwards the granted cells.
//
// Timing of one request (slot = clock cycle):
//   slot t            IS i picks queue group rtt(t) and requests the outputs in
//                     the residual fanout of its HoL cell, with the fanout as weight
//   slot t+REQ_LAT    OS j sees the request and grants one input
//   slot t+RTT        IS i gets the grants; line card i sends the HoL cell to the
//                     crossbar and removes the served outputs from its fanout. The
//                     OS's choice, delayed by GNT_LAT on the configuration path,
//                     sets crossbar output j in the same slot.
//   slot t+RTT+1      the cell leaves at output j (out_valid/out_cell)
// A cell accepted in slot a is in its queue from slot a+1, so with an empty switch
// it leaves RTT+2 to 2*RTT+2 slots after arrival, depending on the pointer.
//
// The preferential-input pointers of the OSs and the queue pointers of the ISs
// advance every slot with no exchange, which is what allows one chip per
// selector. match_size counts the crossbar connections set up in a slot. The
// algorithm, the queue counts and the sizes follow the published IMRR scheme; the split of
// RTT between the two directions, the registered crossbar and the line-card
// handshake are this design's own choices.
module imrr_switch
  import imrr_pkg::*;
#(
  parameter int unsigned N      = N_PORTS,
  parameter int unsigned RTT    = RTT_SLOTS,
  parameter int unsigned QPS    = QPS_DEF,
  parameter int unsigned CELL_W = CELL_BITS,
  parameter int unsigned DEPTH  = FIFO_DEPTH,
  localparam int unsigned K       = QPS * (RTT + 1),
  localparam int unsigned IW      = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned WW      = $clog2(N + 1),
  localparam int unsigned QW      = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned LW      = $clog2(DEPTH + 1),
  localparam int unsigned PW      = (RTT > 0) ? $clog2(RTT + 1) : 1,
  localparam int unsigned REQ_LAT = RTT - RTT / 2,
  localparam int unsigned GNT_LAT = RTT / 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      in_valid,
  input  logic [CELL_W-1:0] in_cell   [N],
  input  logic [N-1:0]      in_fanout [N],
  input  logic [N-1:0]      in_last,
  output logic [N-1:0]      in_ready,
  output logic [N-1:0]      out_valid,
  output logic [CELL_W-1:0] out_cell  [N],
  output logic [WW-1:0]     match_size
);

  // IS side
  logic          is_req_valid  [N];
  logic [N-1:0]  is_req_mask   [N];
  logic [WW-1:0] is_req_weight [N];
  logic [N-1:0]  is_gnt_in     [N];   // [input][output]
  logic          lc_gnt_valid  [N];
  logic [QW-1:0] lc_gnt_queue  [N];
  logic [N-1:0]  lc_gnt_mask   [N];
  logic [N-1:0]  tx_valid;
  logic [N-1:0]  tx_mask       [N];   // [input][output]
  logic [PW-1:0] is_rtt_ptr    [N];
  logic [CELL_W-1:0] tx_cell   [N];
  // OS side (after the request links)
  logic          os_req_valid  [N];
  logic [N-1:0]  os_req_mask   [N];
  logic [WW-1:0] os_req_weight [N];
  logic [N-1:0]  os_gnt        [N];   // [output][input]
  logic [N-1:0]  os_gnt_valid;
  logic [IW-1:0] os_gnt_idx    [N];
  logic [N-1:0]  is_gnt_vec    [N];   // [output][input], after the grant links
  logic [N-1:0]  cfg_valid;
  logic [IW-1:0] os_pref       [N];
  logic [IW-1:0] cfg_idx       [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    logic [K-1:0]  hol_valid;
    logic [N-1:0]  hol_fanout [K];
    logic [LW-1:0] q_len      [K];

    line_card #(.N(N), .K(K), .CELL_W(CELL_W), .DEPTH(DEPTH)) u_lc (
      .clk, .rst_n,
      .in_valid   (in_valid[i]),
      .in_cell    (in_cell[i]),
      .in_fanout  (in_fanout[i]),
      .in_last    (in_last[i]),
      .in_ready   (in_ready[i]),
      .hol_valid  (hol_valid),
      .hol_fanout (hol_fanout),
      .q_len      (q_len),
      .gnt_valid  (lc_gnt_valid[i]),
      .gnt_queue  (lc_gnt_queue[i]),
      .gnt_mask   (lc_gnt_mask[i]),
      .tx_valid   (tx_valid[i]),
      .tx_cell    (tx_cell[i]),
      .tx_mask    (tx_mask[i])
    );

    input_selector #(.N(N), .RTT(RTT), .QPS(QPS), .DEPTH(DEPTH)) u_is (
      .clk, .rst_n,
      .hol_valid  (hol_valid),
      .hol_fanout (hol_fanout),
      .q_len      (q_len),
      .req_valid  (is_req_valid[i]),
      .req_mask   (is_req_mask[i]),
      .req_weight (is_req_weight[i]),
      .gnt_in     (is_gnt_in[i]),
      .gnt_valid  (lc_gnt_valid[i]),
      .gnt_queue  (lc_gnt_queue[i]),
      .gnt_mask   (lc_gnt_mask[i]),
      .rtt_ptr    (is_rtt_ptr[i])
    );

    // request link IS i -> all OSs
    interchip_link #(.W(1 + N + WW), .LAT(REQ_LAT)) u_req_link (
      .clk, .rst_n,
      .d ({is_req_valid[i], is_req_mask[i], is_req_weight[i]}),
      .q ({os_req_valid[i], os_req_mask[i], os_req_weight[i]})
    );

    for (genvar j = 0; j < N; j++) begin : g_gnt
      assign is_gnt_in[i][j] = is_gnt_vec[j][i];
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    logic [N-1:0] req;
    for (genvar i = 0; i < N; i++) begin : g_req
      assign req[i] = os_req_valid[i] && os_req_mask[i][j];
    end

    output_selector #(.N(N)) u_os (
      .clk, .rst_n,
      .req        (req),
      .req_weight (os_req_weight),
      .gnt        (os_gnt[j]),
      .gnt_valid  (os_gnt_valid[j]),
      .gnt_idx    (os_gnt_idx[j]),
      .pref       (os_pref[j])
    );

    // grant link OS j -> all ISs
    interchip_link #(.W(N), .LAT(GNT_LAT)) u_gnt_link (
      .clk, .rst_n,
      .d (os_gnt[j]),
      .q (is_gnt_vec[j])
    );

    // crossbar configuration path OS j -> fabric, aligned with the grant
    interchip_link #(.W(1 + IW), .LAT(GNT_LAT)) u_cfg_link (
      .clk, .rst_n,
      .d ({os_gnt_valid[j], os_gnt_idx[j]}),
      .q ({cfg_valid[j], cfg_idx[j]})
    );
  end

  crossbar #(.N(N), .CELL_W(CELL_W)) u_xbar (
    .clk, .rst_n,
    .in_valid  (tx_valid),
    .in_cell   (tx_cell),
    .cfg_valid (cfg_valid),
    .cfg_idx   (cfg_idx),
    .out_valid (out_valid),
    .out_cell  (out_cell)
  );

  always_comb begin
    match_size = '0;
    for (int j = 0; j < N; j++) match_size += WW'(cfg_valid[j]);
  end

  // The crossbar configuration chosen by the OSs must match, output by output,
  // what each line card sends; and the pointer copies kept on separate chips
  // must agree although they never exchange information.
  for (genvar j = 0; j < N; j++) begin : g_chk
    for (genvar i = 0; i < N; i++) begin : g_pair
      a_cfg_matches_tx: assert property (@(posedge clk) disable iff (!rst_n)
        (cfg_valid[j] && cfg_idx[j] == IW'(i)) == tx_mask[i][j]);
    end
    a_pref_agree: assert property (@(posedge clk) disable iff (!rst_n) os_pref[j] == os_pref[0]);
    a_rtt_agree:  assert property (@(posedge clk) disable iff (!rst_n) is_rtt_ptr[j] == is_rtt_ptr[0]);
  end

endmodule
