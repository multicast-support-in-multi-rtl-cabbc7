// tb_is_harness: drives one input selector with random queue states and random
// grants, and checks it against an independent model: the queue pointer is the
// slot number modulo RTT+1; the requested queue is the only queue of the group
// (QPS = 1) or the non-empty one of larger length + fanout, lower index on ties
// (QPS = 2); the request carries the HoL fanout set and its size; grants coming
// back RTT slots later are passed on with the index of the queue that requested.
// Reports its counts through checks/failures once done is set.
module tb_is_harness #(
  parameter int unsigned N = 6,
  parameter int unsigned RTT = 2,
  parameter int unsigned QPS = 2,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned SLOTS = 1500
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_weighted,
  output logic done
);
  localparam int unsigned K  = QPS * (RTT + 1);
  localparam int unsigned QW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned PW = (RTT > 0) ? $clog2(RTT + 1) : 1;
  localparam int unsigned LW = $clog2(DEPTH + 1);
  localparam int unsigned WW = $clog2(N + 1);

  logic rst_n;
  logic [K-1:0] hol_valid;
  logic [N-1:0] hol_fanout [K];
  logic [LW-1:0] q_len [K];
  logic req_valid, gnt_valid;
  logic [N-1:0] req_mask, gnt_in, gnt_mask;
  logic [WW-1:0] req_weight;
  logic [QW-1:0] gnt_queue;
  logic [PW-1:0] rtt_ptr;

  input_selector #(.N(N), .RTT(RTT), .QPS(QPS), .DEPTH(DEPTH)) dut (.*);

  int hist_q [$];   // queue requested in each slot, -1 for none
  logic [N-1:0] hist_m [$];

  initial begin
    int grp, exp_q, bw, w;
    checks = 0; failures = 0; n_weighted = 0; done = 0;
    rst_n = 0; hol_valid = '0; gnt_in = '0;
    for (int k = 0; k < K; k++) begin hol_fanout[k] = '0; q_len[k] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < int'(SLOTS); t++) begin
      for (int k = 0; k < K; k++) begin
        hol_valid[k] = ($urandom_range(0, 3) != 0);
        hol_fanout[k] = hol_valid[k] ? N'($urandom) | (N'(1) << $urandom_range(0, N - 1)) : '0;
        q_len[k] = hol_valid[k] ? LW'($urandom_range(1, DEPTH)) : '0;
      end
      gnt_in = '0;
      #1;
      grp = t % (RTT + 1);
      exp_q = -1; bw = -1;
      for (int c = 0; c < int'(QPS); c++) begin
        int q;
        q = QPS * grp + c;
        w = int'(q_len[q]) + $countones(hol_fanout[q]);
        if (hol_valid[q] && w > bw) begin exp_q = q; bw = w; end
      end
      if (QPS > 1 && hol_valid[QPS * grp] && hol_valid[QPS * grp + 1]) n_weighted++;
      checks++;
      if (rtt_ptr !== PW'(grp)) begin failures++; $display("t=%0d rtt_ptr %0d exp %0d", t, rtt_ptr, grp); end
      checks++;
      if (req_valid !== (exp_q >= 0)) begin failures++; $display("t=%0d req_valid %0d exp %0d", t, req_valid, exp_q >= 0); end
      if (exp_q >= 0) begin
        checks++;
        if (req_mask !== hol_fanout[exp_q] || req_weight !== WW'($countones(hol_fanout[exp_q]))) begin
          failures++; $display("t=%0d req mask %b w %0d exp q %0d mask %b", t, req_mask, req_weight, exp_q, hol_fanout[exp_q]);
        end
      end
      hist_q.push_back(exp_q);
      hist_m.push_back(exp_q >= 0 ? hol_fanout[exp_q] : '0);
      // grants for the request of slot t-RTT
      if (t >= int'(RTT) && hist_q[t - RTT] >= 0) gnt_in = hist_m[t - RTT] & N'($urandom);
      #1;
      checks++;
      if (gnt_valid !== (gnt_in != '0) || gnt_mask !== gnt_in) begin
        failures++; $display("t=%0d gnt_valid %0d mask %b exp %b", t, gnt_valid, gnt_mask, gnt_in);
      end
      if (gnt_in != '0) begin
        checks++;
        if (gnt_queue !== QW'(hist_q[t - RTT])) begin
          failures++; $display("t=%0d gnt_queue %0d exp %0d", t, gnt_queue, hist_q[t - RTT]);
        end
      end
      @(negedge clk);
    end
    done = 1;
  end
endmodule
