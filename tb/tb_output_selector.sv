// tb_output_selector: random requests and fanout weights into an 8-input output
// selector. Every slot the expected grant is worked out from the IMRR rule: the
// preferential input (slot number modulo N) if it requests, else the requester
// with the smallest weight, lowest index on ties, else nothing. Counts how often
// each of the three cases happened and fails if one never did.
module tb_output_selector;
  localparam int unsigned N = 8;
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned WW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [WW-1:0] req_weight [N];
  logic gnt_valid;
  logic [IW-1:0] gnt_idx, pref;
  int checks = 0, failures = 0;
  int n_pref = 0, n_min = 0, n_none = 0, n_tie = 0;

  always #5 clk = ~clk;

  output_selector #(.N(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx, best;
    bit exp_v;
    req = '0;
    foreach (req_weight[i]) req_weight[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      req = N'($urandom) & N'($urandom);
      if (t % 17 == 0) req = '0;
      for (int i = 0; i < N; i++) req_weight[i] = WW'($urandom_range(1, 4));
      #1;
      // reference decision
      exp_v = 0; exp_idx = 0; best = 0;
      if (req[t % N]) begin
        exp_v = 1; exp_idx = t % N; n_pref++;
      end else begin
        for (int i = 0; i < N; i++)
          if (req[i] && (!exp_v || int'(req_weight[i]) < best)) begin
            exp_v = 1; exp_idx = i; best = int'(req_weight[i]);
          end
        if (exp_v) begin
          n_min++;
          for (int i = 0; i < N; i++)
            if (req[i] && i != exp_idx && int'(req_weight[i]) == best) begin n_tie++; break; end
        end else n_none++;
      end
      checks++;
      if (pref !== IW'(t % N)) begin failures++; $display("t=%0d pref %0d exp %0d", t, pref, t % N); end
      checks++;
      if (gnt_valid !== exp_v || (exp_v && gnt_idx !== IW'(exp_idx))) begin
        failures++; $display("t=%0d req=%b gnt %0d/%0d exp %0d/%0d", t, req, gnt_valid, gnt_idx, exp_v, exp_idx);
      end
      checks++;
      if (gnt !== (exp_v ? N'(1) << exp_idx : '0)) begin failures++; $display("t=%0d one-hot gnt %b", t, gnt); end
      @(negedge clk);
    end
    $display("preferential=%0d min_fanout=%0d (ties %0d) idle=%0d", n_pref, n_min, n_tie, n_none);
    checks++;
    if (n_pref == 0 || n_min == 0 || n_none == 0 || n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
