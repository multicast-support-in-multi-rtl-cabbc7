// tb_input_selector: runs the input-selector checks of tb_is_harness on three
// configurations: RTT = 4 with one queue per slot (RTT+1 queues), RTT = 2 with two
// queues per slot (k = 2(RTT+1) queues, weight-based choice), and the
// single-chip case RTT = 0 with two queues.
module tb_input_selector;
  logic clk = 0;
  int c0, f0, w0, c1, f1, w1, c2, f2, w2;
  logic d0, d1, d2;
  int checks, failures;

  always #5 clk = ~clk;

  tb_is_harness #(.N(16), .RTT(4), .QPS(1), .DEPTH(32)) h0 (.clk, .checks(c0), .failures(f0), .n_weighted(w0), .done(d0));
  tb_is_harness #(.N(6),  .RTT(2), .QPS(2), .DEPTH(8))  h1 (.clk, .checks(c1), .failures(f1), .n_weighted(w1), .done(d1));
  tb_is_harness #(.N(4),  .RTT(0), .QPS(2), .DEPTH(4))  h2 (.clk, .checks(c2), .failures(f2), .n_weighted(w2), .done(d2));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2 + 1;
    failures = f0 + f1 + f2;
    $display("weighted choices between two queues: %0d", w1 + w2);
    if (w1 == 0 || w2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
