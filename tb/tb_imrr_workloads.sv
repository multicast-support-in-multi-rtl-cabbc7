// tb_imrr_workloads: saturation throughput of the switch at its default size
// (16 x 16, RTT = 4) for the evaluated traffic patterns, with RTT+1 queues per
// input (QPS = 1) and with k = 2(RTT+1) queues (QPS = 2), each run in its own
// tb_workload_env. Besides the checks inside each environment, the k-queue
// switch must beat the RTT+1-queue switch on gathered traffic, where the choice
// between two queues matters most, and must not be worse on uniform multicast
// cells by more than 0.02.
module tb_imrr_workloads;
  int c1, f1, c2, f2;
  real t1 [6], t2 [6];
  logic d1, d2;

  tb_workload_env #(.QPS(1)) env1 (.checks(c1), .failures(f1), .thr(t1), .done(d1));
  tb_workload_env #(.QPS(2)) env2 (.checks(c2), .failures(f2), .thr(t2), .done(d2));

  initial begin
    #8ms;
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    int f;
    #100;
    wait (d1 && d2);
    f = f1 + f2;
    $display("gathered: %0.3f with RTT+1 queues, %0.3f with 2(RTT+1) queues", t1[1], t2[1]);
    if (!(t2[1] > t1[1])) begin f++; $display("two queues per slot did not raise gathered throughput"); end
    if (t2[0] < t1[0] - 0.02) begin f++; $display("two queues per slot lowered uniform throughput"); end
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + 2, f);
    $finish;
  end
endmodule
