// tb_mc_fifo: drives random push/pop traffic into a small multicast FIFO and
// compares head, empty, full and count against a queue model every cycle,
// including runs that fill the FIFO and drain it completely.
module tb_mc_fifo;
  localparam int unsigned W = 12;
  localparam int unsigned DEPTH = 6;

  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] push_data, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0;
  int saw_full = 0, saw_empty = 0;

  always #5 clk = ~clk;

  mc_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // compare state
      checks++;
      if (count !== $bits(count)'(model.size())) begin
        failures++; $display("t=%0d count %0d exp %0d", t, count, model.size());
      end
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH)) begin
        failures++; $display("t=%0d flags e=%0d f=%0d", t, empty, full);
      end
      if (model.size() > 0) begin
        checks++;
        if (head !== model[0]) begin failures++; $display("t=%0d head %h exp %h", t, head, model[0]); end
      end
      if (full) saw_full++;
      if (empty) saw_empty++;
      // phases: fill-biased, drain-biased
      push = ((t / 100) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      pop  = ((t / 100) % 2 == 0) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      if (full) push = 0;
      if (empty) pop = 0;
      push_data = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_data);
    end
    checks++;
    if (saw_full == 0 || saw_empty == 0) begin failures++; $display("full/empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
