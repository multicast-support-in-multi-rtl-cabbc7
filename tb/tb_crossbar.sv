// tb_crossbar: random cells and random per-output configurations (several
// outputs often naming the same input, i.e. multicast) into a 6-port crossbar;
// checks one slot later that each output carries the configured input's cell, or
// nothing if that input sent none or the output was not configured.
module tb_crossbar;
  localparam int unsigned N = 6;
  localparam int unsigned CW = 32;
  localparam int unsigned IW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, cfg_valid, out_valid;
  logic [CW-1:0] in_cell [N];
  logic [IW-1:0] cfg_idx [N];
  logic [CW-1:0] out_cell [N];
  int checks = 0, failures = 0, n_multi = 0;

  always #5 clk = ~clk;

  crossbar #(.N(N), .CELL_W(CW)) dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] ev;
    logic [CW-1:0] ec [N];
    int fan [N];
    in_valid = '0; cfg_valid = '0;
    foreach (in_cell[i]) begin in_cell[i] = '0; cfg_idx[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      in_valid = N'($urandom);
      cfg_valid = N'($urandom);
      foreach (fan[i]) fan[i] = 0;
      for (int i = 0; i < N; i++) in_cell[i] = $urandom;
      for (int j = 0; j < N; j++) begin
        cfg_idx[j] = IW'($urandom_range(0, N - 1));
        if (cfg_valid[j]) fan[cfg_idx[j]]++;
      end
      foreach (fan[i]) if (fan[i] > 1 && in_valid[i]) n_multi++;
      for (int j = 0; j < N; j++) begin
        ev[j] = cfg_valid[j] && in_valid[cfg_idx[j]];
        ec[j] = in_cell[cfg_idx[j]];
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (out_valid[j] !== ev[j] || (ev[j] && out_cell[j] !== ec[j])) begin
          failures++; $display("t=%0d out %0d v=%0d c=%h exp v=%0d c=%h", t, j, out_valid[j], out_cell[j], ev[j], ec[j]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_multi == 0) failures++;
    $display("multicast copies seen: %0d", n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
