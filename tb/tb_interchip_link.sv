// tb_interchip_link: checks that the inter-chip link delivers every word exactly
// LAT slots after it entered (LAT = 3 and the single-chip case LAT = 0), and that
// it shows zero after reset until the first word has crossed.
module tb_interchip_link;
  localparam int unsigned W = 8;
  localparam int unsigned LAT = 3;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q3, q0;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;

  interchip_link #(.W(W), .LAT(LAT)) dut3 (.clk, .rst_n, .d, .q(q3));
  interchip_link #(.W(W), .LAT(0))   dut0 (.clk, .rst_n, .d, .q(q0));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      d = W'($urandom);
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("LAT0 mismatch t=%0d", t); end
      hist.push_back(d);
      checks++;
      if (t < LAT) begin
        if (q3 !== '0) begin failures++; $display("not cleared t=%0d q=%h", t, q3); end
      end else begin
        if (q3 !== hist[t - LAT]) begin
          failures++; $display("LAT3 mismatch t=%0d got %h exp %h", t, q3, hist[t-LAT]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
