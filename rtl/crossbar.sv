// crossbar: the non-blocking switching fabric with multicast capability.
//
// Output j copies the cell presented by input cfg_idx[j] when cfg_valid[j] is set;
// several outputs may name the same input, which is how one input sends a
// multicast cell to many outputs in one slot at no extra cost. The configuration
// comes from the output selectors. Outputs are registered: a cell presented in
// slot t leaves the fabric in slot t+1 (the register is this design's choice).
// An output configured to an input that presents no cell stays idle.
module crossbar #(
  parameter int unsigned N      = 16,
  parameter int unsigned CELL_W = 512,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      in_valid,
  input  logic [CELL_W-1:0] in_cell  [N],
  input  logic [N-1:0]      cfg_valid,
  input  logic [IW-1:0]     cfg_idx  [N],
  output logic [N-1:0]      out_valid,
  output logic [CELL_W-1:0] out_cell [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= '0;
    else
      for (int j = 0; j < N; j++)
        out_valid[j] <= cfg_valid[j] && in_valid[cfg_idx[j]];
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < N; j++)
      out_cell[j] <= in_cell[cfg_idx[j]];
  end

endmodule
