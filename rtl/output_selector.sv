// output_selector: the IMRR output selector (OS) of one output port.
//
// Each OS sits on its own chip and decides alone which input this output serves.
// Every OS keeps a copy of the preferential-input pointer. The pointer is reset
// to input 0 and advances by one (modulo N) every slot whatever was granted, so
// all copies stay equal without any exchange between chips. In each slot:
//   * if the preferential input requests this output, it is granted;
//   * otherwise the requesting input with the smallest fanout weight is granted,
//     ties going to the lowest input index (the scan order of the published
//     pseudo-code, which keeps the first strictly smaller weight);
//   * with no request there is no grant.
// The decision is combinational within the slot; only the pointer is a register.
// Interface: req[i] = input i requests this output, req_weight[i] = the fanout of
// its cell; gnt is one-hot, also given as gnt_valid/gnt_idx. pref shows the pointer.
module output_selector #(
  parameter int unsigned N  = 16,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned WW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic [WW-1:0] req_weight [N],
  output logic [N-1:0]  gnt,
  output logic          gnt_valid,
  output logic [IW-1:0] gnt_idx,
  output logic [IW-1:0] pref
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pref <= '0;
    else        pref <= (pref == IW'(N - 1)) ? '0 : pref + 1'b1;
  end

  always_comb begin
    logic [WW-1:0] min_w;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    min_w     = '1;
    if (req[pref]) begin
      gnt_valid = 1'b1;
      gnt_idx   = pref;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (req[i] && (!gnt_valid || req_weight[i] < min_w)) begin
          gnt_valid = 1'b1;
          gnt_idx   = IW'(i);
          min_w     = req_weight[i];
        end
      end
    end
    gnt = '0;
    if (gnt_valid) gnt[gnt_idx] = 1'b1;
  end

endmodule
