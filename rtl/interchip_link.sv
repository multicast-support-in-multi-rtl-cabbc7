// interchip_link: the latency between two selector chips.
//
// In a multi-chip scheduler every request or grant crossing from an input-selector
// chip to an output-selector chip (or back) arrives some slots late; the two
// directions together make up the round-trip time RTT. The link is modelled as a
// fixed pipeline of LAT registers, one per slot, cleared at reset so the far chip
// sees "no request"/"no grant" until the first real one arrives. LAT = 0 is a wire
// (single-chip case). How the round trip is split between the two directions is
// this design's own choice; the IMRR scheme only fixes the total.
module interchip_link #(
  parameter int unsigned W   = 8,
  parameter int unsigned LAT = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (LAT == 0) begin : g_wire
    assign q = d;
  end else begin : g_pipe
    logic [W-1:0] stage [LAT];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < LAT; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < LAT; i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[LAT-1];
  end

endmodule
