// ram_segment: the ordinary RAM part of the memory hierarchy.
//
// Plain word-addressed storage written and read through word lines from a
// (possibly masked) decoder. Several word lines may be active: a write then
// stores the same data in every selected word, and a read returns the OR of
// the selected words (wired-OR read lines, this design's choice; the
// architecture only uses single-word reads).
// Interface: write data and word lines are sampled on the rising clock edge;
// rdata is combinational from the current contents. Contents are not reset.
module ram_segment #(
  parameter int unsigned NWORDS = 64,
  parameter int unsigned WIDTH  = 32
) (
  input  logic              clk,
  input  logic [NWORDS-1:0] wl,
  input  logic              we,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [NWORDS];

  always_ff @(posedge clk) begin
    for (int unsigned w = 0; w < NWORDS; w++)
      if (we && wl[w]) mem[w] <= wdata;
  end

  always_comb begin
    rdata = '0;
    for (int unsigned w = 0; w < NWORDS; w++)
      if (wl[w]) rdata |= mem[w];
  end
endmodule
