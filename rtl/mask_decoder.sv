// mask_decoder: memory word-line decoder extended by an address mask.
//
// Every mask bit set to 1 declares the corresponding address bit "don't
// care", so one access selects all words whose addresses share the remaining
// address bits. With a zero mask it is an ordinary one-hot decoder. This
// multiple selection is used for masked writes (common initialisation of
// many words) and for setting the ALU activity flags of many words at once.
//
// The decoder covers NWORDS words starting at address BASE of the uniform
// memory space; the segments of the memory each own one decoder.
// Purely combinational: word lines follow en/addr/mask in the same cycle.
module mask_decoder #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned NWORDS = 32,
  parameter int unsigned BASE   = 0
) (
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  input  logic [ADDR_W-1:0] mask,   // 1 = don't care
  output logic [NWORDS-1:0] wl      // word lines
);
  always_comb begin
    for (int unsigned w = 0; w < NWORDS; w++) begin
      logic [ADDR_W-1:0] wa;
      wa    = ADDR_W'(BASE + w);
      wl[w] = en && (((wa ^ addr) & ~mask) == '0);
    end
  end
endmodule
