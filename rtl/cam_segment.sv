// cam_segment: content-addressable words that can also be used as RAM.
//
// Each word holds WIDTH storage bits with comparison logic. In RAM mode it is
// written and read through word lines like ram_segment (wired-OR read when
// several words are selected). ASSOCOMP compares all words in parallel with
// the search argument register SAR; bits whose search mask bit is 1 are not
// compared. The per-word match results are latched in a match register that
// stays valid until the next ASSOCOMP (the architecture leaves the handling
// of match results open; a latched match vector is this design's choice).
// Timing: writes and the compare result are taken on the rising clock
// edge; match is valid the cycle after ASSOCOMP. Reset clears only match.
module cam_segment #(
  parameter int unsigned NWORDS = 16,
  parameter int unsigned WIDTH  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NWORDS-1:0] wl,
  input  logic              we,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata,
  input  logic              search,     // ASSOCOMP
  input  logic [WIDTH-1:0]  sar,        // search argument
  input  logic [WIDTH-1:0]  smask,      // 1 = bit excluded from the compare
  output logic [NWORDS-1:0] match
);
  logic [WIDTH-1:0]  mem [NWORDS];
  logic [NWORDS-1:0] hit;

  always_comb begin
    rdata = '0;
    for (int unsigned w = 0; w < NWORDS; w++) begin
      hit[w] = ((mem[w] ^ sar) & ~smask) == '0;
      if (wl[w]) rdata |= mem[w];
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned w = 0; w < NWORDS; w++)
      if (we && wl[w]) mem[w] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      match <= '0;
    else if (search) match <= hit;
  end
endmodule
