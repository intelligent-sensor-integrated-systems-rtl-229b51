// capra_array: the CAPRA segment, NWORDS word cells side by side.
//
// All word cells receive the same bit-cell and ALU control lines, so every
// operation runs word-parallel and bit-parallel. The ALUs form a linear
// chain: word i sees the REGA of word i-1 as REGB (upper neighbour) and the
// REGA of word i+1 as REGC (lower neighbour); at the two ends the missing
// neighbour reads as 0 (this design's choice; the architecture does not
// say whether the chain wraps around). Word lines (RAM access) and the
// per-word SET ALU FLAG strobes come from a masked decoder outside. The read
// data are the OR of all selected words. One sensor light code per bit-cell
// pair enters through `light`. Timing: as capra_word, one clock per
// operation.
module capra_array
  import capra_pkg::*;
#(
  parameter int unsigned NWORDS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cell_ctrl_t        cctrl,
  input  alu_ctrl_t         actrl,
  input  logic [SEG_W-1:0]  seg,
  input  logic              assoc,
  input  word_t             smask,
  input  word_t             sar,
  input  logic [NWORDS-1:0] wl,
  input  logic              we,
  input  word_t             rw,
  output word_t             rdata,
  input  logic [LIGHT_W-1:0] light [NWORDS][NSENS],
  input  logic [2:0]        adc_res,
  input  logic              scan_hi,
  input  logic [NWORDS-1:0] aluf_set,
  input  logic              aluf_val,
  output logic [NWORDS-1:0] aluf,
  output logic [NWORDS-1:0] match,
  output slice_t            rega [NWORDS]
);
  word_t word_rd [NWORDS];

  for (genvar i = 0; i < NWORDS; i++) begin : g_word
    slice_t regb, regc;
    if (i == 0) begin : g_top_end
      assign regb = '0;
    end else begin : g_up
      assign regb = rega[i-1];
    end
    if (i == NWORDS - 1) begin : g_bot_end
      assign regc = '0;
    end else begin : g_dn
      assign regc = rega[i+1];
    end

    capra_word u_word (
      .clk, .rst_n, .cctrl, .actrl, .seg, .assoc, .smask,
      .wl(wl[i]), .we, .rw(assoc ? sar : rw), .rdata(word_rd[i]),
      .light(light[i]), .adc_res, .scan_hi,
      .regb_in(regb), .regc_in(regc), .sar4(sar[SLICE_W-1:0]),
      .rega(rega[i]), .aluf_set(aluf_set[i]), .aluf_val, .aluf(aluf[i]),
      .cy(), .match(match[i]), .if_w(), .af_w()
    );
  end

  always_comb begin
    rdata = '0;
    for (int unsigned i = 0; i < NWORDS; i++)
      if (wl[i]) rdata |= word_rd[i];
  end
endmodule
