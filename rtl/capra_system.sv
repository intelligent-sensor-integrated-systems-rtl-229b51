// capra_system: an "intelligent memory" built as one uniform address space
// of three segments: ordinary RAM words, content-addressable (CAM) words,
// and words of the content-addressable processor/register array (CAPRA),
// whose bit cells carry Boolean logic, activity flags and optical sensors
// and whose words each carry a 4-bit ALU linked to its two neighbours.
//
// A host issues one instruction per clock (instr_valid, instr). Addresses
// 0..RAM_WORDS-1 are RAM, the next CAPRA_WORDS addresses are CAPRA and the
// next CAM_WORDS addresses are CAM. With power-of-two sizes every segment
// starts on a multiple of its size, so one address with a mask can select a
// whole segment. Each segment has its own masked decoder,
// so WRITE/READ/MWRITE reach any word and MWRITE or SET ALU FLAG can select
// many words with one address and mask. ASSOCOMP searches the CAM and CAPRA
// words at once; the CAM match vector and the CAPRA word match vector are
// outputs. BOOLOP, SCAN, STORE, SET AF, TOALU, REC and ALU OP act on all
// CAPRA words in parallel. A READ copies the addressed word into the memory
// data register MDR; rdata shows MDR and rvalid pulses in the cycle after
// the READ. There is no stall: instr_ready does not exist because every
// instruction finishes in its own clock.
// The segment sizes are not fixed by the architecture (they are to be
// tailored to the application); the defaults here are this design's.
module capra_system
  import capra_pkg::*;
#(
  parameter int unsigned RAM_WORDS   = 64,
  parameter int unsigned CAM_WORDS   = 16,
  parameter int unsigned CAPRA_WORDS = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   instr_valid,
  input  instr_t                 instr,
  output word_t                  rdata,
  output logic                   rvalid,
  output logic [CAM_WORDS-1:0]   cam_match,
  output logic [CAPRA_WORDS-1:0] capra_match,
  output logic [CAPRA_WORDS-1:0] alu_flags,
  input  logic [LIGHT_W-1:0]     light [CAPRA_WORDS][NSENS],
  input  logic [2:0]             adc_res
);
  localparam int unsigned CAPRA_BASE = RAM_WORDS;
  localparam int unsigned CAM_BASE   = RAM_WORDS + CAPRA_WORDS;

  logic       dec_en, we, rd, aluf_set, search;
  addr_t      dec_mask;
  cell_ctrl_t cctrl;
  alu_ctrl_t  actrl;
  word_t      sar, smask, ram_rd, cam_rd, capra_rd, mdr;
  logic [RAM_WORDS-1:0]   ram_wl;
  logic [CAM_WORDS-1:0]   cam_wl;
  logic [CAPRA_WORDS-1:0] capra_sel, capra_wl, capra_fs;

  capra_ctrl u_ctrl (
    .clk, .rst_n, .valid(instr_valid), .instr,
    .dec_en, .dec_mask, .we, .rd, .aluf_set, .search,
    .cctrl, .actrl, .sar, .smask
  );

  mask_decoder #(.ADDR_W(ADDR_W), .NWORDS(RAM_WORDS), .BASE(0)) u_dec_ram (
    .en(dec_en), .addr(instr.addr), .mask(dec_mask), .wl(ram_wl));
  mask_decoder #(.ADDR_W(ADDR_W), .NWORDS(CAM_WORDS), .BASE(CAM_BASE)) u_dec_cam (
    .en(dec_en), .addr(instr.addr), .mask(dec_mask), .wl(cam_wl));
  mask_decoder #(.ADDR_W(ADDR_W), .NWORDS(CAPRA_WORDS), .BASE(CAPRA_BASE)) u_dec_capra (
    .en(dec_en), .addr(instr.addr), .mask(dec_mask), .wl(capra_sel));

  assign capra_wl = aluf_set ? '0 : capra_sel;
  assign capra_fs = aluf_set ? capra_sel : '0;

  ram_segment #(.NWORDS(RAM_WORDS), .WIDTH(WORD_W)) u_ram (
    .clk, .wl(ram_wl), .we, .wdata(instr.data), .rdata(ram_rd));

  cam_segment #(.NWORDS(CAM_WORDS), .WIDTH(WORD_W)) u_cam (
    .clk, .rst_n, .wl(cam_wl), .we, .wdata(instr.data), .rdata(cam_rd),
    .search, .sar, .smask, .match(cam_match));

  capra_array #(.NWORDS(CAPRA_WORDS)) u_capra (
    .clk, .rst_n, .cctrl, .actrl, .seg(instr.seg), .assoc(search), .smask, .sar,
    .wl(capra_wl), .we, .rw(instr.data), .rdata(capra_rd),
    .light, .adc_res, .scan_hi(instr.scan_hi),
    .aluf_set(capra_fs), .aluf_val(instr.data[0]), .aluf(alu_flags),
    .match(capra_match), .rega()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mdr    <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= rd;
      if (rd) mdr <= ram_rd | cam_rd | capra_rd;
    end
  end
  assign rdata = mdr;

  // A READ addresses exactly one word of the whole memory space.
  a_read_single : assert property (@(posedge clk) disable iff (!rst_n)
    rd |-> $onehot({ram_wl, cam_wl, capra_sel}));

  // Segment map must fit the address bus.
  if (CAM_BASE + CAM_WORDS > (1 << ADDR_W)) begin : g_bad_map
    $error("memory segments exceed the address space");
  end
endmodule
