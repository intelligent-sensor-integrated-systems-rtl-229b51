// capra_word: one word cell of the CAPRA segment.
//
// WORD_W extended bit cells (capra_bitcell), one optical sensor per pair of
// adjacent bit cells (osc_adc), and one 4-bit ALU slice (capra_alu4) with
// its local register REGA, a carry flip-flop CY and the ALU activity flag.
//
//  * RAM access: word line wl with we writes rw into every SF; rdata is the
//    SF contents (the array ORs the selected words).
//  * BOOLOP / ASSOCOMP: all cells load IF from BOOL(SF, rw). For ASSOCOMP
//    the function is XNOR with the search argument on rw, and bits with
//    smask = 1 give 1; the word's match flag latches the AND of all bits.
//  * SCAN: sensor k feeds its two bits to cells 2k+1 (upper bit) and 2k.
//  * ALU OP on segment j: A = SF[4j+3:4j], B = REGA, REGB (upper
//    neighbour's REGA), REGC (lower neighbour's REGA) or SAR[3:0]. The
//    result goes back into SF segment j or into REGA; CY takes the carry out
//    so that a 32-bit operation is eight ALU OPs over j = 0..7. A
//    conditional ALU OP runs only where the ALU flag is 1. The flag can also
//    be loaded from carry, F == 0 or F != 0 of the operation.
//  * TOALU (TRANSFER with GLOBAL/LOCAL = 1): REGA bit k <= IF of cell 4j+k
//    where that cell's transfer condition holds. REC: IF of segment j <= REGA.
//  * SET ALU FLAG: aluf_set loads the ALU flag with aluf_val.
// The structure follows the architecture; the direct write-back of ALU
// results into the segment's SF, REGA as the ALU end of TRANSFER/REC, the
// carry flip-flop and the flag-update choices are this design's own.
// Timing: every operation completes on one rising clock edge.
module capra_word
  import capra_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cell_ctrl_t       cctrl,
  input  alu_ctrl_t        actrl,
  input  logic [SEG_W-1:0] seg,
  input  logic             assoc,      // ASSOCOMP this cycle
  input  word_t            smask,
  input  logic             wl,
  input  logic             we,
  input  word_t            rw,         // read/write lines (data, operand or SAR)
  output word_t            rdata,
  input  logic [LIGHT_W-1:0] light [NSENS],
  input  logic [2:0]       adc_res,
  input  logic             scan_hi,
  input  slice_t           regb_in,    // REGA of upper neighbour
  input  slice_t           regc_in,    // REGA of lower neighbour
  input  slice_t           sar4,       // SAR[3:0]
  output slice_t           rega,
  input  logic             aluf_set,
  input  logic             aluf_val,
  output logic             aluf,
  output logic             cy,
  output logic             match,
  output word_t            if_w,
  output word_t            af_w
);
  word_t      sf_w, xok_w, cell_wl, cell_rw, sens_w, seg_sel;
  logic       cell_we, exec, alu_wb;
  slice_t     b_op, f, a_op;
  logic       cin, cout, zero;
  cell_ctrl_t cc [WORD_W];

  // segment decode
  always_comb begin
    for (int unsigned b = 0; b < WORD_W; b++)
      seg_sel[b] = SEG_W'(b / SLICE_W) == seg;
  end

  assign a_op = sf_w[seg*SLICE_W +: SLICE_W];

  always_comb begin
    unique case (actrl.bsel)
      B_REGA:  b_op = rega;
      B_REGB:  b_op = regb_in;
      B_REGC:  b_op = regc_in;
      default: b_op = sar4;
    endcase
    unique case (actrl.cin)
      CIN_ZERO:  cin = 1'b0;
      CIN_ONE:   cin = 1'b1;
      default:   cin = cy;
    endcase
  end

  capra_alu4 u_alu (.a(a_op), .b(b_op), .s(actrl.s), .m(actrl.m), .cin(cin),
                    .f(f), .cout(cout), .zero(zero));

  assign exec   = actrl.en && (!actrl.cond || aluf);
  assign alu_wb = exec && (actrl.dst == DST_BUF);

  // bit-cell write port: RAM write, or ALU write-back into segment j
  assign cell_we = alu_wb || we;
  always_comb begin
    for (int unsigned b = 0; b < WORD_W; b++) begin
      cell_wl[b] = alu_wb ? seg_sel[b] : wl;
      cell_rw[b] = alu_wb ? f[b % SLICE_W] : rw[b];
      cc[b]      = cctrl;
      if (assoc) cc[b].bool_fn = smask[b] ? 4'b1111 : 4'b1001;  // 1 / XNOR
    end
  end

  for (genvar k = 0; k < NSENS; k++) begin : g_sens
    osc_adc u_osc (
      .clk, .rst_n, .light(light[k]), .res(adc_res),
      .scan(cctrl.ld_scan), .scan_hi,
      .pair_bits(sens_w[2*k+1 -: 2]), .dout(), .done()
    );
  end

  for (genvar b = 0; b < WORD_W; b++) begin : g_bit
    capra_bitcell u_cell (
      .clk, .rst_n, .ctrl(cc[b]), .wl(cell_wl[b]), .we(cell_we), .rw(cell_rw[b]),
      .sens(sens_w[b]), .seg_sel(seg_sel[b]), .alu_bit(rega[b % SLICE_W]),
      .sf(sf_w[b]), .if_q(if_w[b]), .af(af_w[b]), .xfer_ok(xok_w[b])
    );
  end

  assign rdata = sf_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rega  <= '0;
      cy    <= 1'b0;
      aluf  <= 1'b0;
      match <= 1'b0;
    end else begin
      if (exec) begin
        if (actrl.dst == DST_REGA) rega <= f;
        if (!actrl.m) cy <= cout;
        unique case (actrl.flag_upd)
          FLG_CARRY: aluf <= cout;
          FLG_ZERO:  aluf <= zero;
          FLG_NZERO: aluf <= !zero;
          default: ;
        endcase
      end else begin
        for (int unsigned k = 0; k < SLICE_W; k++)
          if (xok_w[seg*SLICE_W + k]) rega[k] <= if_w[seg*SLICE_W + k];
      end
      if (aluf_set) aluf <= aluf_val;
      if (assoc)    match <= &(~(sf_w ^ rw) | smask);
    end
  end
endmodule
