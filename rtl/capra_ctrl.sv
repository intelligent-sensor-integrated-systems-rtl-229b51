// capra_ctrl: instruction decoder of the intelligent memory.
//
// Turns one machine instruction per clock into the control lines of the
// memory segments: decoder enable and address mask, RAM write and read
// strobes, the CAM search strobe, the bit-cell control lines (BOOL function,
// SCAN, REC, TRANSFER with GLOBAL/LOCAL and COND/UNCOND, SET FLAG with
// COND'/UNCOND) and the ALU control lines. It also holds the search argument
// register SAR and the search mask register SMASK, loaded by LDSAR and
// LDSMASK from the instruction's data field.
// The instruction set follows the architecture (WRITE, READ, MWRITE,
// ASSOCOMP, BOOLOP, SCAN, STORE, SET AF, ALU OP, SET ALU FLAG). LDSAR,
// LDSMASK, TOALU and REC are this design's names for the register loads and
// for the TRANSFER-to-ALU and REC control lines that the bit-cell
// description names; the field layout of instr_t is also this design's.
// WRITE and READ ignore amask (single-word access); MWRITE and SETALUF use
// it. Timing: the decode is combinational; SAR and SMASK load on the clock
// edge and reset to 0.
module capra_ctrl
  import capra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  instr_t     instr,
  output logic       dec_en,
  output addr_t      dec_mask,
  output logic       we,
  output logic       rd,
  output logic       aluf_set,
  output logic       search,
  output cell_ctrl_t cctrl,
  output alu_ctrl_t  actrl,
  output word_t      sar,
  output word_t      smask
);
  opcode_e op;
  assign op = valid ? instr.op : OP_NOP;

  always_comb begin
    dec_en   = op inside {OP_WRITE, OP_READ, OP_MWRITE, OP_SETALUF};
    dec_mask = (op inside {OP_MWRITE, OP_SETALUF}) ? instr.amask : '0;
    we       = op inside {OP_WRITE, OP_MWRITE};
    rd       = op == OP_READ;
    aluf_set = op == OP_SETALUF;
    search   = op == OP_ASSOCOMP;

    cctrl          = '0;
    cctrl.bool_fn  = instr.bool_fn;
    cctrl.cond     = instr.cond;
    cctrl.af_cond  = instr.cond;
    cctrl.ld_bool  = op inside {OP_BOOLOP, OP_ASSOCOMP};
    cctrl.ld_scan  = op == OP_SCAN;
    cctrl.ld_rec   = op == OP_REC;
    cctrl.xfer     = op inside {OP_STORE, OP_TOALU};
    cctrl.global_  = op == OP_TOALU;
    cctrl.set_af   = op == OP_SETAF;

    actrl          = '0;
    actrl.en       = op == OP_ALUOP;
    actrl.cond     = instr.cond;
    actrl.s        = instr.alu_s;
    actrl.m        = instr.alu_m;
    actrl.bsel     = instr.bsel;
    actrl.dst      = instr.dst;
    actrl.cin      = instr.cin;
    actrl.flag_upd = instr.flag_upd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sar   <= '0;
      smask <= '0;
    end else begin
      if (op == OP_LDSAR)   sar   <= instr.data;
      if (op == OP_LDSMASK) smask <= instr.data;
    end
  end
endmodule
