// capra_pkg: types and constants shared by the content-addressable
// processor/register array (CAPRA) memory system.
//
// The word length (32 bits), the 4-bit ALU slice, the 16+16 ALU functions
// selected by four S lines and one mode line, and the 4-bit sensor
// resolution follow the architecture description. The binary encodings of
// the opcodes and of the instruction word are this design's own choice:
// the architecture names the instructions but does not fix a format.
package capra_pkg;

  localparam int unsigned WORD_W   = 32;          // CAPRA word length n
  localparam int unsigned SLICE_W  = 4;           // ALU slice width
  localparam int unsigned NSEG     = WORD_W / SLICE_W;  // 4-bit segments per word
  localparam int unsigned SEG_W    = $clog2(NSEG);
  localparam int unsigned NSENS    = WORD_W / 2;  // one sensor per bit-cell pair
  localparam int unsigned ADC_BITS = 4;           // sensor resolution m
  localparam int unsigned LIGHT_W  = 8;           // digital stand-in for light level
  localparam int unsigned ADDR_W   = 8;           // address bus of the uniform memory space

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [SLICE_W-1:0] slice_t;

  // Machine instructions (one clock each)
  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_WRITE    = 4'd1,   // WRITE, ADR
    OP_READ     = 4'd2,   // READ, ADR
    OP_MWRITE   = 4'd3,   // MWRITE, ADR, MASK
    OP_LDSAR    = 4'd4,   // load search argument register
    OP_LDSMASK  = 4'd5,   // load search don't-care mask
    OP_ASSOCOMP = 4'd6,   // associative compare (CAM and CAPRA)
    OP_BOOLOP   = 4'd7,   // IF <= BOOL(SF, operand) in every CAPRA bit cell
    OP_SCAN     = 4'd8,   // IF <= digitized sensor bits
    OP_STORE    = 4'd9,   // SF <= IF  (COND/UNCOND)
    OP_SETAF    = 4'd10,  // AF <= IF  (COND'/UNCOND)
    OP_TOALU    = 4'd11,  // REGA <= IF of segment j (TRANSFER, GLOBAL/LOCAL=1)
    OP_REC      = 4'd12,  // IF of segment j <= REGA  (REC)
    OP_ALUOP    = 4'd13,  // ALU OP, BUFFER(j), operand2, destination
    OP_SETALUF  = 4'd14   // SET ALU FLAG, ADR, MASK
  } opcode_e;

  // Second ALU operand
  typedef enum logic [1:0] {
    B_REGA = 2'd0,   // own REGA
    B_REGB = 2'd1,   // REGA of upper neighbour (word i-1)
    B_REGC = 2'd2,   // REGA of lower neighbour (word i+1)
    B_SAR  = 2'd3    // SAR[3:0], global operand
  } bsel_e;

  typedef enum logic {
    DST_BUF  = 1'b0, // write back into segment j of the word
    DST_REGA = 1'b1
  } dst_e;

  typedef enum logic [1:0] {
    CIN_ZERO  = 2'd0,
    CIN_ONE   = 2'd1,
    CIN_CARRY = 2'd2  // carry flip-flop from previous ALU OP (multi-slice arithmetic)
  } cin_e;

  typedef enum logic [1:0] {
    FLG_KEEP  = 2'd0,
    FLG_CARRY = 2'd1, // ALU flag <= carry out
    FLG_ZERO  = 2'd2, // ALU flag <= (F == 0)
    FLG_NZERO = 2'd3  // ALU flag <= (F != 0)
  } flag_upd_e;

  // Instruction word as presented by the host
  typedef struct packed {
    opcode_e   op;
    logic      cond;      // COND (1) / UNCOND (0) for STORE, SETAF, TOALU, ALUOP
    addr_t     addr;      // ADR
    addr_t     amask;     // MASK: 1 = address bit is don't care
    word_t     data;      // MDR operand / SAR value / flag value in bit 0
    logic [3:0] bool_fn;  // BOOLOP truth table, indexed by {SF, operand}
    logic [3:0] alu_s;    // ALU function select S3..S0
    logic      alu_m;     // 1 = logic mode, 0 = arithmetic mode
    bsel_e     bsel;
    dst_e      dst;
    cin_e      cin;
    flag_upd_e flag_upd;
    logic [SEG_W-1:0] seg;  // segment index j
    logic      scan_hi;   // SCAN: 0 = converter bits [1:0], 1 = bits [3:2]
  } instr_t;

  // Control lines of one extended bit cell (Fig. "logic level structure")
  typedef struct packed {
    logic       ld_bool;  // IF <= BOOL(SF, rw line)
    logic [3:0] bool_fn;
    logic       ld_scan;  // IF <= sensor bit (SCAN)
    logic       ld_rec;   // IF <= ALU bit (REC), segment j only
    logic       xfer;     // TRANSFER
    logic       global_; // GLOBAL/LOCAL: 1 = to ALU, 0 = to SF
    logic       cond;     // COND (1) / UNCOND (0)
    logic       set_af;   // SET FLAG
    logic       af_cond;  // COND': only if AF = 0
  } cell_ctrl_t;

  // Control lines of the word-level ALU
  typedef struct packed {
    logic       en;
    logic       cond;     // execute only where the ALU activity flag is set
    logic [3:0] s;
    logic       m;
    bsel_e      bsel;
    dst_e       dst;
    cin_e       cin;
    flag_upd_e  flag_upd;
  } alu_ctrl_t;

endpackage
