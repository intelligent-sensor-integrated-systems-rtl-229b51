// tb_capra_ctrl: applies every opcode with random fields and compares the
// decoded control lines with an expected table written in the testbench;
// checks the SAR and SMASK loads and that an invalid cycle decodes to NOP.
module tb_capra_ctrl;
  import capra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, valid;
  instr_t instr;
  logic dec_en, we, rd, aluf_set, search;
  addr_t dec_mask;
  cell_ctrl_t cctrl;
  alu_ctrl_t actrl;
  word_t sar, smask;
  int checks = 0, failures = 0;

  capra_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    word_t esar = '0, esmask = '0;
    valid = 0; instr = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      // expected decode, one opcode per row
      logic [5:0] e_strobe;   // dec_en we rd aluf_set search masked
      logic [8:0] e_cell;     // ld_bool ld_scan ld_rec xfer global set_af
      opcode_e o;
      @(negedge clk);
      instr = instr_t'({$urandom, $urandom, $urandom});
      o = opcode_e'(t % 15);
      instr.op = o; valid = (t % 17 != 16);
      if (!valid) o = OP_NOP;
      case (o)
        OP_WRITE:    begin e_strobe = 6'b110000; e_cell = '0; end
        OP_READ:     begin e_strobe = 6'b101000; e_cell = '0; end
        OP_MWRITE:   begin e_strobe = 6'b110001; e_cell = '0; end
        OP_SETALUF:  begin e_strobe = 6'b100101; e_cell = '0; end
        OP_ASSOCOMP: begin e_strobe = 6'b000010; e_cell = 9'b100000000; end
        OP_BOOLOP:   begin e_strobe = 6'b000000; e_cell = 9'b100000000; end
        OP_SCAN:     begin e_strobe = 6'b000000; e_cell = 9'b010000000; end
        OP_REC:      begin e_strobe = 6'b000000; e_cell = 9'b001000000; end
        OP_STORE:    begin e_strobe = 6'b000000; e_cell = 9'b000100000; end
        OP_TOALU:    begin e_strobe = 6'b000000; e_cell = 9'b000110000; end
        OP_SETAF:    begin e_strobe = 6'b000000; e_cell = 9'b000001000; end
        default:     begin e_strobe = 6'b000000; e_cell = '0; end
      endcase
      #1;
      check($sformatf("strobes op=%0d", o), 64'({dec_en, we, rd, aluf_set, search, |dec_mask}),
            64'({e_strobe[5:1], e_strobe[0] & (|instr.amask)}));
      if (e_strobe[0]) check("mask", 64'(dec_mask), 64'(instr.amask));
      check($sformatf("cell op=%0d", o),
            64'({cctrl.ld_bool, cctrl.ld_scan, cctrl.ld_rec, cctrl.xfer, cctrl.global_, cctrl.set_af, 3'b000}),
            64'(e_cell));
      if (e_cell != 0) begin
        check("cond", 64'({cctrl.cond, cctrl.af_cond}), 64'({2{instr.cond}}));
        check("bool_fn", 64'(cctrl.bool_fn), 64'(instr.bool_fn));
      end
      check("alu en", 64'(actrl.en), 64'(o == OP_ALUOP));
      if (o == OP_ALUOP)
        check("alu fields", 64'({actrl.cond, actrl.s, actrl.m, actrl.bsel, actrl.dst, actrl.cin, actrl.flag_upd}),
              64'({instr.cond, instr.alu_s, instr.alu_m, instr.bsel, instr.dst, instr.cin, instr.flag_upd}));
      if (o == OP_LDSAR) esar = instr.data;
      if (o == OP_LDSMASK) esmask = instr.data;
      @(posedge clk); #1;
      check("sar", 64'(sar), 64'(esar));
      check("smask", 64'(smask), 64'(esmask));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
