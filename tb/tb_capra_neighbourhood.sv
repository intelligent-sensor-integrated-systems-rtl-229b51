// tb_capra_neighbourhood: the neighbourhood-comparison workload on the full
// default memory. A random 32 x 32 binary image is stored one row per CAPRA
// word, and every pixel is compared with a neighbour in all rows at once:
//
//  * left neighbour (bit j-1 of the same row): copy the row into the
//    activity flags (BOOLOP copy + SETAF), shift the row left by one with
//    eight chained A+A ALU OPs, form shifted XOR original with BOOLOP NOT +
//    STORE COND (AF selects where the bit is inverted), then invert:
//    14 instructions;
//  * upper neighbour (row i-1, through REGB) and lower neighbour (row i+1,
//    through REGC): two ALU OPs per 4-bit segment, 16 instructions.
//
// Each result is checked against a reference computed here, and each
// program is checked to take the same number of cycles whatever the image,
// with instructions issued back to back. Missing neighbours beyond the
// image border read as 0.
module tb_capra_neighbourhood;
  import capra_pkg::*;
  localparam int unsigned CAPW = 32, CAP0 = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid, rvalid;
  instr_t instr;
  word_t rdata;
  logic [15:0] cam_match;
  logic [CAPW-1:0] capra_match, alu_flags;
  logic [LIGHT_W-1:0] light [CAPW][NSENS];
  logic [2:0] adc_res;

  capra_system dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t img [CAPW];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t mk(opcode_e op);
    instr_t i = '0;
    i.op = op;
    return i;
  endfunction
  task automatic go(instr_t i);         // issue back to back
    instr = i; instr_valid = 1'b1; @(negedge clk);
  endtask
  task automatic stop();
    instr_valid = 1'b0; instr = '0;
  endtask
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask
  task automatic load_image();
    @(negedge clk);
    for (int w = 0; w < CAPW; w++) begin
      instr_t i = mk(OP_WRITE);
      img[w] = $urandom;
      i.addr = addr_t'(CAP0 + w); i.data = img[w];
      go(i);
    end
    stop();
  endtask
  task automatic check_rows(string what, word_t exp [CAPW]);
    for (int w = 0; w < CAPW; w++) begin
      instr_t i = mk(OP_READ);
      i.addr = addr_t'(CAP0 + w);
      @(negedge clk); instr = i; instr_valid = 1'b1;
      @(negedge clk); stop();
      check($sformatf("%s row %0d", what, w), 64'(rdata), 64'(exp[w]));
    end
  endtask
  function automatic instr_t alu(logic [3:0] s, logic m, bsel_e b, dst_e d, int j, cin_e c);
    instr_t i = mk(OP_ALUOP);
    i.alu_s = s; i.alu_m = m; i.bsel = b; i.dst = d; i.seg = SEG_W'(j); i.cin = c;
    return i;
  endfunction
  function automatic instr_t boolop(logic [3:0] fn);
    instr_t i = mk(OP_BOOLOP); i.bool_fn = fn; return i;
  endfunction
  function automatic instr_t cond_op(opcode_e op, logic cond);
    instr_t i = mk(op); i.cond = cond; return i;
  endfunction

  initial begin
    word_t exp [CAPW];
    int t0, cyc;
    instr_valid = 0; instr = '0; adc_res = 3'd4;
    for (int w = 0; w < CAPW; w++) for (int k = 0; k < NSENS; k++) light[w][k] = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;

    for (int rep = 0; rep < 3; rep++) begin
      // ---- phase 1: left neighbour (bit j-1)
      load_image();
      t0 = $time;
      go(boolop(4'b1100));                 // IF <= SF
      go(cond_op(OP_SETAF, 1'b0));         // AF <= original row
      for (int j = 0; j < NSEG; j++)
        go(alu(4'b1100, 1'b0, B_REGA, DST_BUF, j, (j == 0) ? CIN_ZERO : CIN_CARRY));  // row << 1
      go(boolop(4'b0011));                 // IF <= ~SF
      go(cond_op(OP_STORE, 1'b1));         // SF <= ~SF where AF: shifted ^ original
      go(boolop(4'b0011));
      go(cond_op(OP_STORE, 1'b0));         // equality
      stop();
      cyc = int'(($time - t0) / 10);
      check("left-neighbour program cycles", 64'(cyc), 64'(14));
      for (int w = 0; w < CAPW; w++) exp[w] = ~(img[w] ^ (img[w] << 1));
      check_rows("left", exp);

      // ---- phase 2: upper neighbour (row i-1, REGB)
      load_image();
      t0 = $time;
      for (int j = 0; j < NSEG; j++) begin
        go(alu(4'b1111, 1'b1, B_REGA, DST_REGA, j, CIN_ZERO));   // REGA <= segment j
        go(alu(4'b1001, 1'b1, B_REGB, DST_BUF, j, CIN_ZERO));    // XNOR with upper
      end
      stop();
      check("upper-neighbour program cycles", 64'(($time - t0) / 10), 64'(16));
      for (int w = 0; w < CAPW; w++) exp[w] = ~(img[w] ^ ((w == 0) ? '0 : img[w-1]));
      check_rows("upper", exp);

      // ---- phase 3: lower neighbour (row i+1, REGC)
      load_image();
      t0 = $time;
      for (int j = 0; j < NSEG; j++) begin
        go(alu(4'b1111, 1'b1, B_REGA, DST_REGA, j, CIN_ZERO));
        go(alu(4'b1001, 1'b1, B_REGC, DST_BUF, j, CIN_ZERO));
      end
      stop();
      check("lower-neighbour program cycles", 64'(($time - t0) / 10), 64'(16));
      for (int w = 0; w < CAPW; w++) exp[w] = ~(img[w] ^ ((w == CAPW - 1) ? '0 : img[w+1]));
      check_rows("lower", exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
