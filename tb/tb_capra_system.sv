// tb_capra_system: end-to-end test of the intelligent memory at its default
// size (64 RAM words, 32 CAPRA words, 16 CAM words), driving only machine
// instructions and reading results back with READ.
//
// It runs: RAM write/read in every segment, a masked write that initialises
// all CAPRA words at once, associative search in the CAM and CAPRA words,
// BOOLOP with STORE, SET AF (COND'/UNCOND) with STORE COND, SCAN of all
// sensors in two halves at 4-bit and at 2-bit resolution, TOALU/REC, a
// nearest-neighbour comparison of a binary image (one row per CAPRA word,
// 16 instructions for 32 columns, independent of the number of rows), a
// 32-bit word-parallel addition in eight ALU OPs, masked SET ALU FLAG with
// a conditional ALU OP, and the ALU flag set from a result. Each mechanism
// is counted; one that never ran is a failure (15 in all). Expected values
// come from a model of the memory kept here.
module tb_capra_system;
  import capra_pkg::*;
  localparam int unsigned RAMW = 64, CAPW = 32, CAMW = 16;
  localparam int unsigned CAP0 = RAMW, CAM0 = RAMW + CAPW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid, rvalid;
  instr_t instr;
  word_t rdata;
  logic [CAMW-1:0] cam_match;
  logic [CAPW-1:0] capra_match, alu_flags;
  logic [LIGHT_W-1:0] light [CAPW][NSENS];
  logic [2:0] adc_res;

  capra_system dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t cap [CAPW];
  word_t camm [CAMW];
  int n_mech [string];

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
  task automatic issue(instr_t i);
    @(negedge clk); instr = i; instr_valid = 1'b1;
    @(negedge clk); instr_valid = 1'b0; instr = '0;
  endtask
  // back-to-back issue without idle cycles (for cycle counting)
  task automatic issue_b2b(instr_t i);
    instr = i; instr_valid = 1'b1; @(negedge clk);
  endtask
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask
  task automatic wr(int a, word_t d);
    instr_t i = mk(OP_WRITE); i.addr = addr_t'(a); i.data = d; issue(i);
  endtask
  task automatic rd_check(string what, int a, word_t exp);
    instr_t i = mk(OP_READ); i.addr = addr_t'(a);
    @(negedge clk); instr = i; instr_valid = 1'b1;
    @(negedge clk); instr_valid = 1'b0;
    check({what, " rvalid"}, 64'(rvalid), 64'(1));
    check($sformatf("%s @%0d", what, a), 64'(rdata), 64'(exp));
  endtask
  task automatic check_capra(string what);
    for (int w = 0; w < CAPW; w++) rd_check(what, CAP0 + w, cap[w]);
  endtask
  task automatic aluop(logic [3:0] s, logic m, bsel_e b, dst_e d, int j,
                       cin_e c = CIN_ZERO, logic cond = 0, flag_upd_e fu = FLG_KEEP);
    instr_t i = mk(OP_ALUOP);
    i.alu_s = s; i.alu_m = m; i.bsel = b; i.dst = d; i.seg = SEG_W'(j); i.cin = c;
    i.cond = cond; i.flag_upd = fu;
    issue_b2b(i);
  endtask
  task automatic boolop(logic [3:0] fn, word_t operand);
    instr_t i = mk(OP_BOOLOP); i.bool_fn = fn; i.data = operand; issue(i);
  endtask
  task automatic store(logic cond);
    instr_t i = mk(OP_STORE); i.cond = cond; issue(i);
  endtask
  task automatic setaf(logic cond);
    instr_t i = mk(OP_SETAF); i.cond = cond; issue(i);
  endtask

  initial begin
    word_t ram [RAMW];
    word_t img [CAPW];
    word_t af_m [CAPW];
    instr_t i;
    int t0;
    instr_valid = 0; instr = '0; adc_res = 3'd4;
    for (int w = 0; w < CAPW; w++) for (int k = 0; k < NSENS; k++) light[w][k] = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;

    // ---- RAM segment
    for (int a = 0; a < RAMW; a++) begin ram[a] = $urandom; wr(a, ram[a]); end
    for (int a = 0; a < RAMW; a += 7) rd_check("ram", a, ram[a]);
    n_mech["ram write/read"]++;

    // ---- masked write: all CAPRA words at once
    i = mk(OP_MWRITE); i.addr = addr_t'(CAP0); i.amask = addr_t'(CAPW - 1); i.data = 32'hC0FF_EE00;
    issue(i);
    for (int w = 0; w < CAPW; w++) cap[w] = 32'hC0FF_EE00;
    check_capra("mwrite all");
    // masked write to every fourth CAPRA word
    i.addr = addr_t'(CAP0 + 1); i.amask = addr_t'(CAPW - 4); i.data = 32'h1111_2222;
    issue(i);
    for (int w = 1; w < CAPW; w += 4) cap[w] = 32'h1111_2222;
    check_capra("mwrite every 4th");
    for (int a = 0; a < RAMW; a += 9) rd_check("ram untouched", a, ram[a]);
    n_mech["masked multiple write"]++;

    // ---- CAM: records with a 4-bit key in the top nibble
    for (int w = 0; w < CAMW; w++) begin
      camm[w] = {4'(w % 3), 28'($urandom)}; wr(CAM0 + w, camm[w]);
    end
    for (int w = 0; w < CAMW; w += 5) rd_check("cam", CAM0 + w, camm[w]);
    for (int k = 0; k < 3; k++) begin
      logic [CAMW-1:0] em;
      logic [CAPW-1:0] ecm;
      i = mk(OP_LDSAR); i.data = {4'(k), 28'h0}; issue(i);
      i = mk(OP_LDSMASK); i.data = 32'h0FFF_FFFF; issue(i);
      issue(mk(OP_ASSOCOMP));
      for (int w = 0; w < CAMW; w++) em[w] = camm[w][31:28] == 4'(k);
      for (int w = 0; w < CAPW; w++) ecm[w] = cap[w][31:28] == 4'(k);
      check($sformatf("cam match key %0d", k), 64'(cam_match), 64'(em));
      check($sformatf("capra match key %0d", k), 64'(capra_match), 64'(ecm));
      if (em != 0) n_mech["cam search hit"]++;
      if (ecm != 0) n_mech["capra search hit"]++;
    end
    i = mk(OP_LDSAR); i.data = 32'h1111_2222; issue(i);
    i = mk(OP_LDSMASK); i.data = 32'h0; issue(i);
    issue(mk(OP_ASSOCOMP));
    begin
      logic [CAPW-1:0] ecm;
      for (int w = 0; w < CAPW; w++) ecm[w] = cap[w] == 32'h1111_2222;
      check("capra exact match", 64'(capra_match), 64'(ecm));
      if (ecm != 0) n_mech["capra search hit"]++;
    end
    // ASSOCOMP leaves XNOR results in IF: SET AF from them, then STORE COND
    setaf(1'b0);
    for (int w = 0; w < CAPW; w++) af_m[w] = ~(cap[w] ^ 32'h1111_2222);
    boolop(4'b1010, 32'hDEAD_BEEF);              // IF <= operand
    store(1'b1);
    for (int w = 0; w < CAPW; w++) cap[w] = (cap[w] & ~af_m[w]) | (32'hDEAD_BEEF & af_m[w]);
    check_capra("assoc + store cond");
    n_mech["store cond"]++;

    // ---- fresh contents, BOOLOP + STORE UNCOND
    for (int w = 0; w < CAPW; w++) begin cap[w] = $urandom; wr(CAP0 + w, cap[w]); end
    boolop(4'b0110, 32'h0F0F_00FF); store(1'b0);     // XOR
    for (int w = 0; w < CAPW; w++) cap[w] ^= 32'h0F0F_00FF;
    check_capra("boolop xor");
    boolop(4'b1000, 32'hFFFF_0000); store(1'b0);     // AND
    for (int w = 0; w < CAPW; w++) cap[w] &= 32'hFFFF_0000;
    check_capra("boolop and");
    n_mech["boolop"]++;

    // ---- SET AF UNCOND then COND' (AF accumulates), STORE COND
    boolop(4'b1010, 32'h0000_00F0); setaf(1'b0);
    boolop(4'b1010, 32'h0000_0F00); setaf(1'b1);
    boolop(4'b0011, 32'h0);  store(1'b1);              // IF <= ~SF where AF
    for (int w = 0; w < CAPW; w++) cap[w] ^= 32'h0000_0FF0;
    check_capra("setaf cond'");
    n_mech["set af cond'"]++;

    // ---- SCAN: sensor k of word w sees code (w + k) mod 16
    for (int w = 0; w < CAPW; w++)
      for (int k = 0; k < NSENS; k++) light[w][k] = LIGHT_W'(16 * ((w + k) % 16) + 5);
    repeat (30) @(negedge clk);
    i = mk(OP_SCAN); i.scan_hi = 0; issue(i); store(1'b0);
    for (int w = 0; w < CAPW; w++)
      for (int k = 0; k < NSENS; k++) cap[w][2*k +: 2] = 2'((w + k) % 16);
    check_capra("scan low bits");
    i.scan_hi = 1; issue(i); store(1'b0);
    for (int w = 0; w < CAPW; w++)
      for (int k = 0; k < NSENS; k++) cap[w][2*k +: 2] = 2'(((w + k) % 16) >> 2);
    check_capra("scan high bits");
    n_mech["scan"]++;
    // programmable resolution: m = 2 gives floor(light * 4 / 256) in bits [3:2]
    adc_res = 3'd2;
    repeat (20) @(negedge clk);
    i = mk(OP_SCAN); i.scan_hi = 0; issue(i); store(1'b0);
    for (int w = 0; w < CAPW; w++)
      for (int k = 0; k < NSENS; k++) cap[w][2*k +: 2] = 2'b00;
    check_capra("scan m=2 low bits");
    i.scan_hi = 1; issue(i); store(1'b0);
    for (int w = 0; w < CAPW; w++)
      for (int k = 0; k < NSENS; k++) cap[w][2*k +: 2] = 2'(((w + k) % 16) >> 2);
    check_capra("scan m=2 high bits");
    adc_res = 3'd4;
    n_mech["reduced A/D resolution"]++;

    // ---- TOALU / REC: copy segment 0 into segment 1 of every word
    boolop(4'b1100, 32'h0);                         // IF <= SF
    i = mk(OP_TOALU); i.seg = 0; issue(i);
    i = mk(OP_REC); i.seg = 1; issue(i);
    store(1'b0);
    for (int w = 0; w < CAPW; w++) cap[w][7:4] = cap[w][3:0];
    check_capra("toalu/rec");
    n_mech["transfer to alu / rec"]++;
    // REGC: segment 2 <- REGA of the lower neighbour (its segment 0)
    @(negedge clk);
    aluop(4'b1010, 1, B_REGC, DST_BUF, 2);
    instr_valid = 0;
    for (int w = 0; w < CAPW; w++) cap[w][11:8] = (w == CAPW - 1) ? 4'h0 : cap[w+1][3:0];
    check_capra("regc neighbour");
    n_mech["neighbour exchange"]++;

    // ---- workload: compare every pixel of a binary image with its upper
    // neighbour. Row r is CAPRA word r; result bit = 1 where equal.
    for (int w = 0; w < CAPW; w++) begin img[w] = $urandom; wr(CAP0 + w, img[w]); end
    @(negedge clk);
    t0 = $time;
    for (int j = 0; j < NSEG; j++) begin
      aluop(4'b1111, 1, B_REGA, DST_REGA, j);        // REGA <= own segment j
      aluop(4'b1001, 1, B_REGB, DST_BUF, j);         // seg j <= XNOR(seg j, upper REGA)
    end
    instr_valid = 0;
    check("neighbourhood compare cycles", 64'(($time - t0) / 10), 64'(2 * NSEG));
    for (int w = 0; w < CAPW; w++) cap[w] = ~(img[w] ^ ((w == 0) ? 32'h0 : img[w-1]));
    check_capra("vertical neighbour compare");
    n_mech["neighbourhood compare"]++;

    // ---- 32-bit addition of a constant supplied slice by slice through SAR:
    // 8 ALU OPs, carry chained through the carry flip-flop
    begin
      word_t k = $urandom;
      logic [3:0] nib [NSEG];
      for (int j = 0; j < NSEG; j++) nib[j] = k[4*j +: 4];
      // first put the addend nibble j into every REGA before each slice
      @(negedge clk);
      t0 = $time;
      for (int j = 0; j < NSEG; j++) begin
        instr_t l = mk(OP_LDSAR); l.data = 32'(nib[j]);
        issue_b2b(l);
        aluop(4'b1001, 0, B_SAR, DST_BUF, j, (j == 0) ? CIN_ZERO : CIN_CARRY);
      end
      instr_valid = 0;
      check("32-bit add cycles (8 ALU OPs + 8 operand loads)", 64'(($time - t0) / 10), 64'(2 * NSEG));
      for (int w = 0; w < CAPW; w++) cap[w] = cap[w] + k;
      check_capra("32-bit add");
      n_mech["multi-slice arithmetic"]++;
    end

    // ---- SET ALU FLAG, ADR, MASK on odd words, conditional ALU OP
    i = mk(OP_SETALUF); i.addr = addr_t'(CAP0); i.amask = addr_t'(CAPW - 1); i.data = 0; issue(i);
    check("alu flags cleared", 64'(alu_flags), 64'(0));
    i = mk(OP_SETALUF); i.addr = addr_t'(CAP0 + 1); i.amask = addr_t'(CAPW - 2); i.data = 1; issue(i);
    check("alu flags odd", 64'(alu_flags), 64'h AAAA_AAAA);
    i = mk(OP_LDSAR); i.data = 32'h5; issue(i);
    @(negedge clk);
    aluop(4'b1010, 1, B_SAR, DST_BUF, 7, CIN_ZERO, 1'b1);
    instr_valid = 0;
    for (int w = 1; w < CAPW; w += 2) cap[w][31:28] = 4'h5;
    check_capra("conditional alu op");
    n_mech["conditional alu op"]++;
    // flag from result: ALU flag <= (segment 7 == 5) for all words
    @(negedge clk);
    aluop(4'b0110, 1, B_SAR, DST_REGA, 7, CIN_ZERO, 1'b0, FLG_ZERO);   // A ^ 5
    instr_valid = 0;
    begin
      logic [CAPW-1:0] ef;
      for (int w = 0; w < CAPW; w++) ef[w] = cap[w][31:28] == 4'h5;
      check("alu flag from result", 64'(alu_flags), 64'(ef));
    end
    n_mech["alu flag from result"]++;
    for (int a = 0; a < RAMW; a += 5) rd_check("ram at end", a, ram[a]);

    foreach (n_mech[k]) $display("mechanism %-24s : %0d", k, n_mech[k]);
    if (n_mech.num() != 15) begin
      failures++; $display("only %0d of 15 mechanisms exercised", n_mech.num());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
