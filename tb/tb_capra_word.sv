// tb_capra_word: directed tests of one CAPRA word cell. The testbench keeps
// its own model of SF, IF, AF, REGA and the ALU flag and checks after every
// operation: RAM write/read, BOOLOP with random functions, STORE (COND and
// UNCOND), SET AF (COND' and UNCOND), ASSOCOMP with a search mask, SCAN of
// all 16 sensors (two halves), TOALU/REC, a 32-bit addition as eight 4-bit
// ALU OPs with carry chaining (checked to take eight cycles), conditional
// ALU OPs and the flag update from the ALU result.
module tb_capra_word;
  import capra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  cell_ctrl_t cctrl;
  alu_ctrl_t  actrl;
  logic [SEG_W-1:0] seg;
  logic assoc, wl, we, scan_hi, aluf_set, aluf_val, aluf, cy, match;
  word_t smask, rw, rdata, if_w, af_w;
  logic [LIGHT_W-1:0] light [NSENS];
  logic [2:0] adc_res;
  slice_t regb_in, regc_in, sar4, rega;
  word_t m_sf, m_if, m_af;
  int checks = 0, failures = 0;

  capra_word dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    cctrl = '0; actrl = '0; assoc = 0; wl = 0; we = 0; aluf_set = 0;
  endtask
  task automatic step();     // apply the current controls for one clock
    @(posedge clk); #1; idle();
  endtask
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask
  task automatic check_state(string what);
    check({what, " SF"}, rdata, m_sf);
    check({what, " IF"}, if_w, m_if);
    check({what, " AF"}, af_w, m_af);
  endtask

  function automatic word_t bool_ref(logic [3:0] fn, word_t a, word_t b);
    word_t r;
    for (int i = 0; i < WORD_W; i++) r[i] = fn[{a[i], b[i]}];
    return r;
  endfunction

  initial begin
    word_t x, y, sum, pat;
    int t0;
    idle(); seg = 0; smask = '0; rw = '0; scan_hi = 0; aluf_val = 0;
    adc_res = 3'd4; regb_in = '0; regc_in = '0; sar4 = '0;
    for (int k = 0; k < NSENS; k++) light[k] = '0;
    m_sf = '0; m_if = '0; m_af = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    @(negedge clk);

    // RAM write, then read
    x = $urandom; wl = 1; we = 1; rw = x; step(); m_sf = x;
    check_state("write");
    // write with the word line low must not change the word
    wl = 0; we = 1; rw = ~x; step();
    check_state("unselected write");

    // BOOLOP with random functions, each followed by STORE UNCOND
    for (int t = 0; t < 16; t++) begin
      y = $urandom;
      cctrl.ld_bool = 1; cctrl.bool_fn = 4'(t); rw = y; step();
      m_if = bool_ref(4'(t), m_sf, y);
      check_state("boolop");
      cctrl.xfer = 1; step(); m_sf = m_if;
      check_state("store uncond");
    end

    // SET AF UNCOND from a pattern, then COND' (only where AF is 0)
    pat = 32'hF0F0_3C3C; wl = 1; we = 1; rw = pat; step(); m_sf = pat;
    cctrl.ld_bool = 1; cctrl.bool_fn = 4'b1100; step(); m_if = pat;     // IF <= SF
    cctrl.set_af = 1; step(); m_af = pat;
    check_state("setaf uncond");
    cctrl.ld_bool = 1; cctrl.bool_fn = 4'b1010; rw = 32'h0FF0_0FF0; step(); m_if = 32'h0FF0_0FF0; // IF <= rw
    cctrl.set_af = 1; cctrl.af_cond = 1; step(); m_af = m_af | m_if;
    check_state("setaf cond");
    // STORE COND: only where AF = 1
    cctrl.ld_bool = 1; cctrl.bool_fn = 4'b1010; rw = 32'h1234_5678; step(); m_if = 32'h1234_5678;
    cctrl.xfer = 1; cctrl.cond = 1; step(); m_sf = (m_sf & ~m_af) | (m_if & m_af);
    check_state("store cond");

    // ASSOCOMP with search mask
    x = $urandom; wl = 1; we = 1; rw = x; step(); m_sf = x;
    assoc = 1; cctrl.ld_bool = 1; rw = x ^ 32'h0000_0100; smask = 32'h0000_FF00; step();
    m_if = '1; check_state("assoc masked hit");
    checks++; if (match !== 1'b1) begin failures++; $display("match expected"); end
    assoc = 1; cctrl.ld_bool = 1; rw = x ^ 32'h0001_0000; step();
    m_if = ~32'h0001_0000; check_state("assoc miss");
    checks++; if (match !== 1'b0) begin failures++; $display("no match expected"); end
    smask = '0;

    // SCAN: sensor k gets light 16*k + 8, code k; two halves into IF
    for (int k = 0; k < NSENS; k++) light[k] = LIGHT_W'(16 * k + 8);
    repeat (30) @(negedge clk);
    cctrl.ld_scan = 1; scan_hi = 0; step();
    for (int k = 0; k < NSENS; k++) m_if[2*k +: 2] = 2'(k);
    check_state("scan low");
    cctrl.xfer = 1; step(); m_sf = m_if;                 // low bits into SF
    cctrl.ld_scan = 1; scan_hi = 1; step();
    for (int k = 0; k < NSENS; k++) m_if[2*k +: 2] = 2'(k >> 2);
    check_state("scan high");
    cctrl.set_af = 1; step(); m_af = m_if;               // high bits into AF
    check_state("scan stored");

    // 32-bit addition: SF += Y with Y supplied through REGB, 8 ALU OPs
    x = $urandom; y = $urandom; sum = x + y;
    wl = 1; we = 1; rw = x; step(); m_sf = x;
    t0 = $time;
    for (int j = 0; j < NSEG; j++) begin
      seg = SEG_W'(j); regb_in = y[4*j +: 4];
      actrl.en = 1; actrl.s = 4'b1001; actrl.m = 0; actrl.bsel = B_REGB;
      actrl.dst = DST_BUF; actrl.cin = (j == 0) ? CIN_ZERO : CIN_CARRY;
      step();
    end
    m_sf = sum;
    check_state("32-bit add");
    check("add cycles", 64'(($time - t0) / 10), 64'(NSEG));
    check("carry out", 64'(cy), 64'((33'(x) + 33'(y)) >> 32));

    // conditional ALU OP with ALU flag 0: nothing happens
    seg = 0; actrl.en = 1; actrl.cond = 1; actrl.s = 4'b1111; actrl.m = 1; actrl.dst = DST_REGA;
    step();
    check("cond alu blocked", 64'(rega), 64'(0));
    aluf_set = 1; aluf_val = 1; step();
    check("aluf set", 64'(aluf), 64'(1));
    seg = 3; actrl.en = 1; actrl.cond = 1; actrl.s = 4'b1111; actrl.m = 1; actrl.dst = DST_REGA;
    actrl.flag_upd = FLG_ZERO; step();
    check("cond alu runs", 64'(rega), 64'(m_sf[12 +: 4]));
    check("flag from zero", 64'(aluf), 64'(m_sf[12 +: 4] == 0));

    // REGA <- SAR, REC into segment 5, STORE; then TOALU back from segment 2
    sar4 = 4'hA; actrl.en = 1; actrl.s = 4'b1010; actrl.m = 1; actrl.bsel = B_SAR;
    actrl.dst = DST_REGA; step();
    check("rega from sar", 64'(rega), 64'hA);
    seg = 5; cctrl.ld_rec = 1; step(); m_if[20 +: 4] = 4'hA;
    check_state("rec");
    cctrl.xfer = 1; step(); m_sf = m_if;
    check_state("rec store");
    seg = 2; cctrl.xfer = 1; cctrl.global_ = 1; step();
    check("toalu", 64'(rega), 64'(m_if[8 +: 4]));
    // ALU flag from carry: REGA + SAR(=0xA) with REGA = if seg 2
    actrl.en = 1; actrl.s = 4'b1001; actrl.m = 0; actrl.bsel = B_SAR; actrl.dst = DST_REGA;
    actrl.flag_upd = FLG_CARRY; seg = 6; step();
    check("flag from carry", 64'(aluf), 64'((5'(m_sf[24 +: 4]) + 5'hA) >> 4));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
