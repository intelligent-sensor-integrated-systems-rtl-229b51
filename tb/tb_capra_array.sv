// tb_capra_array: checks the word-parallel behaviour of the CAPRA segment
// with 8 words: RAM access through word lines, the nearest-neighbour links
// (REGB = upper neighbour's REGA, REGC = lower neighbour's REGA, 0 beyond
// the ends), a parallel add of every word's neighbour value, conditional
// ALU OPs on a subset of words selected by the ALU flags, and the word
// match vector of ASSOCOMP.
module tb_capra_array;
  import capra_pkg::*;
  localparam int unsigned NW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  cell_ctrl_t cctrl;
  alu_ctrl_t  actrl;
  logic [SEG_W-1:0] seg;
  logic assoc, we, scan_hi, aluf_val;
  word_t smask, sar, rw, rdata;
  logic [NW-1:0] wl, aluf_set, aluf, match;
  logic [LIGHT_W-1:0] light [NW][NSENS];
  logic [2:0] adc_res;
  slice_t rega [NW];
  word_t m [NW];
  slice_t mr [NW], mr_old [NW];
  int checks = 0, failures = 0;

  capra_array #(.NWORDS(NW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    cctrl = '0; actrl = '0; assoc = 0; wl = '0; we = 0; aluf_set = '0;
  endtask
  task automatic step();
    @(posedge clk); #1; idle();
  endtask
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask
  task automatic alu(logic [3:0] s, logic md, bsel_e b, dst_e d, logic c, logic [SEG_W-1:0] j);
    actrl.en = 1; actrl.s = s; actrl.m = md; actrl.bsel = b; actrl.dst = d; actrl.cond = c;
    actrl.cin = CIN_ZERO; seg = j; step();
  endtask
  task automatic check_regs(string what);
    for (int i = 0; i < NW; i++) check($sformatf("%s rega[%0d]", what, i), 64'(rega[i]), 64'(mr[i]));
  endtask

  initial begin
    idle(); seg = 0; smask = '0; sar = '0; rw = '0; scan_hi = 0; aluf_val = 0; adc_res = 4;
    for (int i = 0; i < NW; i++) for (int k = 0; k < NSENS; k++) light[i][k] = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < NW; i++) begin
      m[i] = $urandom; wl = NW'(1) << i; we = 1; rw = m[i]; step();
    end
    for (int i = 0; i < NW; i++) begin
      wl = NW'(1) << i; #1; check($sformatf("read %0d", i), 64'(rdata), 64'(m[i])); wl = '0;
    end
    // REGA <- segment 1 of each word (F = A)
    alu(4'b1111, 1, B_REGA, DST_REGA, 0, 1);
    for (int i = 0; i < NW; i++) mr[i] = m[i][7:4];
    check_regs("load");
    // REGA <- REGB (upper neighbour): shift by one word towards higher index
    alu(4'b1010, 1, B_REGB, DST_REGA, 0, 0);
    mr_old = mr;
    for (int i = 0; i < NW; i++) mr[i] = (i == 0) ? 4'h0 : mr_old[i-1];
    check_regs("regb shift");
    // REGA <- REGC (lower neighbour): shift back
    alu(4'b1010, 1, B_REGC, DST_REGA, 0, 0);
    mr_old = mr;
    for (int i = 0; i < NW; i++) mr[i] = (i == NW - 1) ? 4'h0 : mr_old[i+1];
    check_regs("regc shift");
    // segment 2 of every word += REGB, all words in parallel
    alu(4'b1001, 0, B_REGB, DST_BUF, 0, 2);
    for (int i = 0; i < NW; i++) m[i][11:8] = m[i][11:8] + ((i == 0) ? 4'h0 : mr[i-1]);
    for (int i = 0; i < NW; i++) begin
      wl = NW'(1) << i; #1; check($sformatf("neighbour add %0d", i), 64'(rdata), 64'(m[i])); wl = '0;
    end
    // ALU flags on odd words only, then a conditional ALU OP
    aluf_set = 8'b1010_1010; aluf_val = 1; step();
    check("flags", 64'(aluf), 64'h AA);
    sar = 32'h0000_0007;
    alu(4'b1010, 1, B_SAR, DST_BUF, 1, 7);
    for (int i = 1; i < NW; i += 2) m[i][31:28] = 4'h7;
    for (int i = 0; i < NW; i++) begin
      wl = NW'(1) << i; #1; check($sformatf("cond op %0d", i), 64'(rdata), 64'(m[i])); wl = '0;
    end
    // ASSOCOMP on the top nibble
    sar = 32'h7000_0000; smask = 32'h0FFF_FFFF; assoc = 1; cctrl.ld_bool = 1; step();
    begin
      logic [NW-1:0] em;
      for (int i = 0; i < NW; i++) em[i] = m[i][31:28] == 4'h7;
      check("match vector", 64'(match), 64'(em));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
