// tb_capra_sobel: the Sobel x-gradient on 16-grey-level (4-bit) pixels,
// computed for a whole image strip in parallel on the default memory.
//
// Layout: CAPRA word c holds image column c. Segments 0..3 hold the 4-bit
// pixels of rows 0..3; segments 5:4 receive the 8-bit two's-complement
// gradient Gx of row 1 and segments 7:6 that of row 2. With pixel x5 at
// (row r, column c),
//     Gx = (x7 + 2 x8 + x9) - (x1 + 2 x2 + x3),
// where x1..x3 are row r-1 and x7..x9 are row r+1, columns c-1..c+1. The
// horizontal neighbours are the neighbouring words, reached through REGB
// (column c-1) and REGC (column c+1); columns beyond the border read as 0.
// Per gradient row the program is 20 instructions for all 32 columns:
//   clear G (2); REGA <- lower row (1); G += REGA, G += REGA, G += REGB,
//   G += REGC (2 each, low slice then carry into the high slice);
//   REGA <- upper row (1); G -= the same four terms (2 each).
// Gy = (x3 + 2 x6 + x9) - (x1 + 2 x4 + x7) is then run on fresh images
// (21 instructions per row, results in the same segments).
// Results are compared with a reference and the cycle count is checked.
module tb_capra_sobel;
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
  logic [3:0] px [4][CAPW];   // px[row][column]

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
  task automatic go(instr_t i);
    instr = i; instr_valid = 1'b1; @(negedge clk);
  endtask
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask
  function automatic instr_t alu(logic [3:0] s, logic m, bsel_e b, dst_e d, int j, cin_e c);
    instr_t i = mk(OP_ALUOP);
    i.alu_s = s; i.alu_m = m; i.bsel = b; i.dst = d; i.seg = SEG_W'(j); i.cin = c;
    return i;
  endfunction

  // G (segments g+1:g) += operand b, or -= operand b
  task automatic acc(int g, bsel_e b, logic sub);
    if (!sub) begin
      go(alu(4'b1001, 1'b0, b, DST_BUF, g, CIN_ZERO));       // lo = lo + b
      go(alu(4'b0000, 1'b0, b, DST_BUF, g + 1, CIN_CARRY));  // hi = hi + carry
    end else begin
      go(alu(4'b0110, 1'b0, b, DST_BUF, g, CIN_ONE));        // lo = lo - b
      go(alu(4'b1111, 1'b0, b, DST_BUF, g + 1, CIN_CARRY));  // hi = hi - 1 + carry
    end
  endtask

  task automatic gradient_row(int r, int g);
    go(alu(4'b0011, 1'b1, B_REGA, DST_BUF, g, CIN_ZERO));       // G = 0
    go(alu(4'b0011, 1'b1, B_REGA, DST_BUF, g + 1, CIN_ZERO));
    go(alu(4'b1111, 1'b1, B_REGA, DST_REGA, r + 1, CIN_ZERO));  // REGA <- row r+1
    acc(g, B_REGA, 0); acc(g, B_REGA, 0); acc(g, B_REGB, 0); acc(g, B_REGC, 0);
    go(alu(4'b1111, 1'b1, B_REGA, DST_REGA, r - 1, CIN_ZERO));  // REGA <- row r-1
    acc(g, B_REGA, 1); acc(g, B_REGA, 1); acc(g, B_REGB, 1); acc(g, B_REGC, 1);
  endtask

  // Gy = (x3 + 2 x6 + x9) - (x1 + 2 x4 + x7): column c+1 (REGC) minus
  // column c-1 (REGB), rows r-1, r (twice) and r+1: 21 instructions.
  task automatic gy_row(int r, int g);
    go(alu(4'b0011, 1'b1, B_REGA, DST_BUF, g, CIN_ZERO));
    go(alu(4'b0011, 1'b1, B_REGA, DST_BUF, g + 1, CIN_ZERO));
    for (int d = -1; d <= 1; d++) begin
      go(alu(4'b1111, 1'b1, B_REGA, DST_REGA, r + d, CIN_ZERO));
      for (int n = 0; n < ((d == 0) ? 2 : 1); n++) begin
        acc(g, B_REGC, 0);
        acc(g, B_REGB, 1);
      end
    end
  endtask

  function automatic int pix(int r, int c);
    return (c < 0 || c >= CAPW) ? 0 : int'(px[r][c]);
  endfunction

  initial begin
    int t0;
    instr_valid = 0; instr = '0; adc_res = 3'd4;
    for (int w = 0; w < CAPW; w++) for (int k = 0; k < NSENS; k++) light[w][k] = '0;
    repeat (3) @(negedge clk); rst_n = 1'b1;

    for (int rep = 0; rep < 4; rep++) begin
      @(negedge clk);
      for (int c = 0; c < CAPW; c++) begin
        instr_t i = mk(OP_WRITE);
        for (int r = 0; r < 4; r++) px[r][c] = (rep == 3) ? 4'hF : 4'($urandom);
        if (rep == 2) for (int r = 0; r < 4; r++) px[r][c] = (c % 3 == 0) ? 4'hF : 4'h0;
        i.addr = addr_t'(CAP0 + c);
        i.data = {$urandom, px[3][c], px[2][c], px[1][c], px[0][c]};  // upper half garbage
        go(i);
      end
      t0 = $time;
      gradient_row(1, 4);
      gradient_row(2, 6);
      instr_valid = 0; instr = '0;
      check("sobel program cycles", 64'(($time - t0) / 10), 64'(40));
      for (int c = 0; c < CAPW; c++) begin
        instr_t i = mk(OP_READ);
        i.addr = addr_t'(CAP0 + c);
        @(negedge clk); instr = i; instr_valid = 1'b1;
        @(negedge clk); instr_valid = 1'b0;
        for (int k = 0; k < 2; k++) begin
          int r, gx;
          r  = 1 + k;
          gx = (pix(r+1, c-1) + 2 * pix(r+1, c) + pix(r+1, c+1))
                 - (pix(r-1, c-1) + 2 * pix(r-1, c) + pix(r-1, c+1));
          check($sformatf("Gx row %0d col %0d", r, c), 64'(rdata[16 + 8*k +: 8]), 64'(unsigned'(8'(gx))));
        end
        check($sformatf("pixels col %0d", c), 64'(rdata[15:0]),
              64'({px[3][c], px[2][c], px[1][c], px[0][c]}));
      end
    end
    // ---- Gy on a fresh image, written into the same result segments
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk);
      for (int c = 0; c < CAPW; c++) begin
        instr_t i = mk(OP_WRITE);
        for (int r = 0; r < 4; r++) px[r][c] = 4'($urandom);
        i.addr = addr_t'(CAP0 + c);
        i.data = {$urandom, px[3][c], px[2][c], px[1][c], px[0][c]};
        go(i);
      end
      t0 = $time;
      gy_row(1, 4);
      gy_row(2, 6);
      instr_valid = 0; instr = '0;
      check("sobel Gy program cycles", 64'(($time - t0) / 10), 64'(42));
      for (int c = 0; c < CAPW; c++) begin
        instr_t i = mk(OP_READ);
        i.addr = addr_t'(CAP0 + c);
        @(negedge clk); instr = i; instr_valid = 1'b1;
        @(negedge clk); instr_valid = 1'b0;
        for (int k = 0; k < 2; k++) begin
          int r, gy;
          r  = 1 + k;
          gy = (pix(r-1, c+1) + 2 * pix(r, c+1) + pix(r+1, c+1))
             - (pix(r-1, c-1) + 2 * pix(r, c-1) + pix(r+1, c-1));
          check($sformatf("Gy row %0d col %0d", r, c), 64'(rdata[16 + 8*k +: 8]), 64'(unsigned'(8'(gy))));
        end
      end
    end
    // ---- Gy on a fresh image, written into the same result segments
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk);
      for (int c = 0; c < CAPW; c++) begin
        instr_t i = mk(OP_WRITE);
        for (int r = 0; r < 4; r++) px[r][c] = 4'($urandom);
        i.addr = addr_t'(CAP0 + c);
        i.data = {$urandom, px[3][c], px[2][c], px[1][c], px[0][c]};
        go(i);
      end
      t0 = $time;
      gy_row(1, 4);
      gy_row(2, 6);
      instr_valid = 0; instr = '0;
      check("sobel Gy program cycles", 64'(($time - t0) / 10), 64'(42));
      for (int c = 0; c < CAPW; c++) begin
        instr_t i = mk(OP_READ);
        i.addr = addr_t'(CAP0 + c);
        @(negedge clk); instr = i; instr_valid = 1'b1;
        @(negedge clk); instr_valid = 1'b0;
        for (int k = 0; k < 2; k++) begin
          int r, gy;
          r  = 1 + k;
          gy = (pix(r-1, c+1) + 2 * pix(r, c+1) + pix(r+1, c+1))
             - (pix(r-1, c-1) + 2 * pix(r, c-1) + pix(r+1, c-1));
          check($sformatf("Gy row %0d col %0d", r, c), 64'(rdata[16 + 8*k +: 8]), 64'(unsigned'(8'(gy))));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
