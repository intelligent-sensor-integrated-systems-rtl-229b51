// tb_cam_segment: loads CAM words in RAM mode, reads them back, then runs
// associative searches with and without a search mask and compares the
// latched match vector with a reference computed in the testbench.
module tb_cam_segment;
  localparam int unsigned NW = 16, W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NW-1:0] wl, match, exp_m;
  logic we, search;
  logic [W-1:0] wdata, rdata, sar, smask;
  logic [W-1:0] model [NW];
  int checks = 0, failures = 0;

  cam_segment #(.NWORDS(NW), .WIDTH(W)) dut (.clk, .rst_n, .wl, .we, .wdata, .rdata,
                                              .search, .sar, .smask, .match);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_search(logic [W-1:0] a, logic [W-1:0] m);
    @(negedge clk); sar = a; smask = m; search = 1'b1;
    @(negedge clk); search = 1'b0;
    for (int w = 0; w < NW; w++) exp_m[w] = ((model[w] ^ a) & ~m) == '0;
    checks++;
    if (match !== exp_m) begin failures++; $display("search %h/%h: %h vs %h", a, m, match, exp_m); end
  endtask

  initial begin
    wl = '0; we = 1'b0; search = 1'b0; sar = '0; smask = '0; wdata = '0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int a = 0; a < NW; a++) begin
      // keys in the upper half-word, records with few distinct keys
      model[a] = {16'(a % 4), 16'($urandom)};
      @(negedge clk); wl = NW'(1) << a; we = 1'b1; wdata = model[a];
    end
    @(negedge clk); we = 1'b0; wl = '0;
    for (int a = 0; a < NW; a++) begin
      wl = NW'(1) << a; #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("read %0d wrong", a); end
    end
    wl = '0;
    for (int k = 0; k < 4; k++) do_search({16'(k), 16'h0}, 32'h0000_FFFF);
    do_search(model[7], '0);                // exact match of one word
    do_search(32'hFFFF_FFFF, '0);          // no match
    do_search('0, '1);                     // everything matches
    for (int t = 0; t < 20; t++) do_search(model[$urandom % NW] ^ (32'h1 << ($urandom % 32)),
                                           32'h1 << ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
