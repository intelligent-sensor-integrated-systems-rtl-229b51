// tb_ram_segment: writes random words, reads them back against a reference
// array, and checks a multi-word (masked) write and the wired-OR read.
module tb_ram_segment;
  localparam int unsigned NW = 64, W = 32;
  logic clk = 1'b0;
  logic [NW-1:0] wl;
  logic we;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [NW];
  int checks = 0, failures = 0;

  ram_segment #(.NWORDS(NW), .WIDTH(W)) dut (.clk, .wl, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write1(int a, logic [W-1:0] d);
    @(negedge clk); wl = NW'(1) << a; we = 1'b1; wdata = d;
    @(negedge clk); we = 1'b0; wl = '0;
  endtask

  initial begin
    wl = '0; we = 1'b0; wdata = '0;
    for (int a = 0; a < NW; a++) begin
      model[a] = $urandom; write1(a, model[a]);
    end
    for (int a = 0; a < NW; a++) begin
      @(negedge clk); wl = NW'(1) << a; #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("word %0d: %h vs %h", a, rdata, model[a]); end
    end
    // masked write: every even word gets the same pattern
    @(negedge clk);
    for (int a = 0; a < NW; a++) wl[a] = (a % 2 == 0);
    we = 1'b1; wdata = 32'h5A5A_0F0F;
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < NW; a += 2) model[a] = 32'h5A5A_0F0F;
    for (int a = 0; a < NW; a++) begin
      wl = NW'(1) << a; #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("after mwrite word %0d: %h vs %h", a, rdata, model[a]); end
    end
    // wired-OR read of two words
    wl = '0; wl[1] = 1'b1; wl[3] = 1'b1; #1;
    checks++;
    if (rdata !== (model[1] | model[3])) begin failures++; $display("OR read wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
