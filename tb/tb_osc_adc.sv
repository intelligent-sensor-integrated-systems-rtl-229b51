// tb_osc_adc: checks the sensor/cyclic converter model. For random light
// levels and every resolution m = 1..4 it checks the converted code
// (floor(light * 2^m / 256), left-aligned in 4 bits), that one conversion
// takes exactly 3m clock cycles, and the two-step SCAN hand-over (low bit
// pair of the newest result, then the high bit pair of the same result).
module tb_osc_adc;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] light;
  logic [2:0] res;
  logic scan, scan_hi, done;
  logic [1:0] pair_bits;
  logic [3:0] dout;
  int checks = 0, failures = 0;

  osc_adc dut (.clk, .rst_n, .light, .res, .scan, .scan_hi, .pair_bits, .dout, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_done(output int cycles);
    cycles = 0;
    do begin @(posedge clk); #1; cycles++; end while (!done);
  endtask

  initial begin
    light = 0; res = 3'd4; scan = 0; scan_hi = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int m = 1; m <= 4; m++) begin
      for (int t = 0; t < 40; t++) begin
        int cyc;
        logic [3:0] exp_code;
        light = 8'($urandom);
        if (t % 10 == 0) light = (t == 0) ? 8'h00 : 8'hFF;
        res = 3'(m);
        wait_done(cyc);          // finish the conversion in flight
        wait_done(cyc);          // one full conversion with this light and m
        exp_code = 4'((int'(light) * (1 << m)) / 256) << (4 - m);
        checks++;
        if (dout !== exp_code) begin
          failures++; $display("m=%0d light=%0d: code %h vs %h", m, light, dout, exp_code);
        end
        checks++;
        if (cyc != 3 * m) begin failures++; $display("m=%0d: %0d cycles, expected %0d", m, cyc, 3 * m); end
      end
    end
    // SCAN hand-over
    res = 3'd4; light = 8'd200;    // code 12 = 1100
    begin int c; wait_done(c); wait_done(c); end
    @(negedge clk); scan = 1'b1; scan_hi = 1'b0; #1;
    checks++; if (pair_bits !== 2'b00) begin failures++; $display("scan lo %b", pair_bits); end
    @(negedge clk); scan = 1'b0; light = 8'd60;   // next conversion gives 3 = 0011
    begin int c; wait_done(c); wait_done(c); end
    checks++; if (dout !== 4'd3) begin failures++; $display("second code %h", dout); end
    @(negedge clk); scan = 1'b1; scan_hi = 1'b1; #1;
    checks++; if (pair_bits !== 2'b11) begin failures++; $display("scan hi %b (held 1100)", pair_bits); end
    @(negedge clk); scan = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
