// tb_mask_decoder: exhaustive-style random test of the masked word-line
// decoder. For random address/mask pairs, every word line is compared with
// a reference that enumerates the addresses selected by the mask. Also
// checks one-hot selection with a zero mask and no selection when disabled.
module tb_mask_decoder;
  localparam int unsigned AW = 8, NW = 32, BASE = 64;
  logic          en;
  logic [AW-1:0] addr, mask;
  logic [NW-1:0] wl, exp_wl;
  int checks = 0, failures = 0;

  mask_decoder #(.ADDR_W(AW), .NWORDS(NW), .BASE(BASE)) dut (.en, .addr, .mask, .wl);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: enumerate every address matching addr on the non-masked bits
  function automatic logic [NW-1:0] ref_sel(logic [AW-1:0] a, logic [AW-1:0] m);
    logic [NW-1:0] r = '0;
    for (int x = 0; x < (1 << AW); x++) begin
      logic ok = 1'b1;
      for (int b = 0; b < AW; b++)
        if (!m[b] && (x[b] != a[b])) ok = 1'b0;
      if (ok && x >= BASE && x < BASE + NW) r[x - BASE] = 1'b1;
    end
    return r;
  endfunction

  initial begin
    en = 1'b1;
    // single-word decoding
    for (int x = 0; x < 256; x++) begin
      addr = AW'(x); mask = '0; #1;
      exp_wl = (x >= BASE && x < BASE + NW) ? (NW'(1) << (x - BASE)) : '0;
      checks++;
      if (wl !== exp_wl) begin failures++; $display("single %0d: %h vs %h", x, wl, exp_wl); end
    end
    // masked decoding
    for (int t = 0; t < 400; t++) begin
      addr = AW'($urandom); mask = AW'($urandom) & AW'($urandom);
      #1;
      exp_wl = ref_sel(addr, mask);
      checks++;
      if (wl !== exp_wl) begin failures++; $display("mask a=%h m=%h: %h vs %h", addr, mask, wl, exp_wl); end
    end
    // all 32 words at once: addr 64 = 0100_0000, mask 0001_1111
    addr = 8'd64; mask = 8'h1f; #1;
    checks++; if (wl !== '1) begin failures++; $display("broadcast failed"); end
    en = 1'b0; #1;
    checks++; if (wl !== '0) begin failures++; $display("disabled decoder selects"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
