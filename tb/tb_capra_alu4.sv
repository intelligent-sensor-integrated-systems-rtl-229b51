// tb_capra_alu4: exhaustive test of the 4-bit ALU slice against the
// classic 16-logic/16-arithmetic function table (active-high data, cin = 1
// adds one), written out case by case in the testbench.
module tb_capra_alu4;
  import capra_pkg::*;
  slice_t a, b, f;
  logic [3:0] s;
  logic m, cin, cout, zero;
  int checks = 0, failures = 0;

  capra_alu4 dut (.a, .b, .s, .m, .cin, .f, .cout, .zero);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_logic(logic [3:0] s_, logic [3:0] a_, logic [3:0] b_);
    case (s_)
      4'd0:  return ~a_;
      4'd1:  return ~(a_ | b_);
      4'd2:  return ~a_ & b_;
      4'd3:  return 4'h0;
      4'd4:  return ~(a_ & b_);
      4'd5:  return ~b_;
      4'd6:  return a_ ^ b_;
      4'd7:  return a_ & ~b_;
      4'd8:  return ~a_ | b_;
      4'd9:  return ~(a_ ^ b_);
      4'd10: return b_;
      4'd11: return a_ & b_;
      4'd12: return 4'hF;
      4'd13: return a_ | ~b_;
      4'd14: return a_ | b_;
      default: return a_;
    endcase
  endfunction

  function automatic int ref_arith(logic [3:0] s_, logic [3:0] a_, logic [3:0] b_, logic c);
    // every 4-bit term is formed first, then added as an unsigned integer
    int A = a_, B = b_, C = c;
    int nB    = int'(4'(~b_));
    int AorB  = int'(4'(a_ | b_));
    int AornB = int'(4'(a_ | ~b_));
    int AandB = int'(4'(a_ & b_));
    int AandnB = int'(4'(a_ & ~b_));
    case (s_)
      4'd0:  return A + C;
      4'd1:  return AorB + C;
      4'd2:  return AornB + C;
      4'd3:  return 15 + C;                      // minus 1
      4'd4:  return A + AandnB + C;
      4'd5:  return AorB + AandnB + C;
      4'd6:  return A + nB + C;                  // A - B - 1
      4'd7:  return AandnB + 15 + C;
      4'd8:  return A + AandB + C;
      4'd9:  return A + B + C;
      4'd10: return AornB + AandB + C;
      4'd11: return AandB + 15 + C;
      4'd12: return A + A + C;
      4'd13: return AorB + A + C;
      4'd14: return AornB + A + C;
      default: return A + 15 + C;
    endcase
  endfunction

  initial begin
    for (int si = 0; si < 16; si++)
      for (int mi = 0; mi < 2; mi++)
        for (int ci = 0; ci < 2; ci++)
          for (int ai = 0; ai < 16; ai++)
            for (int bi = 0; bi < 16; bi++) begin
              logic [3:0] ef; logic ec; int r;
              s = 4'(si); m = mi[0]; cin = ci[0]; a = 4'(ai); b = 4'(bi);
              #1;
              if (m) begin ef = ref_logic(s, a, b); ec = 1'b0; end
              else begin r = ref_arith(s, a, b, cin); ef = 4'(r); ec = r > 15; end
              checks++;
              if (f !== ef || cout !== ec || zero !== (ef == 0)) begin
                failures++;
                if (failures < 10)
                  $display("s=%0d m=%0d c=%0d a=%0d b=%0d: f=%0d/%0d cout=%0d/%0d",
                           s, m, cin, a, b, f, ef, cout, ec);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
