// tb_capra_bitcell: drives random control operations into one extended bit
// cell and compares SF, IF, AF and the transfer-to-ALU signal with a
// reference model of the cell description, cycle by cycle. Every one of
// the 16 BOOL functions, SCAN, REC, both TRANSFER directions, COND/UNCOND
// and SET FLAG with COND'/UNCOND are exercised.
module tb_capra_bitcell;
  import capra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  cell_ctrl_t ctrl;
  logic wl, we, rw, sens, seg_sel, alu_bit;
  logic sf, if_q, af, xfer_ok;
  logic msf, mif, maf;
  int checks = 0, failures = 0;
  int n_cond_blocked = 0, n_af_cond_blocked = 0;

  capra_bitcell dut (.clk, .rst_n, .ctrl, .wl, .we, .rw, .sens, .seg_sel, .alu_bit,
                     .sf, .if_q, .af, .xfer_ok);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0; wl = 0; we = 0; rw = 0; sens = 0; seg_sel = 0; alu_bit = 0;
    msf = 0; mif = 0; maf = 0;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int kind;
      logic exp_xok;
      @(negedge clk);
      ctrl = '0; wl = $urandom; we = 0;
      rw = $urandom; sens = $urandom; seg_sel = $urandom; alu_bit = $urandom;
      ctrl.bool_fn = 4'($urandom);
      ctrl.cond = $urandom; ctrl.af_cond = $urandom;
      kind = $urandom % 7;
      case (kind)
        0: we = 1'b1;
        1: ctrl.ld_bool = 1'b1;
        2: ctrl.ld_scan = 1'b1;
        3: ctrl.ld_rec = 1'b1;
        4: begin ctrl.xfer = 1'b1; ctrl.global_ = 1'b0; end
        5: begin ctrl.xfer = 1'b1; ctrl.global_ = 1'b1; end
        default: ctrl.set_af = 1'b1;
      endcase
      #1;
      exp_xok = (kind == 5) && seg_sel && (!ctrl.cond || maf);
      checks++;
      if (xfer_ok !== exp_xok) begin failures++; $display("t=%0d xfer_ok %b vs %b", t, xfer_ok, exp_xok); end
      // reference update
      case (kind)
        0: if (wl) msf = rw;
        1: mif = ctrl.bool_fn[{msf, rw}];
        2: mif = sens;
        3: if (seg_sel) mif = alu_bit;
        4: if (!ctrl.cond || maf) msf = mif; else n_cond_blocked++;
        5: ;
        default: if (!ctrl.af_cond) maf = mif;
                 else if (!maf) maf = mif;
                 else n_af_cond_blocked++;
      endcase
      @(posedge clk); #1;
      checks++;
      if ({sf, if_q, af} !== {msf, mif, maf}) begin
        failures++;
        $display("t=%0d kind=%0d: sf/if/af %b%b%b vs %b%b%b", t, kind, sf, if_q, af, msf, mif, maf);
      end
    end
    checks++;
    if (n_cond_blocked == 0 || n_af_cond_blocked == 0) begin
      failures++; $display("conditional cases not reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
