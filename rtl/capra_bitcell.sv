// capra_bitcell: one extended bit cell of the CAPRA segment.
//
// Three flip-flops: the storage flip-flop SF (the RAM bit), the intermediate
// flip-flop IF and the activity flag AF. The BOOL block combines SF with the
// bit on the cell's read/write line by any of the 16 two-input Boolean
// functions; bool_fn is its truth table, indexed by {SF, rw}. IF is loaded
// from BOOL (BOOLOP, ASSOCOMP), from the optical sensor (SCAN) or from the
// word's ALU (REC, only in the selected 4-bit segment). From IF a TRANSFER
// moves the bit either into SF (GLOBAL/LOCAL = 0) or towards the ALU
// (GLOBAL/LOCAL = 1; the word cell takes xfer_ok and if_q), unconditionally
// or only where AF = 1 (COND). SET FLAG copies IF into AF, unconditionally
// or, with COND', only while AF is still 0.
// All of this follows the bit-cell description; encoding bool_fn as a
// truth table and resetting the flip-flops to 0 are this design's choices.
// Timing: every load takes effect on the rising clock edge; one control
// operation per cycle. RAM writes (wl & we) store rw in SF.
module capra_bitcell
  import capra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cell_ctrl_t ctrl,
  input  logic       wl,        // word line
  input  logic       we,        // RAM write
  input  logic       rw,        // read/write line (MDR or operand bit)
  input  logic       sens,      // digitized sensor bit
  input  logic       seg_sel,   // cell belongs to the selected ALU segment j
  input  logic       alu_bit,   // bit from the word's ALU (REC)
  output logic       sf,
  output logic       if_q,
  output logic       af,
  output logic       xfer_ok    // TRANSFER to ALU allowed for this cell
);
  logic bool_out, cond_ok;

  assign bool_out = ctrl.bool_fn[{sf, rw}];
  assign cond_ok  = !ctrl.cond || af;
  assign xfer_ok  = ctrl.xfer && ctrl.global_ && seg_sel && cond_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sf   <= 1'b0;
      if_q <= 1'b0;
      af   <= 1'b0;
    end else begin
      if (wl && we)                        sf <= rw;
      else if (ctrl.xfer && !ctrl.global_ && cond_ok) sf <= if_q;

      if (ctrl.ld_bool)                    if_q <= bool_out;
      else if (ctrl.ld_scan)               if_q <= sens;
      else if (ctrl.ld_rec && seg_sel)     if_q <= alu_bit;

      if (ctrl.set_af && (!ctrl.af_cond || !af)) af <= if_q;
    end
  end
endmodule
