// capra_alu4: 4-bit ALU slice of a CAPRA word cell.
//
// A compact slice of the classic TTL type: four select lines S3..S0 choose
// one of 16 functions and the mode line M picks logic (M = 1) or arithmetic
// (M = 0), giving 16 logic and 16 arithmetic operations. Internally two
// per-bit terms are formed,
//     P = A | (S0 & B) | (S1 & ~B)      G = (S3 & A & B) | (S2 & A & ~B),
// arithmetic mode outputs F = P + G + cin (so S = 1001 is A + B, S = 0110
// is A - B - 1 + cin, S = 1100 is A + A, the left shift used for doubling)
// and logic mode outputs F = ~(P ^ G) (S = 0110 is A ^ B, 1011 is A & B,
// 1110 is A | B, 1010 is B, 1111 is A). Data are active high and cin = 1
// adds one. The number of functions and control lines follow the
// architecture; the slice equations are this design's rendering of the
// classic function table. Purely combinational.
module capra_alu4
  import capra_pkg::*;
(
  input  slice_t     a,
  input  slice_t     b,
  input  logic [3:0] s,
  input  logic       m,      // 1 = logic, 0 = arithmetic
  input  logic       cin,
  output slice_t     f,
  output logic       cout,   // carry out (arithmetic mode, else 0)
  output logic       zero    // F == 0
);
  slice_t p, g;
  logic [SLICE_W:0] sum;

  always_comb begin
    p   = a | ({SLICE_W{s[0]}} & b) | ({SLICE_W{s[1]}} & ~b);
    g   = ({SLICE_W{s[3]}} & a & b) | ({SLICE_W{s[2]}} & a & ~b);
    sum = {1'b0, p} + {1'b0, g} + {{SLICE_W{1'b0}}, cin};
    if (m) begin
      f    = ~(p ^ g);
      cout = 1'b0;
    end else begin
      f    = sum[SLICE_W-1:0];
      cout = sum[SLICE_W];
    end
    zero = (f == '0);
  end
endmodule
