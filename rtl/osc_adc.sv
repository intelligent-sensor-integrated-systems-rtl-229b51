// osc_adc: behavioural model of the optical sensor circuit (OSC) shared by
// one pair of CAPRA bit cells: phototransistor, sense amplifier and cyclic
// A/D converter with programmable resolution. The real part is analog; this
// model replaces the photocurrent by a LIGHT_W-bit code (fraction of full
// scale) and the analog residue by an exact fixed-point value.
//
// Cyclic conversion: each output bit takes three clock phases, sample/hold
// of the residue, doubling, and compare-with-reference (bit = 1 and the
// reference is subtracted when the doubled residue reaches it). An m-bit
// conversion therefore takes 3m cycles, as the architecture states, and
// yields floor(light * 2^m / 2^LIGHT_W). The converter runs continuously;
// each finished result is left-aligned into a 4-bit register (unused low
// bits 0) and `done` pulses for one cycle. Running freely and the sampling
// scheme for SCAN are this design's choices: the architecture gives no start
// signal for a conversion.
//
// SCAN interface: the 4 bits are handed to the bit-cell pair two at a time.
// With scan_hi = 0 the pair receives bits [1:0] of the newest result and the
// result is frozen in a hold register; with scan_hi = 1 the pair receives
// bits [3:2] of the held result, so both halves come from one conversion.
// pair_bits is combinational; hold is updated on the clock edge of the
// scan_hi = 0 SCAN. res (1..4, other values read as 4) is sampled when a
// conversion starts.
module osc_adc
  import capra_pkg::*;
#(
  parameter int unsigned M_BITS = ADC_BITS,   // maximum resolution
  parameter int unsigned LW     = LIGHT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LW-1:0]     light,     // incident light, fraction of full scale
  input  logic [2:0]        res,       // programmed resolution m
  input  logic              scan,
  input  logic              scan_hi,
  output logic [1:0]        pair_bits, // to IF of bit cells {2k+1, 2k}
  output logic [M_BITS-1:0] dout,      // last complete conversion
  output logic              done
);
  typedef enum logic [1:0] {PH_SAMPLE, PH_DOUBLE, PH_COMPARE} phase_e;

  localparam logic [LW:0] VREF = {1'b1, {LW{1'b0}}};

  phase_e            phase;
  logic [2:0]        bitn, m_cur;
  logic [LW:0]       resid;
  logic [M_BITS-1:0] shreg, hold;
  logic [2:0]        res_eff;

  logic b;   // comparator output in the compare phase
  assign b = resid >= VREF;

  assign res_eff   = (res >= 3'd1 && res <= 3'(M_BITS)) ? res : 3'(M_BITS);
  assign pair_bits = scan_hi ? hold[3:2] : dout[1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_SAMPLE;
      bitn  <= '0;
      m_cur <= 3'(M_BITS);
      resid <= '0;
      shreg <= '0;
      dout  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_SAMPLE: begin
          if (bitn == 0) begin
            resid <= {1'b0, light};   // sample the sense amplifier output
            m_cur <= res_eff;
          end
          phase <= PH_DOUBLE;
        end
        PH_DOUBLE: begin
          resid <= resid << 1;
          phase <= PH_COMPARE;
        end
        default: begin  // PH_COMPARE
          if (b) resid <= resid - VREF;
          phase <= PH_SAMPLE;
          if (bitn + 3'd1 == m_cur) begin
            dout  <= (M_BITS'({shreg[M_BITS-2:0], b})) << (3'(M_BITS) - m_cur);
            shreg <= '0;
            bitn  <= '0;
            done  <= 1'b1;
          end else begin
            shreg <= {shreg[M_BITS-2:0], b};
            bitn  <= bitn + 3'd1;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                hold <= '0;
    else if (scan && !scan_hi) hold <= dout;
  end
endmodule
