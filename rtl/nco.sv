// nco: numerically controlled oscillator with sine and cosine outputs.
//
// A PHASE_W-bit phase accumulator advances by the programmable tuning word
// phase_inc on every cycle where en is high; full scale of the register is
// one full turn, and the addition simply wraps, so the residue above full
// scale carries into the next turn as a phase offset. The top LUT_AW bits of
// the phase address a full-period sine table; the cosine reads the same
// table a quarter turn ahead. This follows the source design (accumulator,
// sine/cosine lookup, natural overflow). The table is computed at
// elaboration time as round(sin(2*pi*k/2^LUT_AW) * (2^(NCO_W-1)-1)); the
// widths, the single shared table and the output registers are this
// design's choices.
//
// Timing: when en is high, sin_o/cos_o of the current phase appear on the
// next cycle together with out_valid, and the phase moves on by phase_inc.
// wrap pulses on that same next cycle when the addition overflowed.
// Reset clears the phase to zero.
module nco
  import ddc_pkg::*;
#(
  parameter int unsigned PW = PHASE_W,
  parameter int unsigned AW = LUT_AW,
  parameter int unsigned OW = NCO_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [PW-1:0]        phase_inc,
  output logic signed [OW-1:0] sin_o,
  output logic signed [OW-1:0] cos_o,
  output logic                 out_valid,
  output logic                 wrap
);

  typedef logic signed [OW-1:0] table_t [2**AW];

  function automatic table_t gen_sine();
    table_t t;
    for (int k = 0; k < 2**AW; k++) begin
      t[k] = OW'($rtoi($floor($sin(2.0 * 3.14159265358979323846 * k / (2.0 ** AW))
                                * (2.0 ** (OW - 1) - 1.0) + 0.5)));
    end
    return t;
  endfunction

  localparam table_t SINE = gen_sine();

  logic [PW-1:0] phase;
  logic [PW:0]   phase_sum;
  logic [AW-1:0] addr_sin, addr_cos;

  assign phase_sum = {1'b0, phase} + {1'b0, phase_inc};
  assign addr_sin  = phase[PW-1 -: AW];
  assign addr_cos  = addr_sin + AW'(2**(AW-2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      sin_o     <= '0;
      cos_o     <= '0;
      out_valid <= 1'b0;
      wrap      <= 1'b0;
    end else begin
      out_valid <= en;
      wrap      <= en && phase_sum[PW];
      if (en) begin
        phase <= phase_sum[PW-1:0];
        sin_o <= SINE[addr_sin];
        cos_o <= SINE[addr_cos];
      end
    end
  end

endmodule
