// mixer: complex digital mixer made of two multipliers.
//
// Each real input sample x is multiplied by the NCO cosine to give the I arm
// and by the negated NCO sine to give the Q arm, i.e. x * exp(-j*w*n), which
// moves a signal at the NCO frequency down to 0 Hz. Two multipliers follow
// the source design; the sign convention of Q, the scaling and the output
// register are this design's choices. The products are scaled back by
// 2^(CW-1) (the sine amplitude is Q1.(CW-1)) with an arithmetic shift, i.e.
// rounded towards minus infinity, and sign-extended to OW bits.
//
// Timing: in_valid with x, cos_i and sin_i aligned in one cycle; i_o, q_o
// and out_valid appear one cycle later.
module mixer
  import ddc_pkg::*;
#(
  parameter int unsigned XW = ADC_W,
  parameter int unsigned CW = NCO_W,
  parameter int unsigned OW = MIX_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x,
  input  logic signed [CW-1:0] cos_i,
  input  logic signed [CW-1:0] sin_i,
  output logic signed [OW-1:0] i_o,
  output logic signed [OW-1:0] q_o,
  output logic                 out_valid
);

  localparam int unsigned PW = XW + CW + 1;

  logic signed [PW-1:0] prod_i, prod_q;

  always_comb begin
    prod_i = PW'(x) * PW'(cos_i);
    prod_q = -(PW'(x) * PW'(sin_i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_o       <= '0;
      q_o       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_o <= OW'(prod_i >>> (CW - 1));
        q_o <= OW'(prod_q >>> (CW - 1));
      end
    end
  end

endmodule
