// cic_decimator: cascaded integrator-comb decimation filter with a
// programmable decimation factor.
//
// Structure (as in the source design's CIC figure): STAGES integrators run at
// the input rate, each an adder followed by a register whose output is fed
// back; the output of the last integrator register is down-sampled by dec
// (keep one sample of every dec), and STAGES comb sections y = u - u*z^-1 run
// at the output rate. The transfer function is therefore
// z^-STAGES * ((1 - z^-dec) / (1 - z^-1))^STAGES, with a DC gain of dec^STAGES.
// The filter needs no multipliers. All arithmetic is two's complement and
// wraps modulo 2^OW; OW = IW + STAGES*ceil(log2(MAX_DEC)) is wide enough for
// the full gain, so the wrap in the integrators cancels in the combs.
// The widths, the decimation range and the handshake are this design's own
// choices.
//
// Interface: in_valid/in_data carry one sample per valid cycle. dec is read
// on every input; 0 acts as 1 and values above MAX_DEC act as MAX_DEC. The
// input counter restarts when it reaches dec, so a new factor takes effect
// at once; the first STAGES outputs after a change mix the old and new rate.
// out_valid pulses for one cycle, one cycle after the input that completes
// a group of dec samples.
module cic_decimator
  import ddc_pkg::*;
#(
  parameter int unsigned IW      = MIX_W,
  parameter int unsigned STAGES  = CIC_STAGES,
  parameter int unsigned MAX_DEC = CIC_MAX_DEC,
  parameter int unsigned DW      = DEC_W,
  parameter int unsigned OW      = IW + STAGES * $clog2(MAX_DEC)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DW-1:0]        dec,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data
);

  logic signed [OW-1:0] integ [STAGES];   // integrator registers
  logic signed [OW-1:0] comb_d [STAGES];  // comb delay registers
  logic signed [OW-1:0] comb_y [STAGES];  // comb section outputs
  logic [DW-1:0]        cnt;
  logic [DW-1:0]        dec_eff;
  logic                 take;

  always_comb begin
    if (dec == '0)                       dec_eff = DW'(1);
    else if (32'(dec) > MAX_DEC)         dec_eff = DW'(MAX_DEC);
    else                                 dec_eff = dec;
  end

  assign take = in_valid && (cnt >= dec_eff - DW'(1));

  always_comb begin
    for (int s = 0; s < STAGES; s++) begin
      if (s == 0) comb_y[s] = integ[STAGES-1] - comb_d[s];
      else        comb_y[s] = comb_y[s-1]     - comb_d[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES; s++) begin
        integ[s]  <= '0;
        comb_d[s] <= '0;
      end
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= take;
      if (in_valid) begin
        integ[0] <= integ[0] + OW'(in_data);
        for (int s = 1; s < STAGES; s++) integ[s] <= integ[s] + integ[s-1];
        cnt <= take ? '0 : cnt + DW'(1);
      end
      if (take) begin
        comb_d[0] <= integ[STAGES-1];
        for (int s = 1; s < STAGES; s++) comb_d[s] <= comb_y[s-1];
        out_data <= comb_y[STAGES-1];
      end
    end
  end

endmodule
