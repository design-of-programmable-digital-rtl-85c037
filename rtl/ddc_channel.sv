// ddc_channel: one arm (I or Q) of the down converter's channel filter.
//
// A CIC decimator (programmable factor dec) is followed by two half-band
// FIR decimators, FIR 1 and FIR 2, each halving the rate again, so the arm
// decimates by 4*dec in total. This cascade follows the source design's
// block diagram; the CIC output width is carried unchanged through both
// half-band filters, which have unity DC gain (this design's choice).
//
// Interface: in_valid/in_data at the mixer rate; out_valid pulses once per
// 4*dec accepted inputs. Latency from the last input of a group: one cycle
// through the CIC and one more per half-band stage.
module ddc_channel
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
  input  hb_coef_t             hb1_coef,
  input  hb_coef_t             hb2_coef,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_data,
  output logic                 cic_valid,   // CIC output strobe (rate fs/dec)
  output logic                 hb1_valid    // FIR 1 output strobe (rate fs/(2*dec))
);

  logic signed [OW-1:0] cic_data, hb1_data;

  cic_decimator #(
    .IW(IW), .STAGES(STAGES), .MAX_DEC(MAX_DEC), .DW(DW), .OW(OW)
  ) u_cic (
    .clk, .rst_n, .dec,
    .in_valid, .in_data,
    .out_valid(cic_valid), .out_data(cic_data)
  );

  halfband_decimator #(.W(OW)) u_fir1 (
    .clk, .rst_n, .coef(hb1_coef),
    .in_valid(cic_valid), .in_data(cic_data),
    .out_valid(hb1_valid), .out_data(hb1_data)
  );

  halfband_decimator #(.W(OW)) u_fir2 (
    .clk, .rst_n, .coef(hb2_coef),
    .in_valid(hb1_valid), .in_data(hb1_data),
    .out_valid, .out_data
  );

endmodule
