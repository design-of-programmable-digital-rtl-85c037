// halfband_decimator: 11-tap half-band FIR filter that decimates by two, in
// polyphase form.
//
// Input samples are taken in pairs. The first sample of each pair enters
// the folded branch: a five-register delay line whose taps are added in
// symmetric pairs, (b0+b5), (b1+b4), (b2+b3), and weighted by h1, h3 and h5.
// The second sample of each pair enters the single-tap branch, which delays
// it by three pair periods (z^-3 at the output rate) and weights it by the
// centre tap h0. One output is formed per pair, so only four multipliers
// are needed and every multiplier runs at the output rate. This structure,
// with its tap labels, follows the source design's half-band figure. Which
// sample of a pair goes to which branch, the coefficient format (Q1.15,
// supplied at run time), round-half-up and saturation back to W bits are
// this design's choices. At full rate the filter is
//   y[2m+1] = h1*(x[2m]+x[2m-10]) + h3*(x[2m-2]+x[2m-8])
//           + h5*(x[2m-4]+x[2m-6]) + h0*x[2m-5]
// i.e. a half-band response centred on a delay of six input samples.
//
// Timing: out_valid pulses one cycle after the second sample of a pair was
// accepted. Reset clears the delay lines and the pair phase.
module halfband_decimator
  import ddc_pkg::*;
#(
  parameter int unsigned W    = CIC_OUT_W,
  parameter int unsigned CW   = COEF_W,
  parameter int unsigned FRAC = COEF_FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  hb_coef_t            coef,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  localparam int unsigned AW = W + 1 + CW + 2;  // pair sum * coef, four terms

  logic signed [W-1:0]  b [6];   // folded branch: b[0] newest, b[5] oldest
  logic signed [W-1:0]  a [3];   // single-tap branch delay, a[2] = z^-3
  logic                 second;  // next sample is the second of a pair
  logic signed [AW-1:0] acc, acc_r;
  logic signed [AW-1:0] max_v, min_v;

  // b[0] is the newest first-of-pair sample; a[2] is the second-of-pair
  // sample three pairs back, as seen when the current pair completes.
  always_comb begin
    acc = AW'(coef.h1) * (AW'(b[0]) + AW'(b[5]))
        + AW'(coef.h3) * (AW'(b[1]) + AW'(b[4]))
        + AW'(coef.h5) * (AW'(b[2]) + AW'(b[3]))
        + AW'(coef.h0) * AW'(a[2]);
    acc_r = (acc + (AW'(1) <<< (FRAC - 1))) >>> FRAC;
    max_v = (AW'(1) <<< (W - 1)) - AW'(1);
    min_v = -(AW'(1) <<< (W - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 6; k++) b[k] <= '0;
      for (int k = 0; k < 3; k++) a[k] <= '0;
      second    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && second;
      if (in_valid) begin
        second <= !second;
        if (!second) begin
          b[0] <= in_data;
          for (int k = 1; k < 6; k++) b[k] <= b[k-1];
        end else begin
          a[0] <= in_data;
          a[1] <= a[0];
          a[2] <= a[1];
          if (acc_r > max_v)      out_data <= max_v[W-1:0];
          else if (acc_r < min_v) out_data <= min_v[W-1:0];
          else                    out_data <= acc_r[W-1:0];
        end
      end
    end
  end

endmodule
