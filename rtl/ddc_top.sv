// ddc_top: programmable digital down converter for an IEEE 802.16d/e
// (WiMAX) receiver.
//
// Real IF samples from an A/D converter are translated to complex baseband
// and filtered down to the channel rate:
//   NCO  - phase accumulator plus sine/cosine table, tuned by cfg.phase_inc
//   mixer - two multipliers, I = x*cos, Q = -x*sin
//   I and Q arms - each a CIC decimator (factor cfg.cic_dec) followed by
//   two half-band decimators (coefficients cfg.hb1, cfg.hb2)
// The overall decimation is 4*cfg.cic_dec. The block chain follows the
// source design's block diagram; word lengths, the valid-strobe handshake
// and the register alignment are this design's choices.
//
// Interface: one ADC sample is accepted on every cycle with adc_valid high
// (normally every cycle, the sample clock). cfg may be changed at any time;
// the NCO picks up a new tuning word on the next sample, and a new CIC
// factor restarts its input count at once. i_out/q_out are valid for one
// cycle with out_valid. Debug strobes expose the NCO phase wrap and the
// intermediate stage rates. Latency: out_valid rises 4 clock edges after
// the edge that accepts the ADC sample completing an output group (mixer,
// CIC, FIR 1 and FIR 2 registers; the NCO read and the ADC register line up
// in the same cycle).
module ddc_top
  import ddc_pkg::*;
#(
  parameter int unsigned OW = CIC_OUT_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ddc_cfg_t              cfg,
  input  logic                  adc_valid,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic                  out_valid,
  output logic signed [OW-1:0]  i_out,
  output logic signed [OW-1:0]  q_out,
  output logic                  nco_wrap,   // NCO phase accumulator overflowed
  output logic                  cic_valid,  // CIC output strobe
  output logic                  hb1_valid   // first half-band output strobe
);

  logic signed [NCO_W-1:0] nco_sin, nco_cos;
  logic                    nco_valid;
  logic signed [ADC_W-1:0] adc_d;
  logic signed [MIX_W-1:0] mix_i, mix_q;
  logic                    mix_valid;
  logic                    q_valid, q_cic_valid, q_hb1_valid;

  nco u_nco (
    .clk, .rst_n,
    .en(adc_valid), .phase_inc(cfg.phase_inc),
    .sin_o(nco_sin), .cos_o(nco_cos),
    .out_valid(nco_valid), .wrap(nco_wrap)
  );

  // Align the ADC sample with the registered NCO output.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         adc_d <= '0;
    else if (adc_valid) adc_d <= adc_data;
  end

  mixer u_mixer (
    .clk, .rst_n,
    .in_valid(nco_valid), .x(adc_d), .cos_i(nco_cos), .sin_i(nco_sin),
    .i_o(mix_i), .q_o(mix_q), .out_valid(mix_valid)
  );

  ddc_channel #(.OW(OW)) u_arm_i (
    .clk, .rst_n, .dec(cfg.cic_dec), .hb1_coef(cfg.hb1), .hb2_coef(cfg.hb2),
    .in_valid(mix_valid), .in_data(mix_i),
    .out_valid, .out_data(i_out),
    .cic_valid, .hb1_valid
  );

  ddc_channel #(.OW(OW)) u_arm_q (
    .clk, .rst_n, .dec(cfg.cic_dec), .hb1_coef(cfg.hb1), .hb2_coef(cfg.hb2),
    .in_valid(mix_valid), .in_data(mix_q),
    .out_valid(q_valid), .out_data(q_out),
    .cic_valid(q_cic_valid), .hb1_valid(q_hb1_valid)
  );

  // Both arms see the same strobes, so they stay in lock step.
  a_arms_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (q_valid == out_valid) && (q_cic_valid == cic_valid) && (q_hb1_valid == hb1_valid));

endmodule
