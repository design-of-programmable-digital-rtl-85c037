// tb_ddc_decimation_sweep: the converter at every CIC factor of the
// WiMAX range (1..9), default parameters.
//
// For each factor the converter is reset, tuned to fs/8 and fed a clean
// tone at that frequency with a valid sample on every cycle. The testbench
// checks that outputs come exactly every 4*dec cycles (CIC, then two
// decimate-by-2 half-band stages) and that the mean baseband output is the
// tone at DC with the expected gain: I = A/2 * dec^2, Q = 0, within 3 %.
// A last run offsets the tone by fs/256 above the NCO frequency (dec = 2):
// the output must then be a complex tone rotating counter-clockwise by
// 2*pi/32 per output (8 input samples per output), which confirms the
// direction of the frequency translation.
module tb_ddc_decimation_sweep;
  import ddc_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  W  = CIC_OUT_W;

  logic clk = 0, rst_n = 0;
  ddc_cfg_t cfg;
  logic adc_valid;
  logic signed [ADC_W-1:0] adc_data;
  logic out_valid, nco_wrap, cic_valid, hb1_valid;
  logic signed [W-1:0] i_out, q_out;
  int checks = 0, failures = 0;

  ddc_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  longint cycle = 0, last_out = -1;
  int  n_out, bad_period, expect_period;
  real sum_i, sum_q;
  int  n_sum;
  bit  measuring;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      n_out++;
      if (last_out >= 0 && cycle - last_out != expect_period) bad_period++;
      last_out = cycle;
      if (measuring) begin
        sum_i += real'(i_out);
        sum_q += real'(q_out);
        n_sum++;
      end
    end
  end

  real amp, gain;
  real prev_ang, step_sum;
  int  n_step;
  real ang, dang;

  always @(posedge clk) begin
    if (rst_n && out_valid && measuring && n_step >= 0) begin
      ang = $atan2(real'(q_out), real'(i_out));
      if (n_step > 0 || prev_ang > -10.0) begin
        dang = ang - prev_ang;
        if (dang > PI)   dang -= 2.0 * PI;
        if (dang < -PI)  dang += 2.0 * PI;
        step_sum += dang;
        n_step++;
      end
      prev_ang = ang;
    end
  end

  initial begin
    amp = 4000.0;
    adc_valid = 0; adc_data = '0; measuring = 0;
    cfg = '{phase_inc: 32'h2000_0000, cic_dec: 4'd1, hb1: HB_COEF_DEFAULT, hb2: HB_COEF_DEFAULT};
    for (int d = 1; d <= 9; d++) begin
      rst_n = 0;
      adc_valid = 0;
      repeat (3) @(negedge clk);
      cfg.cic_dec = DEC_W'(d);
      expect_period = 4 * d;
      n_out = 0; bad_period = 0; last_out = -1;
      sum_i = 0; sum_q = 0; n_sum = 0; measuring = 0;
      rst_n = 1;
      for (int n = 0; n < 400 * 4 * d; n++) begin
        @(negedge clk);
        adc_valid = 1'b1;
        adc_data = ADC_W'(longint'($floor(amp * $cos(2.0 * PI * real'(n) / 8.0) + 0.5)));
        if (n == 40 * 4 * d) measuring = 1;
      end
      @(negedge clk);
      adc_valid = 0;
      measuring = 0;
      repeat (10) @(negedge clk);
      gain = amp / 2.0 * real'(d * d);
      sum_i /= real'(n_sum);
      sum_q /= real'(n_sum);
      $display("dec=%0d outputs=%0d mean I=%0.1f (expected %0.1f) mean Q=%0.1f", d, n_out, sum_i, gain, sum_q);
      check(n_out >= 398 && n_out <= 400, $sformatf("dec=%0d output count %0d", d, n_out));
      check(bad_period == 0, $sformatf("dec=%0d output spacing not %0d cycles", d, 4 * d));
      check(sum_i > 0.97 * gain && sum_i < 1.03 * gain, $sformatf("dec=%0d DC gain", d));
      check(sum_q < 0.03 * gain && sum_q > -0.03 * gain, $sformatf("dec=%0d Q of in-phase tone", d));
    end

    // Offset tone: f_NCO + fs/256.
    rst_n = 0;
    adc_valid = 0;
    repeat (3) @(negedge clk);
    cfg.cic_dec = 4'd2;
    expect_period = 8;
    n_out = 0; bad_period = 0; last_out = -1;
    measuring = 0; prev_ang = -100.0; step_sum = 0.0; n_step = 0;
    rst_n = 1;
    for (int n = 0; n < 8 * 400; n++) begin
      @(negedge clk);
      adc_valid = 1'b1;
      adc_data = ADC_W'(longint'($floor(amp * $cos(2.0 * PI * real'(n) * (1.0 / 8.0 + 1.0 / 256.0)) + 0.5)));
      if (n == 8 * 40) measuring = 1;
    end
    @(negedge clk);
    adc_valid = 0;
    measuring = 0;
    $display("offset tone: mean phase step %0.4f rad per output (expected %0.4f)",
             step_sum / real'(n_step), 2.0 * PI / 32.0);
    check(n_step > 300, "offset tone produced outputs");
    check(step_sum / real'(n_step) > 0.95 * 2.0 * PI / 32.0 &&
          step_sum / real'(n_step) < 1.05 * 2.0 * PI / 32.0, "offset tone rotates at +fs/256");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
