// tb_ddc_top: end-to-end testbench of the digital down converter at its
// default parameters.
//
// Phase 1 tunes the NCO to a clean ADC tone, x = round(A*cos(2*pi*f*n)),
// and checks that the mean baseband output is the tone moved to 0 Hz:
// I = A/2 * dec^2 (the CIC gain) and Q = 0, within 3 %.
// Phase 2 drives random-plus-tone samples with random valid gaps, retunes
// the NCO while running, switches the CIC factor (with the input paused) and
// changes both half-band coefficient sets; every I and Q output is compared
// with a chain of reference models (NCO sine table, mixer, CIC, two
// half-band filters). It also checks the latency, 4 clock edges from the
// edge that accepts the last ADC sample of a group to out_valid, and counts
// each mechanism: NCO accumulator wraps, retunes, CIC factor switches,
// half-band coefficient changes and intermediate strobes.
module tb_ddc_top;
  import ddc_pkg::*;
  import ddc_ref_pkg::*;

  localparam int W = CIC_OUT_W;

  logic clk = 0, rst_n = 0;
  ddc_cfg_t cfg;
  logic adc_valid;
  logic signed [ADC_W-1:0] adc_data;
  logic out_valid, nco_wrap, cic_valid, hb1_valid;
  logic signed [W-1:0] i_out, q_out;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_retune = 0, n_dec_switch = 0, n_coef_change = 0, n_cic = 0, n_hb1 = 0, n_out = 0;
  longint cycle = 0;

  ddc_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
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

  // Reference chain.
  longint unsigned ph;
  cic_model cic_i, cic_q;
  hb_model  hb1_i, hb1_q, hb2_i, hb2_q;
  typedef struct { longint i, q, due; } exp_t;
  exp_t exp_q [$];
  bit compare_on;
  real sum_i, sum_q;
  int  n_sum;

  function automatic longint floordiv(longint v, longint d);
    longint q;
    q = v / d;
    if ((v % d) != 0 && ((v < 0) != (d < 0))) q--;
    return q;
  endfunction

  task automatic model_reset();
    ph = 0;
    cic_i = new(); cic_q = new();
    hb1_i = new(); hb1_q = new(); hb2_i = new(); hb2_q = new();
    exp_q.delete();
  endtask

  // Push one accepted ADC sample (accepted at clock edge number cycle+1).
  task automatic model_push(longint x);
    longint a, s, c, mi, mq, ci, cq, h1i, h1q, h2i, h2q;
    bit ti, tq;
    a = longint'(ph >> (PHASE_W - LUT_AW));
    s = sine_entry(a, LUT_AW, NCO_W);
    c = sine_entry((a + 256) % 1024, LUT_AW, NCO_W);
    ph = (ph + cfg.phase_inc) % (64'd1 << PHASE_W);
    mi = sext(floordiv(x * c, 32768), MIX_W);
    mq = sext(floordiv(-(x * s), 32768), MIX_W);
    ti = cic_i.push(mi, int'(cfg.cic_dec), ci);
    tq = cic_q.push(mq, int'(cfg.cic_dec), cq);
    if (ti && tq) begin
      ci = sext(ci, W); cq = sext(cq, W);
      ti = hb1_i.push(ci, cfg.hb1.h0, cfg.hb1.h1, cfg.hb1.h3, cfg.hb1.h5, W, h1i);
      tq = hb1_q.push(cq, cfg.hb1.h0, cfg.hb1.h1, cfg.hb1.h3, cfg.hb1.h5, W, h1q);
      if (ti && tq) begin
        ti = hb2_i.push(h1i, cfg.hb2.h0, cfg.hb2.h1, cfg.hb2.h3, cfg.hb2.h5, W, h2i);
        tq = hb2_q.push(h1q, cfg.hb2.h0, cfg.hb2.h1, cfg.hb2.h3, cfg.hb2.h5, W, h2q);
        if (ti && tq) exp_q.push_back('{i: h2i, q: h2q, due: cycle + 1 + 4});
      end
    end
  endtask

  exp_t e;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (nco_wrap) n_wrap++;
      if (cic_valid) n_cic++;
      if (hb1_valid) n_hb1++;
      if (out_valid) begin
        n_out++;
        if (compare_on) begin
          check(exp_q.size() > 0, "unexpected output");
          if (exp_q.size() > 0) begin
            e = exp_q.pop_front();
            check(longint'(i_out) == e.i, $sformatf("I %0d exp %0d", i_out, e.i));
            check(longint'(q_out) == e.q, $sformatf("Q %0d exp %0d", q_out, e.q));
            check(cycle == e.due, $sformatf("latency: output at %0d, due %0d", cycle, e.due));
          end
        end else begin
          sum_i += real'(i_out);
          sum_q += real'(q_out);
          n_sum++;
        end
      end
    end
  end

  task automatic drive(longint x, bit v);
    @(negedge clk);
    adc_valid = v;
    adc_data = ADC_W'(x);
    if (v && compare_on) model_push(x);
  endtask

  real    amp;
  longint x;
  int     d;

  initial begin
    adc_valid = 0; adc_data = '0; compare_on = 0;
    cfg = '{phase_inc: 32'h2000_0000, cic_dec: 4'd2, hb1: HB_COEF_DEFAULT, hb2: HB_COEF_DEFAULT};
    sum_i = 0; sum_q = 0; n_sum = 0;
    model_reset();
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Phase 1: tone at the NCO frequency (fs/8) comes out at DC.
    amp = 6000.0;
    for (int n = 0; n < 4000; n++) begin
      x = longint'($floor(amp * $cos(2.0 * PI * real'(n) / 8.0) + 0.5));
      drive(x, 1'b1);
      if (n == 400) begin sum_i = 0; sum_q = 0; n_sum = 0; end
    end
    drive(0, 1'b0);
    repeat (10) @(negedge clk);
    sum_i /= real'(n_sum); sum_q /= real'(n_sum);
    $display("tone test: mean I = %0.1f, mean Q = %0.1f (expected %0.1f, 0)", sum_i, sum_q, amp / 2.0 * 4.0);
    check(n_sum > 300, "tone test produced outputs");
    check(sum_i > 0.97 * amp * 2.0 && sum_i < 1.03 * amp * 2.0, "tone lands at DC with gain dec^2/2");
    check(sum_q < 0.03 * amp * 2.0 && sum_q > -0.03 * amp * 2.0, "Q of an in-phase tone is zero");

    // Phase 2: bit-exact comparison from a fresh reset.
    rst_n = 0;
    repeat (2) @(negedge clk);
    model_reset();
    compare_on = 1;
    rst_n = 1;
    for (int seg = 0; seg < 8; seg++) begin
      // pause, then reprogram
      repeat (8) drive(0, 1'b0);
      d = 1 + (seg * 4) % 9;
      if (int'(cfg.cic_dec) != d) n_dec_switch++;
      cfg.cic_dec = DEC_W'(d);
      if (seg == 5) begin
        cfg.hb1 = '{h0: 16'sd16384, h1: 16'sd200, h3: -16'sd1800, h5: 16'sd9800};
        n_coef_change++;
      end
      for (int n = 0; n < 4000; n++) begin
        if (n == 2000) begin
          // retune while samples flow, after the edge that took the last sample
          @(posedge clk);
          #1;
          cfg.phase_inc = 32'($urandom);
          n_retune++;
        end
        x = longint'($floor(7000.0 * $cos(2.0 * PI * real'(n) * 0.1)))
          + longint'($urandom_range(0, 2000)) - 1000;
        drive(x, $urandom_range(0, 7) != 0);
      end
    end
    drive(0, 1'b0);
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, "every expected output delivered");
    $display("mechanisms: nco_wraps=%0d retunes=%0d dec_switches=%0d coef_changes=%0d cic_out=%0d hb1_out=%0d out=%0d",
             n_wrap, n_retune, n_dec_switch, n_coef_change, n_cic, n_hb1, n_out);
    check(n_wrap > 0, "NCO accumulator wrap happened");
    check(n_retune > 0, "NCO retune happened");
    check(n_dec_switch > 0, "CIC factor switch happened");
    check(n_coef_change > 0, "half-band coefficient change happened");
    check(n_cic > 0 && n_hb1 > 0 && n_out > 0, "all filter stages produced output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
