// tb_ddc_channel: self-checking testbench for one I/Q arm (CIC, FIR 1,
// FIR 2).
//
// Feeds random mixer-width samples, with random valid gaps, through the arm
// at several CIC factors (the input is paused while the factor changes) and
// with different coefficient sets for the two half-band filters. The
// expected outputs come from chaining the reference models (CIC, then two
// half-band convolutions). It checks every output value, that one output
// appears per 4*dec inputs, and that each stage's strobe has the right count.
module tb_ddc_channel;
  import ddc_pkg::*;
  import ddc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [DEC_W-1:0] dec;
  hb_coef_t hb1_coef, hb2_coef;
  logic in_valid;
  logic signed [MIX_W-1:0] in_data;
  logic out_valid, cic_valid, hb1_valid;
  logic signed [CIC_OUT_W-1:0] out_data;
  int checks = 0, failures = 0;
  int n_in = 0, n_cic = 0, n_hb1 = 0, n_out = 0;

  ddc_channel dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  cic_model cic_r = new();
  hb_model  hb1_r = new();
  hb_model  hb2_r = new();
  longint exp_q [$];
  longint y0, y1, y2;

  always @(posedge clk) begin
    if (rst_n) begin
      if (cic_valid) n_cic++;
      if (hb1_valid) n_hb1++;
      if (out_valid) begin
        n_out++;
        check(exp_q.size() > 0, "unexpected output");
        if (exp_q.size() > 0) begin
          y0 = exp_q.pop_front();
          check(longint'(out_data) == y0, $sformatf("output %0d exp %0d", out_data, y0));
        end
      end
    end
  end

  int decs [5] = '{2, 5, 9, 1, 4};

  initial begin
    in_valid = 0; in_data = '0; dec = 4'd2;
    hb1_coef = HB_COEF_DEFAULT;
    hb2_coef = '{h0: 16'sd16384, h1: 16'sd200, h3: -16'sd1800, h5: 16'sd9800};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (decs[s]) begin
      @(negedge clk);
      in_valid = 0;
      repeat (8) @(negedge clk);
      dec = DEC_W'(decs[s]);
      for (int n = 0; n < 3000; n++) begin
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
        in_data = MIX_W'($urandom);
        if (in_valid) begin
          n_in++;
          if (cic_r.push(longint'(in_data), decs[s], y0)) begin
            y0 = sext(y0, CIC_OUT_W);
            if (hb1_r.push(y0, hb1_coef.h0, hb1_coef.h1, hb1_coef.h3, hb1_coef.h5, CIC_OUT_W, y1))
              if (hb2_r.push(y1, hb2_coef.h0, hb2_coef.h1, hb2_coef.h3, hb2_coef.h5, CIC_OUT_W, y2))
                exp_q.push_back(y2);
          end
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "all expected outputs delivered");
    check(n_hb1 == n_cic / 2 && n_out == n_hb1 / 2, "stage rates 1/2 and 1/2");
    check(n_out > 0, "outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
