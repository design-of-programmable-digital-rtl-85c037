// tb_halfband_decimator: self-checking testbench for the half-band
// decimator.
//
// Uses the default coefficient set and random Q1.15 sets, random input with
// random valid gaps, and blocks of full-scale input with a coefficient set
// whose gain exceeds one so that saturation occurs. Each output is compared
// with a direct 11-tap convolution at the full input rate; the testbench
// checks one output per two accepted inputs, one cycle after the second,
// and that at least one output saturated.
module tb_halfband_decimator;
  import ddc_pkg::*;
  import ddc_ref_pkg::*;

  localparam int W = CIC_OUT_W;

  logic clk = 0, rst_n = 0;
  hb_coef_t coef;
  logic in_valid;
  logic signed [W-1:0] in_data;
  logic out_valid;
  logic signed [W-1:0] out_data;
  int checks = 0, failures = 0, saturations = 0;

  halfband_decimator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  hb_model ref_m = new();
  longint y;
  bit took, v;

  initial begin
    in_valid = 0; in_data = '0; coef = HB_COEF_DEFAULT;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      case (phase)
        0: coef = HB_COEF_DEFAULT;
        1: coef = '{h0: 16'sd16384, h1: -16'sd300, h3: 16'sd2500, h5: 16'sd12000};
        2: coef = '{h0: 16'sh7FFF, h1: 16'sh7FFF, h3: 16'sh7FFF, h5: 16'sh7FFF};  // gain > 1
        default: coef = '{h0: 16'($urandom), h1: 16'($urandom), h3: 16'($urandom), h5: 16'($urandom)};
      endcase
      for (int n = 0; n < 3000; n++) begin
        @(negedge clk);
        v = ($urandom_range(0, 2) != 0);
        in_valid = v;
        if (phase == 2 && n % 200 < 60) in_data = (n % 200 < 30) ? {1'b0, {(W-1){1'b1}}} : {1'b1, {(W-1){1'b0}}};
        else                            in_data = W'($urandom);
        took = 0;
        if (v) took = ref_m.push(longint'(in_data), longint'(coef.h0), longint'(coef.h1),
                                 longint'(coef.h3), longint'(coef.h5), W, y);
        @(posedge clk);
        #1;
        check(out_valid == took, "out_valid one cycle after second sample of a pair");
        if (took) begin
          check(longint'(out_data) == y, $sformatf("output %0d exp %0d", out_data, y));
          if (y == (64'sd1 <<< (W - 1)) - 1 || y == -(64'sd1 <<< (W - 1))) saturations++;
        end
      end
    end
    check(saturations > 0, "saturation must have occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
