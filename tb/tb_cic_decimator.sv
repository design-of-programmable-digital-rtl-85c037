// tb_cic_decimator: self-checking testbench for the CIC decimator.
//
// Runs every decimation factor 1..9 (and the clamped settings 0 and 15) on
// random full-scale input with random gaps in in_valid. Each output is
// compared with the reference model (second difference of a double running
// sum, in 64-bit arithmetic without wrap-around). While the factor is steady the output is
// also checked against the direct non-recursive form, a triangular window
// of 2*dec-1 taps. The testbench checks that exactly one output appears per
// dec accepted inputs, one cycle after the input that completes the group.
module tb_cic_decimator;
  import ddc_pkg::*;
  import ddc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [DEC_W-1:0] dec;
  logic in_valid;
  logic signed [MIX_W-1:0] in_data;
  logic out_valid;
  logic signed [CIC_OUT_W-1:0] out_data;
  int checks = 0, failures = 0;

  cic_decimator dut (.*);

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

  cic_model ref_m = new();
  longint hist [$];      // accepted inputs, newest first
  longint y, w;
  bit took, v;
  int d, steady, outputs;
  int settings [11] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 0, 15};

  initial begin
    in_valid = 0; in_data = '0; dec = 4'd1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (settings[s]) begin
      dec = DEC_W'(settings[s]);
      d = (settings[s] < 1) ? 1 : (settings[s] > 9 ? 9 : settings[s]);
      steady = 0;
      outputs = 0;
      for (int n = 0; n < 2000; n++) begin
        @(negedge clk);
        v = ($urandom_range(0, 3) != 0);
        in_valid = v;
        in_data = (n % 97 < 20) ? ((n % 2 == 0) ? 16'sh7FFF : -16'sh8000) : MIX_W'($urandom);
        took = 0;
        if (v) begin
          took = ref_m.push(longint'(in_data), settings[s], y);
          hist.push_front(longint'(in_data));
          while (hist.size() > 40) void'(hist.pop_back());
        end
        @(posedge clk);
        #1;
        check(out_valid == took, "out_valid one cycle after the group's last input");
        if (took) begin
          outputs++;
          check(longint'(out_data) == sext(y, CIC_OUT_W),
                $sformatf("dec=%0d output %0d exp %0d", d, out_data, y));
          steady++;
          if (steady > 2) begin
            // Direct form: y = sum_k c_k x[t-2-k], c = triangle of 2d-1 taps.
            w = 0;
            for (int k = 0; k < 2 * d - 1; k++)
              w += longint'((k < d) ? (k + 1) : (2 * d - 1 - k)) * hist[k + 2];
            check(longint'(out_data) == w, $sformatf("dec=%0d direct form %0d vs %0d", d, out_data, w));
          end
        end
      end
      @(negedge clk);
      in_valid = 0;
      check(outputs >= 1400 / d && outputs <= 1600 / d + 1,
            $sformatf("dec=%0d output count %0d", d, outputs));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
