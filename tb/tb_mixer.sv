// tb_mixer: self-checking testbench for the two-multiplier mixer.
//
// Applies random and extreme samples and sine/cosine values and checks
// i_o = floor(x*cos / 2^15) and q_o = floor(-x*sin / 2^15), computed in
// 64-bit integers, one cycle after in_valid; also checks the valid timing.
module tb_mixer;
  import ddc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic signed [ADC_W-1:0] x;
  logic signed [NCO_W-1:0] cos_i, sin_i;
  logic signed [MIX_W-1:0] i_o, q_o;
  logic out_valid;
  int checks = 0, failures = 0;

  mixer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  function automatic longint floordiv(longint v, longint d);
    longint q;
    q = v / d;
    if ((v % d) != 0 && ((v < 0) != (d < 0))) q--;
    return q;
  endfunction

  longint ei, eq;
  bit v;

  initial begin
    in_valid = 0; x = '0; cos_i = '0; sin_i = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      v = ($urandom_range(0, 4) != 0);
      in_valid = v;
      if (n < 4) begin
        x = (n[0]) ? -14'sd8192 : 14'sd8191;
        cos_i = (n[1]) ? -16'sd32767 : 16'sd32767;
        sin_i = -cos_i;
      end else begin
        x = ADC_W'($urandom);
        cos_i = NCO_W'($urandom);
        sin_i = NCO_W'($urandom);
      end
      ei = floordiv(longint'(x) * longint'(cos_i), 32768);
      eq = floordiv(-(longint'(x) * longint'(sin_i)), 32768);
      @(posedge clk);
      #1;
      check(out_valid == v, "out_valid timing");
      if (v) begin
        check(longint'(i_o) == ei, $sformatf("I: x=%0d cos=%0d got %0d exp %0d", x, cos_i, i_o, ei));
        check(longint'(q_o) == eq, $sformatf("Q: x=%0d sin=%0d got %0d exp %0d", x, sin_i, q_o, eq));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
