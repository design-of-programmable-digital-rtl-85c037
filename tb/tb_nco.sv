// tb_nco: self-checking testbench for the NCO.
//
// Drives several tuning words (including ones that wrap the accumulator
// every few samples) with en held high and with random gaps, keeps its own
// 64-bit phase count, and checks on every output that sin_o/cos_o equal the
// rounded sine/cosine of the expected table address, that they lie within
// one table step of the ideal sine of the full phase, that out_valid
// follows en by exactly one cycle, and that wrap marks each overflow.
module tb_nco;
  import ddc_pkg::*;
  import ddc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en;
  logic [PHASE_W-1:0] phase_inc;
  logic signed [NCO_W-1:0] sin_o, cos_o;
  logic out_valid, wrap;
  int checks = 0, failures = 0, wraps_seen = 0;

  nco dut (.*);

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

  longint unsigned ph;
  longint exp_s, exp_c, a;
  bit prev_en, exp_wrap;
  real ideal;
  logic [PHASE_W-1:0] incs [5] = '{32'h0100_0000, 32'h1234_5678, 32'hC000_0001,
                                  32'h0000_0000, 32'h7FFF_FFFF};

  initial begin
    en = 0; phase_inc = '0;
    ph = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (incs[i]) begin
      phase_inc = incs[i];
      for (int n = 0; n < 3000; n++) begin
        @(negedge clk);
        en = (i == 4) ? 1'b1 : ($urandom_range(0, 3) != 0);
        prev_en = en;
        a = longint'(ph >> (PHASE_W - LUT_AW));
        exp_s = sine_entry(a, LUT_AW, NCO_W);
        exp_c = sine_entry((a + 256) % 1024, LUT_AW, NCO_W);
        exp_wrap = en && ((ph + phase_inc) >= (64'd1 << PHASE_W));
        @(posedge clk);
        #1;
        check(out_valid == prev_en, "out_valid must follow en by one cycle");
        check(wrap == exp_wrap, "wrap flag");
        if (wrap) wraps_seen++;
        if (prev_en) begin
          check(longint'(sin_o) == exp_s, $sformatf("sin at phase %h: %0d vs %0d", ph, sin_o, exp_s));
          check(longint'(cos_o) == exp_c, $sformatf("cos at phase %h: %0d vs %0d", ph, cos_o, exp_c));
          ideal = $sin(2.0 * PI * real'(ph) / (2.0 ** PHASE_W)) * 32767.0;
          check((real'(sin_o) - ideal) < 32767.0 * 2.0 * PI / 1024.0 + 1.0 &&
                (ideal - real'(sin_o)) < 32767.0 * 2.0 * PI / 1024.0 + 1.0,
                "sin close to ideal");
          ph = (ph + phase_inc) % (64'd1 << PHASE_W);
        end
      end
    end
    check(wraps_seen > 100, "accumulator overflow must have occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
