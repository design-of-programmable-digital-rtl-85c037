// tb_cic_fig3_configs: the CIC decimator in three larger configurations:
// one stage with factor 8, two stages with factor 32 and five stages with
// factor 32.
//
// Each configuration is an instance of cic_decimator with its STAGES,
// MAX_DEC, setting width and output width overridden (output width
// 16 + STAGES*log2(MAX_DEC): 19, 26 and 41 bits). All three receive the
// same random full-scale input. Every output is compared with the n-stage
// reference model. A second run feeds a cosine at exactly fs/8, where
// every configuration has a transfer-function null: the outputs must stay
// below 1e-3 of the full-scale gain dec^N.
module tb_cic_fig3_configs;
  import ddc_pkg::*;
  import ddc_ref_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic signed [15:0] in_data;
  logic v1, v2, v5;
  logic signed [18:0] y1;
  logic signed [25:0] y2;
  logic signed [40:0] y5;
  int checks = 0, failures = 0;

  cic_decimator #(.IW(16), .STAGES(1), .MAX_DEC(8),  .DW(4), .OW(19)) dut_n1_d8 (
    .clk, .rst_n, .dec(4'd8), .in_valid, .in_data, .out_valid(v1), .out_data(y1));
  cic_decimator #(.IW(16), .STAGES(2), .MAX_DEC(32), .DW(6), .OW(26)) dut_n2_d32 (
    .clk, .rst_n, .dec(6'd32), .in_valid, .in_data, .out_valid(v2), .out_data(y2));
  cic_decimator #(.IW(16), .STAGES(5), .MAX_DEC(32), .DW(6), .OW(41)) dut_n5_d32 (
    .clk, .rst_n, .dec(6'd32), .in_valid, .in_data, .out_valid(v5), .out_data(y5));

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

  cic_model m1, m2, m5;
  longint e1, e2, e5;
  bit t1, t2, t5;
  int outs1, outs2, outs5;
  real peak1, peak2, peak5;

  task automatic run(bit tone, int n_samples);
    rst_n = 0;
    in_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    m1 = new(1, 8); m2 = new(2, 32); m5 = new(5, 32);
    peak1 = 0; peak2 = 0; peak5 = 0;
    for (int n = 0; n < n_samples; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      if (tone) in_data = 16'(longint'($floor(30000.0 * $cos(2.0 * PI * real'(n) / 8.0) + 0.5)));
      else      in_data = 16'($urandom);
      t1 = m1.push(longint'(in_data), 8, e1);
      t2 = m2.push(longint'(in_data), 32, e2);
      t5 = m5.push(longint'(in_data), 32, e5);
      @(posedge clk);
      #1;
      check(v1 == t1 && v2 == t2 && v5 == t5, "output strobes at every dec-th input");
      if (t1) begin
        outs1++;
        check(longint'(y1) == e1, $sformatf("N=1 D=8: %0d vs %0d", y1, e1));
        if (n > 200 && (y1 > peak1 || -y1 > peak1)) peak1 = (y1 < 0) ? -real'(y1) : real'(y1);
      end
      if (t2) begin
        outs2++;
        check(longint'(y2) == e2, $sformatf("N=2 D=32: %0d vs %0d", y2, e2));
        if (n > 200 && (y2 > peak2 || -y2 > peak2)) peak2 = (y2 < 0) ? -real'(y2) : real'(y2);
      end
      if (t5) begin
        outs5++;
        check(longint'(y5) == e5, $sformatf("N=5 D=32: %0d vs %0d", y5, e5));
        if (n > 400 && (y5 > peak5 || -y5 > peak5)) peak5 = (y5 < 0) ? -real'(y5) : real'(y5);
      end
    end
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    outs1 = 0; outs2 = 0; outs5 = 0;
    run(1'b0, 8000);
    check(outs1 == 1000 && outs2 == 250 && outs5 == 250, "output counts 8000/8 and 8000/32");
    // fs/8 is a null for D = 8 and, as 4*fs/32, for D = 32
    run(1'b1, 4000);
    $display("null test peaks: N=1 D=8 %0.0f, N=2 D=32 %0.0f, N=5 D=32 %0.0f", peak1, peak2, peak5);
    check(peak1 < 1e-3 * 32768.0 * 8.0, "N=1 D=8 null at fs/8");
    check(peak2 < 1e-3 * 32768.0 * 32.0 ** 2, "N=2 D=32 null at fs/8");
    check(peak5 < 1e-3 * 32768.0 * 32.0 ** 5, "N=5 D=32 null at fs/8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
