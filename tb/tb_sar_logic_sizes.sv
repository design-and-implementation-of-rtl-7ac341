// tb_sar_logic_sizes: checks that the SAR logic works at resolutions other
// than the default, here 6 and 12 bits, each closed around its own ideal
// analog front end. For each size, random inputs of (k + f) LSB with
// 0.05 <= f <= 0.95 must convert to k, with eoc in the (N+2)-th clock
// after the start edge.
module tb_sar_logic_sizes;
  import sar_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 6-bit converter
  logic s6_start, s6_comp, s6_sample, s6_hold, s6_eoc;
  logic [5:0] s6_code;
  logic [2:0] s6_cnt;
  sar_state_e s6_state;
  real s6_vin, s6_vheld;
  sar_logic #(.N(6)) u6 (
    .clk, .rst, .start(s6_start), .comp(s6_comp), .sample(s6_sample),
    .hold(s6_hold), .code(s6_code), .eoc(s6_eoc), .state(s6_state),
    .bit_count(s6_cnt)
  );
  sar_afe_model #(.N(6)) a6 (
    .vin(s6_vin), .sample(s6_sample), .code(s6_code), .comp(s6_comp),
    .vheld(s6_vheld)
  );

  // 12-bit converter
  logic s12_start, s12_comp, s12_sample, s12_hold, s12_eoc;
  logic [11:0] s12_code;
  logic [3:0]  s12_cnt;
  sar_state_e  s12_state;
  real s12_vin, s12_vheld;
  sar_logic #(.N(12)) u12 (
    .clk, .rst, .start(s12_start), .comp(s12_comp), .sample(s12_sample),
    .hold(s12_hold), .code(s12_code), .eoc(s12_eoc), .state(s12_state),
    .bit_count(s12_cnt)
  );
  sar_afe_model #(.N(12)) a12 (
    .vin(s12_vin), .sample(s12_sample), .code(s12_code), .comp(s12_comp),
    .vheld(s12_vheld)
  );

  initial begin
    int k, lat;
    real f;
    rst = 1'b1; s6_start = 1'b0; s12_start = 1'b0;
    s6_vin = 0.0; s12_vin = 0.0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    for (int t = 0; t < 200; t++) begin
      k = $urandom_range(0, 63);
      f = 0.05 + 0.9 * real'($urandom_range(0, 1000)) / 1000.0;
      s6_vin = (real'(k) + f) / 64.0;
      s6_start = 1'b1;
      @(posedge clk); #1;
      s6_start = 1'b0;
      lat = 1;
      while (!s6_eoc && lat < 40) begin @(posedge clk); #1; lat++; end
      check(lat == 6 + 2, "6-bit eoc latency");
      check(s6_code == 6'(k), $sformatf("6-bit result %0d expected %0d", s6_code, k));
      @(posedge clk); #1;
    end

    for (int t = 0; t < 200; t++) begin
      k = $urandom_range(0, 4095);
      f = 0.05 + 0.9 * real'($urandom_range(0, 1000)) / 1000.0;
      s12_vin = (real'(k) + f) / 4096.0;
      s12_start = 1'b1;
      @(posedge clk); #1;
      s12_start = 1'b0;
      lat = 1;
      while (!s12_eoc && lat < 60) begin @(posedge clk); #1; lat++; end
      check(lat == 12 + 2, "12-bit eoc latency");
      check(s12_code == 12'(k), $sformatf("12-bit result %0d expected %0d", s12_code, k));
      @(posedge clk); #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
