// tb_sar_logic: end-to-end testbench of the SAR logic at its default
// resolution (N = 10), closed around a behavioural sample-and-hold, ideal
// DAC and comparator (sar_afe_model, VREF = 1).
//
// What it checks
//   * every one of the 1024 codes: an input of (k + 0.5) LSB must convert
//     to k; inputs below 0 and above full scale convert to 0 and 1023;
//     plus random inputs, whose expected code is floor(vin * 1024);
//   * the sequence of every conversion: SAMPLE (sample high, hold low) in
//     the clock after start, then CONVERT with the MSB trial 100...0 and
//     the bit counter at N-1, and eoc high in exactly the (N+2)-th clock
//     after the start edge, for one clock; the result stays on `code` after
//     the return to IDLE;
//   * hold: the input is scrambled during CONVERT and must not change the
//     result;
//   * start held high: conversions follow back to back, one eoc every
//     N+3 clocks;
//   * a reset in the middle of CONVERT returns to IDLE with no eoc, and the
//     next conversion is correct.
// Each of these mechanisms is counted and must occur at least once.
module tb_sar_logic;
  import sar_pkg::*;

  localparam int unsigned N  = SAR_BITS;
  localparam int unsigned CW = $clog2(N);
  localparam int unsigned FS = 1 << N;

  logic clk = 1'b0;
  logic rst, start, comp;
  logic sample, hold, eoc;
  logic [N-1:0]  code;
  logic [CW-1:0] bit_count;
  sar_state_e    state;
  real           vin, vheld;

  int checks = 0, failures = 0;
  int n_idle_wait = 0, n_sample = 0, n_convert = 0, n_done = 0;
  int n_kept = 0, n_cleared = 0, n_back2back = 0, n_midreset = 0;
  int n_hold = 0, n_clip = 0;

  sar_logic dut (
    .clk, .rst, .start, .comp, .sample, .hold, .code, .eoc, .state, .bit_count
  );

  sar_afe_model #(.N(N), .VREF(1.0)) afe (
    .vin, .sample, .code, .comp, .vheld
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%s code=%0d", what, $time, state.name(), code);
    end
  endtask

  // mechanism counters, sampled at each rising edge
  always @(posedge clk) if (!rst) begin
    case (state)
      ST_IDLE:    if (!start) n_idle_wait++;
      ST_SAMPLE:  n_sample++;
      ST_CONVERT: begin
                    n_convert++;
                    if (comp) n_kept++; else n_cleared++;
                  end
      ST_DONE:    n_done++;
      default: ;
    endcase
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] ideal(input real v);
    if (v <= 0.0) return '0;
    if (v >= 1.0) return '1;
    return N'($rtoi(v * real'(FS)));
  endfunction

  // One conversion started by a one-clock start pulse.
  task automatic convert(input real v, input bit scramble);
    logic [N-1:0] exp_code;
    int lat;
    exp_code = ideal(v);
    vin = v;
    start = 1'b1;
    @(posedge clk); #1;             // start seen in IDLE
    start = 1'b0;
    check(state == ST_SAMPLE && sample && !hold && !eoc, "SAMPLE clock");
    @(posedge clk); #1;
    check(state == ST_CONVERT && !sample && hold, "CONVERT entered");
    check(code == (N'(1) << (N - 1)), "MSB trial first");
    check(bit_count == CW'(N - 1), "bit counter starts at N-1");
    if (scramble) begin
      vin = 1.0 - v;
      n_hold++;
    end
    lat = 2;
    while (!eoc && lat < 4 * N) begin
      check(state == ST_CONVERT, "stays in CONVERT");
      @(posedge clk); #1;
      lat++;
    end
    check(lat == N + 2, $sformatf("eoc latency %0d", lat));
    check(state == ST_DONE, "DONE with eoc");
    check(code == exp_code, $sformatf("result for vin=%f: got %0d expected %0d",
                                      v, code, exp_code));
    @(posedge clk); #1;
    check(state == ST_IDLE && !eoc, "back to IDLE, eoc for one clock");
    check(code == exp_code, "result held in IDLE");
    @(posedge clk); #1;
    check(state == ST_IDLE && code == exp_code, "result still held one clock later");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; vin = 0.0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(state == ST_IDLE && hold && !sample && !eoc, "IDLE after reset");

    // every code, half an LSB above its threshold
    for (int k = 0; k < int'(FS); k++)
      convert((real'(k) + 0.5) / real'(FS), k[0]);

    // out-of-range inputs clip
    convert(-0.2, 1'b0);  n_clip++;
    convert(1.3, 1'b0);   n_clip++;

    // random inputs, with a few idle clocks in between
    for (int r = 0; r < 300; r++) begin
      convert((real'($urandom_range(0, FS - 1)) + 0.05 + 0.9 * real'($urandom_range(0, 1000)) / 1000.0)
              / real'(FS), 1'b1);
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1;
    end

    // start held high: back-to-back conversions
    begin
      int last_eoc, cyc, seen_eoc;
      vin = 0.3217;
      start = 1'b1;
      cyc = 0; seen_eoc = 0; last_eoc = -1;
      while (seen_eoc < 4 && cyc < 20 * N) begin
        @(posedge clk); #1; cyc++;
        if (eoc) begin
          check(code == ideal(0.3217), "back-to-back result");
          if (last_eoc >= 0) begin
            check(cyc - last_eoc == N + 3, "back-to-back period");
            n_back2back++;
          end
          last_eoc = cyc;
          seen_eoc++;
        end
      end
      check(cyc == 4 * (N + 3) - 1, "four back-to-back conversions");
      start = 1'b0;
      @(posedge clk); #1;
    end

    // reset in the middle of CONVERT
    vin = 0.77;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    repeat (1 + N / 2) @(posedge clk);
    #1;
    check(state == ST_CONVERT, "in CONVERT before reset");
    rst = 1'b1;
    #1;
    check(state == ST_IDLE && code == '0 && !eoc, "reset aborts conversion");
    @(posedge clk); #1;
    rst = 1'b0;
    n_midreset++;
    repeat (2) @(posedge clk);
    #1;
    check(!eoc && state == ST_IDLE, "no eoc after abort");
    convert(0.77, 1'b0);

    $display("mechanisms: idle_wait=%0d sample=%0d convert=%0d done=%0d kept=%0d cleared=%0d hold=%0d clip=%0d back_to_back=%0d mid_reset=%0d",
             n_idle_wait, n_sample, n_convert, n_done, n_kept, n_cleared,
             n_hold, n_clip, n_back2back, n_midreset);
    check(n_idle_wait > 0, "IDLE wait never happened");
    check(n_sample > 0, "SAMPLE never happened");
    check(n_convert > 0, "CONVERT never happened");
    check(n_done > 0, "DONE never happened");
    check(n_kept > 0, "a trial bit was never kept");
    check(n_cleared > 0, "a trial bit was never cleared");
    check(n_hold > 0, "hold was never exercised");
    check(n_clip > 0, "clipping was never exercised");
    check(n_back2back > 0, "back-to-back conversion never happened");
    check(n_midreset > 0, "reset during conversion never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
