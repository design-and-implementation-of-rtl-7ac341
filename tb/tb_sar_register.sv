// tb_sar_register: self-checking testbench for the SAR register and bit
// counter, at the default 10 bits.
//
// Each trial loads the register, then gives N step clocks with a random
// comparator decision per step. After load the code must be 100...0 with
// the counter at N-1. After step i (i = 1..N) the top i bits must equal the
// decisions given so far, MSB first; if i < N the next bit must be the new
// trial bit 1 and the bits below it 0, and the counter must read N-1-i.
// `bit_zero` must be high exactly when the counter is 0. Between trials a
// few idle clocks (no load, no step) must leave the register unchanged.
module tb_sar_register;
  localparam int unsigned N  = 10;
  localparam int unsigned CW = $clog2(N);

  logic clk = 1'b0;
  logic rst, load, step, comp;
  logic [N-1:0]  code;
  logic [CW-1:0] bit_count;
  logic          bit_zero;

  int checks = 0, failures = 0;

  sar_register dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: code=%b cnt=%0d", what, $time, code, bit_count);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] decided, expect_code, held;

  initial begin
    rst = 1'b1; load = 1'b0; step = 1'b0; comp = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(code == '0 && bit_count == '0 && bit_zero, "reset value");
    for (int t = 0; t < 500; t++) begin
      // load the first trial
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      check(code == (N'(1) << (N - 1)), "MSB trial after load");
      check(bit_count == CW'(N - 1), "counter after load");
      check(!bit_zero, "bit_zero after load");
      decided = '0;
      for (int i = 1; i <= N; i++) begin
        step = 1'b1;
        comp = (t == 0) ? 1'b1 : (t == 1) ? 1'b0 : 1'($urandom);
        decided[N - i] = comp;
        @(posedge clk); #1;
        expect_code = decided;
        if (i < N) expect_code[N - 1 - i] = 1'b1;
        check(code == expect_code, $sformatf("code after step %0d", i));
        check(bit_count == CW'((i < N) ? N - 1 - i : 0), "counter");
        check(bit_zero == (i >= N - 1), "bit_zero");
      end
      step = 1'b0;
      held = code;
      check(held == decided, "final result");
      repeat ($urandom_range(0, 3)) begin
        comp = 1'($urandom);
        @(posedge clk); #1;
        check(code == held, "result held while idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
