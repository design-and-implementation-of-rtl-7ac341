// tb_sar_fsm: self-checking testbench for the SAR controller.
//
// Drives random `start` and `bit_zero` levels for many clocks and compares
// the state, sample, hold and eoc outputs every cycle with a reference copy
// of the state table kept in the testbench:
//   IDLE   : start=0 -> IDLE,    start=1 -> SAMPLE
//   SAMPLE : -> CONVERT
//   CONVERT: bit_zero=0 -> CONVERT, bit_zero=1 -> DONE
//   DONE   : -> IDLE
// Reset is also applied in the middle of the run and must return to IDLE.
// Every transition of the table is counted and must occur at least once.
module tb_sar_fsm;
  import sar_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic start, bit_zero;
  sar_state_e state;
  logic sample, hold, eoc;

  int checks = 0, failures = 0;
  int seen [8];

  sar_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sar_state_e exp_st;

  initial begin
    rst = 1'b1; start = 1'b0; bit_zero = 1'b0;
    exp_st = ST_IDLE;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      // new inputs just after the edge
      start    = ($urandom_range(0, 3) == 0);
      bit_zero = ($urandom_range(0, 4) == 0);
      if (cyc == 2500) rst = 1'b1;
      if (cyc == 2501) rst = 1'b0;
      #1;
      if (rst) exp_st = ST_IDLE;  // asynchronous reset acts at once
      check(state == exp_st, "state");
      check(sample == (exp_st == ST_SAMPLE), "sample");
      check(hold == (exp_st != ST_SAMPLE), "hold");
      check(eoc == (exp_st == ST_DONE), "eoc");
      // reference next state
      if (rst) begin
        exp_st = ST_IDLE;
        seen[6]++;
      end else begin
        case (exp_st)
          ST_IDLE:    if (start) begin exp_st = ST_SAMPLE; seen[1]++; end
                      else seen[0]++;
          ST_SAMPLE:  begin exp_st = ST_CONVERT; seen[2]++; end
          ST_CONVERT: if (bit_zero) begin exp_st = ST_DONE; seen[4]++; end
                      else seen[3]++;
          ST_DONE:    begin exp_st = ST_IDLE; seen[5]++; end
          default:    exp_st = ST_IDLE;
        endcase
      end
      @(posedge clk);
      #1;
    end
    for (int i = 0; i < 7; i++)
      check(seen[i] > 0, $sformatf("transition %0d never happened", i));
    $display("transitions: idle-stay=%0d idle->sample=%0d sample->convert=%0d convert-stay=%0d convert->done=%0d done->idle=%0d reset=%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5], seen[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
