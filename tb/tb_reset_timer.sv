// Testbench of reset_timer, the periodic screener reset.
//
// Three instances share one instruction-count stream: the default interval
// (10,000,000 instructions), a short interval of 37 and interval 0 (no
// resetting). The testbench keeps its own running instruction total and
// expects a one-cycle clear, one cycle after each crossing of a multiple of
// the interval, so the default instance must clear in the cycle after the
// running total first reaches 10,000,000 instructions.
module tb_reset_timer;

  localparam int unsigned SHORT = 37;
  localparam longint unsigned LONG = 10_000_000;
  localparam int unsigned NCYC = 3_000_000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] inst_count = '0;
  logic       clr_long, clr_short, clr_off;

  reset_timer                                     u_long  (.clk, .rst_n, .inst_count, .clear(clr_long));
  reset_timer #(.RESET_INTERVAL(SHORT), .CNT_W(3)) u_short (.clk, .rst_n, .inst_count, .clear(clr_short));
  reset_timer #(.RESET_INTERVAL(0),     .CNT_W(3)) u_off   (.clk, .rst_n, .inst_count, .clear(clr_off));

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint unsigned total = 0;       // instructions counted so far
    bit exp_long = 0, exp_short = 0;
    int unsigned n_long = 0, n_short = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      check(clr_long == exp_long, "default-interval clear");
      check(clr_short == exp_short, "short-interval clear");
      check(clr_off == 1'b0, "disabled timer never clears");
      n_long += clr_long;
      n_short += clr_short;
      inst_count = (c % 1000 < 3) ? 3'd0 : 3'($urandom_range(1, 7));
      // a crossing of a multiple of the interval by this cycle's count
      exp_long  = ((total + inst_count) / LONG) != (total / LONG);
      exp_short = ((total + inst_count) / SHORT) != (total / SHORT);
      total += inst_count;
    end
    $display("instructions=%0d clears: default=%0d short=%0d", total, n_long, n_short);
    check(n_long == total / LONG, "number of default-interval clears");
    check(n_long > 0, "at least one 10M clear");
    check(n_short == total / SHORT || n_short + 1 == total / SHORT, "number of short clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
