// Periodic screener reset timer.
//
// Invariance masks only ever gain variant bits, so a screener that is never
// reset gradually loses its ability to flag anything. This timer adds up the
// instructions reported each cycle (inst_count, 0 to 2**CNT_W-1) and raises
// clear for one cycle each time RESET_INTERVAL instructions have gone by;
// the surplus of the crossing cycle is carried into the next interval, so
// the clears stay exactly RESET_INTERVAL instructions apart on average.
// RESET_INTERVAL = 0 turns resetting off (the non-resetting screener).
//
// The 10-million-instruction interval follows the reference design. Counting
// the instructions the pipeline reports per cycle (for example retired
// instructions), the carry of the surplus and the registered one-cycle pulse
// are this design's choices. clear is registered: it rises the cycle after
// the count crosses the interval.
module reset_timer #(
  parameter int unsigned RESET_INTERVAL = 10_000_000,
  parameter int unsigned CNT_W          = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] inst_count,
  output logic             clear
);

  localparam int unsigned ACC_W = $clog2(RESET_INTERVAL + 2**CNT_W + 1);

  logic [ACC_W-1:0] acc_q;
  logic [ACC_W-1:0] acc_sum;

  assign acc_sum = acc_q + ACC_W'(inst_count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      clear <= 1'b0;
    end else if (RESET_INTERVAL == 0) begin
      acc_q <= '0;
      clear <= 1'b0;
    end else if (acc_sum >= ACC_W'(RESET_INTERVAL)) begin
      acc_q <= acc_sum - ACC_W'(RESET_INTERVAL);
      clear <= 1'b1;
    end else begin
      acc_q <= acc_sum;
      clear <= 1'b0;
    end
  end

  initial begin
    assert (RESET_INTERVAL == 0 || RESET_INTERVAL >= 2**CNT_W)
      else $error("reset_timer: RESET_INTERVAL must be 0 or at least 2**CNT_W");
  end

endmodule
