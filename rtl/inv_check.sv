// Invariance check and update of one screener entry (combinational).
//
// An entry records, for one static instruction (or for all instructions that
// alias to it), the last result it produced, the last delta between two
// consecutive results, a value mask and a delta mask. A mask bit set to 1
// means that bit has been seen to vary; 0 means it has been invariant so far.
// For a new result V:
//   * bits that differ from the last value become variant in the value mask;
//   * delta = V - last value; bits that differ from the last delta become
//     variant in the delta mask;
//   * a perturbation is flagged when a bit that was invariant becomes
//     variant in either mask (warn_value / warn_delta).
// The first result only records the value; the second records the first
// delta (dvalid goes to 1); delta checks start with the third result.
// The value/delta masks, the last-value record and the warning rule follow the
// invariance screener definition; keeping the last delta as the reference for
// delta invariance (rather than the first delta) is this design's choice.
//
// Interface: entry fields in, new result in; updated entry fields out, and
// the two warnings. Purely combinational, no clock.
module inv_check #(
  parameter int unsigned W = 32
) (
  input  logic         entry_valid,  // entry holds a recorded value
  input  logic [W-1:0] in_last,      // last result
  input  logic [W-1:0] in_delta,     // last delta (valid when in_dvalid)
  input  logic [W-1:0] in_vmask,     // 1 = value bit has varied
  input  logic [W-1:0] in_dmask,     // 1 = delta bit has varied
  input  logic         in_dvalid,    // in_delta holds a real delta
  input  logic [W-1:0] value,        // new result
  output logic [W-1:0] out_last,
  output logic [W-1:0] out_delta,
  output logic [W-1:0] out_vmask,
  output logic [W-1:0] out_dmask,
  output logic         out_dvalid,
  output logic         warn_value,
  output logic         warn_delta
);

  logic [W-1:0] delta;      // value - last value
  logic [W-1:0] vchange;    // value bits that changed
  logic [W-1:0] dchange;    // delta bits that changed

  always_comb begin
    delta   = value - in_last;
    vchange = value ^ in_last;
    dchange = delta ^ in_delta;

    out_last = value;
    if (!entry_valid) begin
      // First sighting: record the value, everything invariant.
      out_delta  = '0;
      out_vmask  = '0;
      out_dmask  = '0;
      out_dvalid = 1'b0;
      warn_value = 1'b0;
      warn_delta = 1'b0;
    end else begin
      out_vmask  = in_vmask | vchange;
      warn_value = |(vchange & ~in_vmask);
      out_delta  = delta;
      out_dvalid = 1'b1;
      if (in_dvalid) begin
        out_dmask  = in_dmask | dchange;
        warn_delta = |(dchange & ~in_dmask);
      end else begin
        // Second sighting: the first delta becomes the reference.
        out_dmask  = in_dmask;
        warn_delta = 1'b0;
      end
    end
  end

endmodule
