// Direct-mapped invariance screening table.
//
// Holds ENTRIES invariance entries (last value, last delta, value mask, delta
// mask) of W bits each, indexed by the low bits of the instruction address
// with no tag, so instructions that share an index share (and alias in) one
// entry. Each screened result reads its entry, is checked and merged into it
// by inv_check, and the entry is written back; the entry is updated at
// execution, speculatively. A clear input invalidates every entry at once, so
// the table restarts with all bits invariant.
//
// Pipeline (one request per cycle, no stalls):
//   cycle t    request presented; the entry array is read (synchronous read)
//   cycle t+1  entry checked and updated, written back at the end of t+1
//   cycle t+2  registered response: rsp_valid, rsp_tag, warnings
// A request that hits the index written in the previous cycle takes the
// entry from a one-deep forwarding register instead of the stale array data.
// A clear takes effect at the end of the cycle it is high in: the request in
// its second stage still reports its warnings but its write is dropped, and
// the request being read in that cycle sees an empty entry.
//
// The table sizes, the indexing by instruction address, the absence of tags
// and the update at execution follow the reference design; the two-stage
// pipeline, the forwarding, the low-bit index and the one-cycle clear are this
// design's choices.
module inv_table #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned W       = 32,
  parameter int unsigned PC_W    = 32,
  parameter int unsigned TAG_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             req_valid,
  input  logic [PC_W-1:0]  req_pc,
  input  logic [W-1:0]     req_value,
  input  logic [TAG_W-1:0] req_tag,
  output logic             rsp_valid,
  output logic [TAG_W-1:0] rsp_tag,
  output logic             rsp_warn_value,
  output logic             rsp_warn_delta
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);

  typedef logic [IDX_W-1:0] idx_t;

  typedef struct packed {
    logic [W-1:0] last;
    logic [W-1:0] delta;
    logic [W-1:0] vmask;
    logic [W-1:0] dmask;
    logic         dvalid;
  } entry_t;

  // Entry storage (no reset; only the valid bits are reset) and valid bits.
  entry_t               mem [ENTRIES];
  logic [ENTRIES-1:0]   valid_q;

  // Stage 1 registers.
  logic                 s1_valid;
  idx_t                 s1_idx;
  logic [W-1:0]         s1_value;
  logic [TAG_W-1:0]     s1_tag;
  entry_t               s1_rd;
  logic                 s1_rd_valid;

  // Last write, for forwarding.
  logic                 fw_valid;
  idx_t                 fw_idx;
  entry_t               fw_entry;

  idx_t                 s0_idx;
  entry_t               s1_entry;
  logic                 s1_entry_valid;
  entry_t               s1_new;
  logic                 s1_warn_value;
  logic                 s1_warn_delta;
  logic                 s1_we;

  assign s0_idx = req_pc[IDX_W-1:0];

  // Array read (synchronous) and write.
  always_ff @(posedge clk) begin
    if (req_valid) s1_rd <= mem[s0_idx];
    if (s1_we)     mem[s1_idx] <= s1_new;
  end

  // Forwarding mux: the entry written last cycle is newer than the array data.
  always_comb begin
    if (fw_valid && fw_idx == s1_idx) begin
      s1_entry       = fw_entry;
      s1_entry_valid = 1'b1;
    end else begin
      s1_entry       = s1_rd;
      s1_entry_valid = s1_rd_valid;
    end
  end

  inv_check #(.W(W)) u_check (
    .entry_valid (s1_entry_valid),
    .in_last     (s1_entry.last),
    .in_delta    (s1_entry.delta),
    .in_vmask    (s1_entry.vmask),
    .in_dmask    (s1_entry.dmask),
    .in_dvalid   (s1_entry.dvalid),
    .value       (s1_value),
    .out_last    (s1_new.last),
    .out_delta   (s1_new.delta),
    .out_vmask   (s1_new.vmask),
    .out_dmask   (s1_new.dmask),
    .out_dvalid  (s1_new.dvalid),
    .warn_value  (s1_warn_value),
    .warn_delta  (s1_warn_delta)
  );

  assign s1_we = s1_valid && !clear;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q        <= '0;
      s1_valid       <= 1'b0;
      s1_idx         <= '0;
      s1_value       <= '0;
      s1_tag         <= '0;
      s1_rd_valid    <= 1'b0;
      fw_valid       <= 1'b0;
      fw_idx         <= '0;
      fw_entry       <= '0;
      rsp_valid      <= 1'b0;
      rsp_tag        <= '0;
      rsp_warn_value <= 1'b0;
      rsp_warn_delta <= 1'b0;
    end else begin
      // Stage 0 -> 1
      s1_valid    <= req_valid;
      s1_idx      <= s0_idx;
      s1_value    <= req_value;
      s1_tag      <= req_tag;
      s1_rd_valid <= valid_q[s0_idx] && !clear;

      // Stage 1 write-back, valid bits and forwarding register
      if (clear) begin
        valid_q  <= '0;
        fw_valid <= 1'b0;
      end else begin
        if (s1_we) valid_q[s1_idx] <= 1'b1;
        fw_valid <= s1_we;
      end
      fw_idx   <= s1_idx;
      fw_entry <= s1_new;

      // Stage 1 -> 2 (response)
      rsp_valid      <= s1_valid;
      rsp_tag        <= s1_tag;
      rsp_warn_value <= s1_valid && s1_warn_value;
      rsp_warn_delta <= s1_valid && s1_warn_delta;
    end
  end

  initial begin
    assert (ENTRIES == (1 << IDX_W))
      else $error("inv_table: ENTRIES must be a power of two");
    assert (IDX_W <= PC_W)
      else $error("inv_table: the index needs more bits than PC_W");
  end

endmodule
