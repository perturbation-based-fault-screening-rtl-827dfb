// Invariance-based fault screener for the memory instructions of a processor.
//
// A transient fault in a result tends to show up as a perturbation: a value
// that breaks the pattern the same static instruction has followed so far.
// This screener looks for one kind of pattern, bit invariance. For every
// executed load it screens the address; for every executed store it screens
// the address and the data. Each screened quantity has an entry, selected by
// the instruction address, holding masks of the bits of the value and of the
// value-to-value delta that have ever changed. When a bit that had always
// been stable changes, the screener requests a pipeline flush of that
// instruction, so that the processor's branch-misprediction recovery
// re-executes it: a real (natural) perturbation repeats and is then accepted,
// a fault-induced one usually disappears.
//
// Structure:
//   u_addr  inv_table, ADDR_ENTRIES x ADDR_W: load and store addresses
//   u_data  inv_table, DATA_ENTRIES x DATA_W: store data
//   u_timer reset_timer: clears both tables every RESET_INTERVAL instructions
//
// Interface: one memory instruction per cycle at execute (mem_valid with its
// instruction address, effective address, store data and a tag chosen by the
// pipeline, e.g. its reorder-buffer index); inst_count gives the number of
// instructions the pipeline counts this cycle, which drives the reset period.
// Timing: the verdict for an instruction presented in cycle t appears in
// cycle t+2 on screen_valid / screen_tag; flush_valid is high in that cycle
// if it must be flushed, with flush_cause saying which check fired.
// Loads and stores alike go through the address table; only stores use the
// data table; both tables have the same latency so their verdicts line up.
//
// Table sizes (1K x 32-bit addresses, 512 x 64-bit store data), the choice of
// memory instructions only, no screening of loaded values, indexing by
// instruction address, speculative update at execute and the 10-million-
// instruction reset follow the reference design. The one-instruction-per-cycle
// port, the tag, the two-cycle latency and the cause vector are this design's
// own choices.
module fault_screener
  import fs_pkg::*;
#(
  parameter int unsigned ADDR_ENTRIES   = ADDR_ENTRIES_DEF,
  parameter int unsigned DATA_ENTRIES   = DATA_ENTRIES_DEF,
  parameter int unsigned ADDR_W         = ADDR_W_DEF,
  parameter int unsigned DATA_W         = DATA_W_DEF,
  parameter int unsigned PC_W           = 32,
  parameter int unsigned TAG_W          = 8,
  parameter int unsigned RESET_INTERVAL = RESET_INTERVAL_DEF,
  parameter int unsigned CNT_W          = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // memory instruction at execute
  input  logic              mem_valid,
  input  logic              mem_is_store,
  input  logic [PC_W-1:0]   mem_pc,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [DATA_W-1:0] mem_data,
  input  logic [TAG_W-1:0]  mem_tag,
  // instruction count for the periodic reset
  input  logic [CNT_W-1:0]  inst_count,
  // verdicts, two cycles after the request
  output logic              screen_valid,
  output logic [TAG_W-1:0]  screen_tag,
  output logic              flush_valid,
  output flush_cause_t      flush_cause,
  // tables cleared this cycle
  output logic              screen_clear
);

  logic             clear;
  logic             a_rsp_valid, a_warn_value, a_warn_delta;
  logic [TAG_W-1:0] a_rsp_tag;
  logic             d_rsp_valid, d_warn_value, d_warn_delta;
  logic [TAG_W-1:0] d_rsp_tag;

  reset_timer #(
    .RESET_INTERVAL (RESET_INTERVAL),
    .CNT_W          (CNT_W)
  ) u_timer (
    .clk        (clk),
    .rst_n      (rst_n),
    .inst_count (inst_count),
    .clear      (clear)
  );

  inv_table #(
    .ENTRIES (ADDR_ENTRIES),
    .W       (ADDR_W),
    .PC_W    (PC_W),
    .TAG_W   (TAG_W)
  ) u_addr (
    .clk            (clk),
    .rst_n          (rst_n),
    .clear          (clear),
    .req_valid      (mem_valid),
    .req_pc         (mem_pc),
    .req_value      (mem_addr),
    .req_tag        (mem_tag),
    .rsp_valid      (a_rsp_valid),
    .rsp_tag        (a_rsp_tag),
    .rsp_warn_value (a_warn_value),
    .rsp_warn_delta (a_warn_delta)
  );

  inv_table #(
    .ENTRIES (DATA_ENTRIES),
    .W       (DATA_W),
    .PC_W    (PC_W),
    .TAG_W   (TAG_W)
  ) u_data (
    .clk            (clk),
    .rst_n          (rst_n),
    .clear          (clear),
    .req_valid      (mem_valid && mem_is_store),
    .req_pc         (mem_pc),
    .req_value      (mem_data),
    .req_tag        (mem_tag),
    .rsp_valid      (d_rsp_valid),
    .rsp_tag        (d_rsp_tag),
    .rsp_warn_value (d_warn_value),
    .rsp_warn_delta (d_warn_delta)
  );

  always_comb begin
    screen_valid           = a_rsp_valid;
    screen_tag             = a_rsp_tag;
    flush_cause.addr_value = a_warn_value;
    flush_cause.addr_delta = a_warn_delta;
    flush_cause.data_value = d_rsp_valid && d_warn_value;
    flush_cause.data_delta = d_rsp_valid && d_warn_delta;
    flush_valid            = a_rsp_valid && (|flush_cause);
  end

  assign screen_clear = clear;

  // Every store goes to both tables in the same cycle, so a data verdict
  // always comes with an address verdict for the same instruction.
  property p_data_with_addr;
    @(posedge clk) disable iff (!rst_n)
      d_rsp_valid |-> (a_rsp_valid && d_rsp_tag == a_rsp_tag);
  endproperty
  a_data_with_addr: assert property (p_data_with_addr);

endmodule
