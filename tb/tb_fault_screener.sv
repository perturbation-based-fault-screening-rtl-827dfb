// End-to-end testbench of the fault screener at its default sizes
// (1K x 32-bit address table, 512 x 64-bit data table, clear every
// 10,000,000 instructions).
//
// A synthetic program of static memory instructions (more static
// instructions than table entries, so indices alias) issues loads and
// stores with constant, strided and locally random addresses and store data;
// some instances get a single flipped bit as an injected fault. A reference
// model, written bit by bit from the screening rules, predicts every verdict
// two cycles after its request and the cycle of every table clear; all DUT
// outputs are compared each cycle. The testbench also counts how often each
// mechanism happened (value and delta warnings on both tables, forwarding of
// back-to-back index hits, aliasing, clears, a clear with requests in flight,
// loads and stores, replays) and fails if one never did. Like a processor
// recovering through its branch-misprediction path, the testbench executes
// every flagged instruction again right away, without its injected fault,
// and counts how many of these replays are accepted. It reports how many injected
// faults were flagged.
module tb_fault_screener;
  import fs_pkg::*;

  localparam int unsigned AE = ADDR_ENTRIES_DEF;
  localparam int unsigned DE = DATA_ENTRIES_DEF;
  localparam int unsigned AW = ADDR_W_DEF;
  localparam int unsigned DW = DATA_W_DEF;
  localparam int unsigned RI = RESET_INTERVAL_DEF;
  localparam int unsigned NCYC = 2_000_000;
  localparam int unsigned NPC  = 1600;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          mem_valid = 1'b0;
  logic          mem_is_store = 1'b0;
  logic [31:0]   mem_pc = '0;
  logic [AW-1:0] mem_addr = '0;
  logic [DW-1:0] mem_data = '0;
  logic [7:0]    mem_tag = '0;
  logic [2:0]    inst_count = '0;
  logic          screen_valid;
  logic [7:0]    screen_tag;
  logic          flush_valid;
  flush_cause_t  flush_cause;
  logic          screen_clear;

  fault_screener dut (
    .clk, .rst_n, .mem_valid, .mem_is_store, .mem_pc, .mem_addr, .mem_data,
    .mem_tag, .inst_count, .screen_valid, .screen_tag, .flush_valid,
    .flush_cause, .screen_clear
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // ---------------- reference model ----------------
  typedef struct {
    bit          valid;
    bit          dvalid;
    logic [63:0] last, delta, vmask, dmask;
  } ment_t;

  ment_t am [AE];
  ment_t dm [DE];
  int    a_owner [AE];

  // Applies one result to a model entry; returns {warn_value, warn_delta}.
  function automatic logic [1:0] model_apply(ref ment_t e, input logic [63:0] v, input int w);
    logic [63:0] d;
    logic wv, wd;
    wv = 0; wd = 0;
    if (!e.valid) begin
      e.valid = 1; e.dvalid = 0; e.last = v; e.delta = 0; e.vmask = 0; e.dmask = 0;
      return 2'b00;
    end
    d = v - e.last;
    for (int i = 0; i < w; i++) begin
      if (v[i] != e.last[i]) begin
        if (!e.vmask[i]) wv = 1;
        e.vmask[i] = 1;
      end
      if (e.dvalid && d[i] != e.delta[i]) begin
        if (!e.dmask[i]) wd = 1;
        e.dmask[i] = 1;
      end
    end
    if (w < 64) d = d & ((64'd1 << w) - 1);
    e.delta = d; e.dvalid = 1; e.last = v;
    return {wv, wd};
  endfunction

  // ---------------- synthetic program ----------------
  typedef struct {
    logic [31:0] pc;
    bit          store;
    int          akind, dkind;
    logic [31:0] abase, astride;
    logic [63:0] dbase;
    int unsigned n;
  } sinst_t;
  sinst_t prog [NPC];

  int unsigned cyc = 0;

  // pending request (presented last cycle) and the verdict expected next
  bit          p_valid, p_store, p_fault;
  logic [31:0] p_pc, p_addr;
  logic [63:0] p_data;
  logic [7:0]  p_tag;
  bit          p_replay;
  bit          e_valid, e_fault, e_replay, e_store;
  logic [7:0]  e_tag;
  logic [3:0]  e_cause;
  logic [31:0] e_pc, e_addr;
  logic [63:0] e_data;
  int unsigned e_sel;
  // fault-free copy of the request, kept for a replay after a flush
  logic [31:0] c_addr;
  logic [63:0] c_data;
  int unsigned p_sel;
  bit          r_pending;
  logic [31:0] r_pc, r_addr;
  logic [63:0] r_data;
  bit          r_store;
  int unsigned r_sel;

  longint unsigned icount = 0;   // instructions counted since last clear
  bit              exp_clear_next = 0;

  // mechanism counters
  int unsigned n_load, n_store, n_av, n_ad, n_dv, n_dd, n_fwd, n_alias;
  int unsigned n_clear, n_clear_inflight, n_flush, n_faults, n_faults_caught;
  int unsigned n_replay, n_replay_flagged;
  int unsigned last_idx_valid; logic [9:0] last_idx;

  initial begin
    int unsigned sel, prev;
    logic [63:0] v;
    logic [1:0]  wa, wdr;

    for (int i = 0; i < NPC; i++) begin
      prog[i].pc      = 32'h0040_0000 + 32'(i) * 32'd5 + 32'($urandom_range(0, 3));
      prog[i].store   = ($urandom_range(0, 2) == 0);
      prog[i].akind   = $urandom_range(0, 2);
      prog[i].dkind   = $urandom_range(0, 2);
      prog[i].abase   = 32'h1000_0000 + ($urandom() & 32'h00ff_fff0);
      prog[i].astride = 32'd4 << $urandom_range(0, 4);
      prog[i].dbase   = {$urandom(), $urandom()};
      prog[i].n       = 0;
    end
    for (int i = 0; i < AE; i++) begin am[i].valid = 0; a_owner[i] = -1; end
    for (int i = 0; i < DE; i++) dm[i].valid = 0;
    p_valid = 0; e_valid = 0; p_replay = 0; r_pending = 0;
    {n_replay, n_replay_flagged} = '0; prev = 0; last_idx_valid = 0;
    {n_load, n_store, n_av, n_ad, n_dv, n_dd, n_fwd, n_alias} = '0;
    {n_clear, n_clear_inflight, n_flush, n_faults, n_faults_caught} = '0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      // ---- compare this cycle's outputs with the verdict due now ----
      check(screen_valid == e_valid, "screen_valid");
      if (e_valid) begin
        check(screen_tag == e_tag, "screen_tag");
        check(flush_cause == e_cause, $sformatf("flush_cause dut=%b exp=%b", flush_cause, e_cause));
        check(flush_valid == (e_cause != 0), "flush_valid");
        if (e_fault) begin
          n_faults++;
          if (flush_valid) n_faults_caught++;
        end
        if (e_replay) begin
          n_replay++;
          if (flush_valid) n_replay_flagged++;
        end
        // The processor squashes a flagged instruction and executes it
        // again, now without the injected fault.
        if (flush_valid && !e_replay) begin
          r_pending = 1; r_pc = e_pc; r_addr = e_addr; r_data = e_data;
          r_store = e_store; r_sel = e_sel;
        end
      end else begin
        check(flush_valid == 1'b0, "flush without verdict");
      end
      check(screen_clear == exp_clear_next, "clear timing");
      if (screen_clear) n_clear++;

      // ---- model step: pending request of last cycle, then clear ----
      e_valid = p_valid; e_tag = p_tag; e_fault = p_fault; e_cause = '0;
      e_replay = p_replay; e_pc = p_pc; e_addr = c_addr; e_data = c_data;
      e_store = p_store; e_sel = p_sel;
      if (p_valid) begin
        automatic int ai = int'(p_pc[9:0]);
        automatic int di = int'(p_pc[8:0]);
        ment_t ta, td;
        ta = am[ai];
        wa = model_apply(ta, {32'd0, p_addr}, AW);
        if (!screen_clear) am[ai] = ta;
        e_cause[3] = wa[1]; e_cause[2] = wa[0];
        if (p_store) begin
          td = dm[di];
          wdr = model_apply(td, p_data, DW);
          if (!screen_clear) dm[di] = td;
          e_cause[1] = wdr[1]; e_cause[0] = wdr[0];
        end
        n_av += wa[1]; n_ad += wa[0];
        if (p_store) begin n_dv += wdr[1]; n_dd += wdr[0]; end
        if (e_cause != 0) n_flush++;
      end
      if (screen_clear) begin
        if (p_valid) n_clear_inflight++;
        for (int i = 0; i < AE; i++) am[i].valid = 0;
        for (int i = 0; i < DE; i++) dm[i].valid = 0;
      end

      // ---- new request for this cycle ----
      p_valid = ($urandom_range(0, 9) < 8) || r_pending;
      p_replay = 0;
      if (r_pending) begin
        r_pending = 0;
        p_replay = 1;
        sel = r_sel; p_sel = r_sel;
        p_pc = r_pc; p_addr = r_addr; p_data = r_data; p_store = r_store;
        c_addr = r_addr; c_data = r_data;
        p_fault = 0;
        p_tag = 8'($urandom());
        if (p_store) n_store++; else n_load++;
        if (last_idx_valid != 0 && last_idx == p_pc[9:0]) n_fwd++;
        last_idx = p_pc[9:0];
      end else if (p_valid) begin
        if ($urandom_range(0, 4) == 0) sel = prev;              // loop back-to-back
        else if ($urandom_range(0, 3) != 0) sel = $urandom_range(0, 63); // hot code
        else sel = $urandom_range(0, NPC - 1);
        prev = sel;
        p_pc = prog[sel].pc;
        p_store = prog[sel].store;
        case (prog[sel].akind)
          0: p_addr = prog[sel].abase;
          1: p_addr = prog[sel].abase + prog[sel].n * prog[sel].astride;
          default: p_addr = prog[sel].abase + 32'($urandom_range(0, 255));
        endcase
        case (prog[sel].dkind)
          0: p_data = prog[sel].dbase;
          1: p_data = prog[sel].dbase + 64'(prog[sel].n);
          default: p_data = prog[sel].dbase ^ 64'($urandom_range(0, 15));
        endcase
        prog[sel].n++;
        p_sel = sel;
        c_addr = p_addr; c_data = p_data;
        p_fault = ($urandom_range(0, 199) == 0);
        if (p_fault) begin
          if (p_store && $urandom_range(0, 1) == 0) p_data[$urandom_range(0, 63)] ^= 1'b1;
          else p_addr[$urandom_range(12, 31)] ^= 1'b1;
        end
        p_tag = 8'($urandom());
        if (p_store) n_store++; else n_load++;
        if (last_idx_valid != 0 && last_idx == p_pc[9:0]) n_fwd++;
        if (a_owner[p_pc[9:0]] >= 0 && a_owner[p_pc[9:0]] != int'(sel)) n_alias++;
        a_owner[p_pc[9:0]] = int'(sel);
        last_idx = p_pc[9:0];
      end
      last_idx_valid = p_valid;
      mem_valid    = p_valid;
      mem_is_store = p_valid && p_store;
      mem_pc       = p_pc;
      mem_addr     = p_addr;
      mem_data     = p_data;
      mem_tag      = p_tag;

      // ---- instruction count and expected clear ----
      inst_count = 3'($urandom_range(4, 7));
      icount += inst_count;
      exp_clear_next = (icount >= RI);
      if (exp_clear_next) icount -= RI;
    end

    $display("loads=%0d stores=%0d flushes=%0d addr_value=%0d addr_delta=%0d data_value=%0d data_delta=%0d",
             n_load, n_store, n_flush, n_av, n_ad, n_dv, n_dd);
    $display("replays=%0d replays flagged again=%0d", n_replay, n_replay_flagged);
    $display("forwarded=%0d aliased=%0d clears=%0d clear_inflight=%0d faults=%0d caught=%0d",
             n_fwd, n_alias, n_clear, n_clear_inflight, n_faults, n_faults_caught);
    check(n_load > 0, "no load");
    check(n_store > 0, "no store");
    check(n_av > 0, "no address value warning");
    check(n_ad > 0, "no address delta warning");
    check(n_dv > 0, "no data value warning");
    check(n_dd > 0, "no data delta warning");
    check(n_fwd > 0, "no back-to-back index hit");
    check(n_alias > 0, "no aliasing");
    check(n_clear > 0, "no table clear");
    check(n_clear_inflight > 0, "no clear with a request in flight");
    check(n_faults_caught > 0, "no injected fault caught");
    check(n_replay > 0, "no replay after a flush");
    check(n_replay_flagged < n_replay, "replays are mostly accepted");
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
