// Workload testbench: resetting against non-resetting screener.
//
// Two screeners see the same synthetic program: one at the default sizes
// with a clear every 10,000,000 instructions (INVAR_512_1K_R10M) and one
// with resetting turned off (INVAR_512_1K). The program has 700 static
// memory instructions (loads and stores with constant, strided and locally
// random addresses and data) and moves to new address regions and data
// values every 4,000,000 instructions, the kind of phase change that makes
// a never-reset screener accumulate variant bits. The pipeline is modelled
// as 3 instructions per cycle and one memory instruction in most cycles.
// One memory instruction in 300 carries a single flipped bit.
//
// Reported: for each screener, the share of injected faults flagged on the
// faulty instruction itself (two cycles later, well inside the 8-instruction
// window), and false flushes per 1000 instructions. Checked: every request
// gets its verdict with the right tag two cycles later in both screeners;
// only the resetting one clears, at the expected times; and the resetting
// screener flags more injected faults than the non-resetting one.
module tb_screener_workload;
  import fs_pkg::*;

  localparam int unsigned NCYC    = 8_000_000;
  localparam int unsigned NPC     = 700;
  localparam int unsigned IPC     = 3;
  localparam longint unsigned PHASE = 4_000_000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         mem_valid = 1'b0;
  logic         mem_is_store = 1'b0;
  logic [31:0]  mem_pc = '0;
  logic [31:0]  mem_addr = '0;
  logic [63:0]  mem_data = '0;
  logic [7:0]   mem_tag = '0;
  logic [2:0]   inst_count = '0;

  logic         r_valid, n_valid, r_flush, n_flush, r_clear, n_clear;
  logic [7:0]   r_tag, n_tag;
  flush_cause_t r_cause, n_cause;

  fault_screener u_r10m (
    .clk, .rst_n, .mem_valid, .mem_is_store, .mem_pc, .mem_addr, .mem_data, .mem_tag,
    .inst_count, .screen_valid(r_valid), .screen_tag(r_tag), .flush_valid(r_flush),
    .flush_cause(r_cause), .screen_clear(r_clear)
  );

  fault_screener #(.RESET_INTERVAL(0)) u_noreset (
    .clk, .rst_n, .mem_valid, .mem_is_store, .mem_pc, .mem_addr, .mem_data, .mem_tag,
    .inst_count, .screen_valid(n_valid), .screen_tag(n_tag), .flush_valid(n_flush),
    .flush_cause(n_cause), .screen_clear(n_clear)
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  typedef struct {
    logic [31:0] pc;
    bit          store;
    int          akind, dkind;
    logic [31:0] abase, astride;
    logic [63:0] dbase;
    int unsigned n;
  } sinst_t;
  sinst_t prog [NPC];

  // in-flight requests (valid, tag, fault) for the two-cycle verdict
  bit          q_valid [2];
  logic [7:0]  q_tag [2];
  bit          q_fault [2];

  initial begin
    longint unsigned instr = 0, since_clear = 0, next_phase = PHASE;
    int unsigned faults = 0, r_caught = 0, n_caught = 0, r_false = 0, n_false = 0;
    int unsigned r_clears = 0, phases = 0;
    bit exp_clear = 0;
    int unsigned sel;

    for (int i = 0; i < NPC; i++) begin
      prog[i].pc      = 32'h0804_8000 + 32'(i) * 32'd3;
      prog[i].store   = ($urandom_range(0, 2) == 0);
      prog[i].akind   = $urandom_range(0, 2);
      prog[i].dkind   = $urandom_range(0, 2);
      prog[i].abase   = 32'h0800_0000 + ($urandom() & 32'h0000_fff0);
      prog[i].astride = 32'd4 << $urandom_range(0, 3);
      prog[i].dbase   = 64'($urandom_range(0, 1000));
      prog[i].n       = 0;
    end
    for (int i = 0; i < 2; i++) begin q_valid[i] = 0; q_fault[i] = 0; q_tag[i] = 0; end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      // ---- verdicts for the request of two cycles ago ----
      check(r_valid == q_valid[1] && n_valid == q_valid[1], "verdict timing");
      if (q_valid[1]) begin
        check(r_tag == q_tag[1] && n_tag == q_tag[1], "verdict tag");
        if (q_fault[1]) begin
          faults++;
          r_caught += r_flush;
          n_caught += n_flush;
        end else begin
          r_false += r_flush;
          n_false += n_flush;
        end
      end
      check(r_clear == exp_clear, "resetting screener clear timing");
      check(n_clear == 1'b0, "non-resetting screener never clears");
      r_clears += r_clear;
      q_valid[1] = q_valid[0]; q_tag[1] = q_tag[0]; q_fault[1] = q_fault[0];

      // ---- phase change: new regions and values for every instruction ----
      if (instr >= next_phase) begin
        next_phase += PHASE;
        phases++;
        for (int i = 0; i < NPC; i++) begin
          prog[i].abase = {4'($urandom_range(1, 14)), 28'($urandom()) & 28'h0ff_fff0};
          prog[i].dbase = {$urandom(), $urandom()} >> $urandom_range(0, 48);
          prog[i].n     = 0;
        end
      end

      // ---- next memory instruction ----
      mem_valid = ($urandom_range(0, 9) < 9);
      q_valid[0] = mem_valid;
      q_fault[0] = 0;
      if (mem_valid) begin
        sel = ($urandom_range(0, 3) != 0) ? $urandom_range(0, 127) : $urandom_range(0, NPC - 1);
        mem_pc       = prog[sel].pc;
        mem_is_store = prog[sel].store;
        case (prog[sel].akind)
          0: mem_addr = prog[sel].abase;
          1: mem_addr = prog[sel].abase + 32'(prog[sel].n % 4096) * prog[sel].astride;
          default: mem_addr = prog[sel].abase + 32'($urandom_range(0, 63));
        endcase
        case (prog[sel].dkind)
          0: mem_data = prog[sel].dbase;
          1: mem_data = prog[sel].dbase + 64'(prog[sel].n % 256);
          default: mem_data = prog[sel].dbase ^ 64'($urandom_range(0, 7));
        endcase
        prog[sel].n++;
        if ($urandom_range(0, 299) == 0) begin
          q_fault[0] = 1;
          if (mem_is_store && $urandom_range(0, 1) == 0) mem_data[$urandom_range(0, 63)] ^= 1'b1;
          else mem_addr[$urandom_range(0, 31)] ^= 1'b1;
        end
        mem_tag  = 8'(c);
        q_tag[0] = mem_tag;
      end else begin
        mem_is_store = 1'b0;
      end

      inst_count  = 3'(IPC);
      instr      += IPC;
      since_clear += IPC;
      exp_clear   = (since_clear >= RESET_INTERVAL_DEF);
      if (exp_clear) since_clear -= RESET_INTERVAL_DEF;
    end

    $display("instructions=%0d phases=%0d clears=%0d injected faults=%0d", instr, phases, r_clears, faults);
    $display("INVAR_512_1K_R10M: faults flagged %0d (%0d%%), false flushes %0d (%0d.%03d per 1000 instructions)",
             r_caught, r_caught * 100 / faults, r_false, r_false * 1000 / instr, (r_false * 1000000 / instr) % 1000);
    $display("INVAR_512_1K     : faults flagged %0d (%0d%%), false flushes %0d (%0d.%03d per 1000 instructions)",
             n_caught, n_caught * 100 / faults, n_false, n_false * 1000 / instr, (n_false * 1000000 / instr) % 1000);
    check(faults > 0, "faults were injected");
    check(r_clears == instr / RESET_INTERVAL_DEF, "number of clears");
    check(r_caught > n_caught, "resetting screener flags more injected faults");
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
