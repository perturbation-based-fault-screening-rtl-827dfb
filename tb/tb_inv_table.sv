// Testbench of inv_table, the direct-mapped invariance screening table.
//
// Uses a small table (16 entries of 16 bits) so that index aliasing,
// back-to-back hits on one index (forwarding) and clears are frequent.
// Random requests and random clears are applied; a reference model that
// applies each request one cycle after it is presented (dropping its write
// when a clear is high in that cycle, then emptying the table) predicts
// every response, which must appear exactly two cycles after its request.
// A directed prologue checks first-use, value and delta warnings and the
// two-cycle latency on a single index. It also checks the bound that keeps
// flush-and-replay from looping: an entry raises at most 2*W warnings between
// two clears.
module tb_inv_table;

  localparam int unsigned N  = 16;
  localparam int unsigned W  = 16;
  localparam int unsigned PW = 12;
  localparam int unsigned TW = 6;
  localparam int unsigned NCYC = 60000;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          clear = 1'b0;
  logic          req_valid = 1'b0;
  logic [PW-1:0] req_pc = '0;
  logic [W-1:0]  req_value = '0;
  logic [TW-1:0] req_tag = '0;
  logic          rsp_valid;
  logic [TW-1:0] rsp_tag;
  logic          rsp_warn_value, rsp_warn_delta;

  inv_table #(.ENTRIES(N), .W(W), .PC_W(PW), .TAG_W(TW)) dut (
    .clk, .rst_n, .clear, .req_valid, .req_pc, .req_value, .req_tag,
    .rsp_valid, .rsp_tag, .rsp_warn_value, .rsp_warn_delta
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // reference entries
  bit          m_valid [N];
  bit          m_dvalid [N];
  logic [W-1:0] m_last [N], m_delta [N], m_vmask [N], m_dmask [N];

  // pending request and expected response
  bit           p_valid;
  int           p_idx;
  logic [W-1:0] p_value;
  logic [TW-1:0] p_tag;
  bit           e_valid, e_wv, e_wd;
  logic [TW-1:0] e_tag;
  int unsigned  n_wv, n_wd, n_fwd, n_clr, n_clr_fly;
  int           last_idx;
  int unsigned  warn_since_clear [N];   // warnings per entry since the last clear
  int unsigned  max_warn;

  // One cycle of the model: check outputs, apply pending request, clear,
  // then take this cycle's request.
  task automatic cycle_step(input bit v, input logic [PW-1:0] pc,
                            input logic [W-1:0] val, input bit clr);
    logic [W-1:0] d;
    bit wv, wd;
    @(negedge clk);
    check(rsp_valid == e_valid, "rsp_valid");
    if (e_valid) begin
      check(rsp_tag == e_tag, "rsp_tag");
      check(rsp_warn_value == e_wv, $sformatf("warn_value dut=%0d exp=%0d", rsp_warn_value, e_wv));
      check(rsp_warn_delta == e_wd, $sformatf("warn_delta dut=%0d exp=%0d", rsp_warn_delta, e_wd));
    end
    e_valid = p_valid; e_tag = p_tag; e_wv = 0; e_wd = 0;
    if (p_valid) begin
      wv = 0; wd = 0;
      if (m_valid[p_idx]) begin
        d = p_value - m_last[p_idx];
        for (int i = 0; i < W; i++) begin
          if (p_value[i] != m_last[p_idx][i] && !m_vmask[p_idx][i]) wv = 1;
          if (m_dvalid[p_idx] && d[i] != m_delta[p_idx][i] && !m_dmask[p_idx][i]) wd = 1;
        end
        if (!clr) begin
          m_vmask[p_idx] |= p_value ^ m_last[p_idx];
          if (m_dvalid[p_idx]) m_dmask[p_idx] |= d ^ m_delta[p_idx];
          m_delta[p_idx] = d; m_dvalid[p_idx] = 1; m_last[p_idx] = p_value;
        end
      end else if (!clr) begin
        m_valid[p_idx] = 1; m_dvalid[p_idx] = 0; m_last[p_idx] = p_value;
        m_vmask[p_idx] = 0; m_dmask[p_idx] = 0; m_delta[p_idx] = 0;
      end
      e_wv = wv; e_wd = wd;
      n_wv += wv; n_wd += wd;
      // every warning marks at least one more bit variant, so an entry can
      // warn at most 2*W times between two clears
      warn_since_clear[p_idx] += wv + wd;
      check(warn_since_clear[p_idx] <= 2 * W, "more than 2*W warnings from one entry");
      if (warn_since_clear[p_idx] > max_warn) max_warn = warn_since_clear[p_idx];
    end
    if (clr) begin
      n_clr++;
      if (p_valid || v) n_clr_fly++;
      for (int i = 0; i < N; i++) begin m_valid[i] = 0; warn_since_clear[i] = 0; end
    end
    if (v && p_valid && p_idx == int'(pc[3:0])) n_fwd++;
    p_valid = v; p_idx = int'(pc[3:0]); p_value = val; p_tag = TW'($urandom());
    req_valid = v; req_pc = pc; req_value = val; req_tag = p_tag; clear = clr;
  endtask

  initial begin
    int unsigned rsp_cycle, req_cycle;
    for (int i = 0; i < N; i++) begin m_valid[i] = 0; warn_since_clear[i] = 0; end
    max_warn = 0;
    p_valid = 0; e_valid = 0;
    {n_wv, n_wd, n_fwd, n_clr, n_clr_fly} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- directed: latency of a single request ----
    @(negedge clk);
    req_valid = 1; req_pc = 12'h3a5; req_value = 16'h0040; req_tag = 6'd9;
    @(negedge clk);
    req_valid = 0;
    req_cycle = 0; rsp_cycle = 0;
    while (!rsp_valid && rsp_cycle < 10) begin @(negedge clk); rsp_cycle++; end
    check(rsp_valid && rsp_tag == 6'd9 && rsp_cycle == 1, "response two cycles after the request");
    // the entry now holds 0x0040; present 0x0040, 0x0048, 0x0050, 0x0051
    m_valid[5] = 1; m_dvalid[5] = 0; m_last[5] = 16'h0040; m_vmask[5] = 0; m_dmask[5] = 0; m_delta[5] = 0;
    cycle_step(1, 12'h3a5, 16'h0048, 0);
    cycle_step(1, 12'h3a5, 16'h0050, 0);
    cycle_step(1, 12'h3a5, 16'h0058, 0);
    cycle_step(1, 12'h3a5, 16'h0059, 0);
    cycle_step(0, 0, 0, 0);
    check(e_wd == 1, "stride change gives a delta warning");
    cycle_step(0, 0, 0, 0);

    // ---- random ----
    for (cyc = 0; cyc < NCYC; cyc++) begin
      automatic bit v = ($urandom_range(0, 9) < 8);
      automatic logic [PW-1:0] pc = PW'($urandom());
      automatic logic [W-1:0] val;
      if ($urandom_range(0, 2) == 0) pc[3:0] = 4'(last_idx);
      case ($urandom_range(0, 3))
        0: val = W'(pc) << 2;
        1: val = W'($urandom_range(0, 7)) + (W'(pc[3:0]) << 8);
        2: val = W'(cyc) * W'(pc[1:0] + 1);
        default: val = W'($urandom());
      endcase
      if (v) last_idx = int'(pc[3:0]);
      cycle_step(v, pc, val, ($urandom_range(0, 499) == 0));
    end
    cycle_step(0, 0, 0, 0);
    cycle_step(0, 0, 0, 0);

    $display("most warnings from one entry between clears: %0d (bound %0d)", max_warn, 2 * W);
    $display("warn_value=%0d warn_delta=%0d forwarded=%0d clears=%0d clears_in_flight=%0d",
             n_wv, n_wd, n_fwd, n_clr, n_clr_fly);
    check(n_wv > 0 && n_wd > 0 && n_fwd > 0 && n_clr > 0 && n_clr_fly > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
