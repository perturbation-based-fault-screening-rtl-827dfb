// Testbench of inv_check, the invariance check/update of one entry.
//
// Instantiates a 32-bit and a 64-bit unit. Directed cases: the first and
// second results of an instruction (no warnings, delta reference taken), a
// value that leaves the established range (the 0..16 then 50 example), a
// constant stride (no delta warning) and a stride change (delta warning).
// Random cases compare every output with a bit-by-bit reference computed in
// the testbench.
module tb_inv_check;

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // 32-bit unit
  logic        ev;
  logic [31:0] il, id, ivm, idm, v;
  logic        idv;
  logic [31:0] ol, od, ovm, odm;
  logic        odv, wv, wd;

  inv_check #(.W(32)) u32 (
    .entry_valid(ev), .in_last(il), .in_delta(id), .in_vmask(ivm), .in_dmask(idm),
    .in_dvalid(idv), .value(v), .out_last(ol), .out_delta(od), .out_vmask(ovm),
    .out_dmask(odm), .out_dvalid(odv), .warn_value(wv), .warn_delta(wd)
  );

  // 64-bit unit
  logic        ev6;
  logic [63:0] il6, id6, ivm6, idm6, v6;
  logic        idv6;
  logic [63:0] ol6, od6, ovm6, odm6;
  logic        odv6, wv6, wd6;

  inv_check #(.W(64)) u64 (
    .entry_valid(ev6), .in_last(il6), .in_delta(id6), .in_vmask(ivm6), .in_dmask(idm6),
    .in_dvalid(idv6), .value(v6), .out_last(ol6), .out_delta(od6), .out_vmask(ovm6),
    .out_dmask(odm6), .out_dvalid(odv6), .warn_value(wv6), .warn_delta(wd6)
  );

  // Bit-level reference for a W-bit entry (W <= 64).
  task automatic ref_model(input int w, input bit e_v, input logic [63:0] last, delta,
                           vmask, dmask, input bit dvalid, input logic [63:0] val,
                           output logic [63:0] r_last, r_delta, r_vmask, r_dmask,
                           output bit r_dvalid, r_wv, r_wd);
    logic [63:0] d;
    logic [63:0] m;
    m = (w == 64) ? '1 : ((64'd1 << w) - 1);
    r_wv = 0; r_wd = 0;
    r_last = val & m;
    if (!e_v) begin
      r_delta = 0; r_vmask = 0; r_dmask = 0; r_dvalid = 0;
      return;
    end
    d = (val - last) & m;
    r_vmask = vmask; r_dmask = dmask;
    for (int i = 0; i < w; i++) begin
      if (val[i] !== last[i] && !vmask[i]) begin r_wv = 1; r_vmask[i] = 1; end
      if (dvalid && d[i] !== delta[i] && !dmask[i]) begin r_wd = 1; r_dmask[i] = 1; end
    end
    r_delta = d; r_dvalid = 1;
  endtask

  // Holds a 32-bit entry through a sequence of results.
  logic [31:0] s_last, s_delta, s_vmask, s_dmask;
  logic        s_valid, s_dvalid;

  task automatic step32(input logic [31:0] val, output bit warn_v, output bit warn_d);
    ev = s_valid; il = s_last; id = s_delta; ivm = s_vmask; idm = s_dmask; idv = s_dvalid;
    v = val;
    #1;
    warn_v = wv; warn_d = wd;
    s_valid = 1; s_last = ol; s_delta = od; s_vmask = ovm; s_dmask = odm; s_dvalid = odv;
  endtask

  initial begin
    bit a, b;
    logic [63:0] r_last, r_delta, r_vmask, r_dmask;
    bit r_dvalid, r_wv, r_wd;

    // ---- directed: range 0..16 then 50 ----
    s_valid = 0; s_last = 0; s_delta = 0; s_vmask = 0; s_dmask = 0; s_dvalid = 0;
    step32(32'd3, a, b);   check(!a && !b && !s_dvalid, "first result flags nothing");
    step32(32'd3, a, b);   check(!a && !b && s_dvalid && s_delta == 0, "second result: delta reference");
    for (int i = 0; i <= 16; i++) step32(32'(i), a, b);
    check(s_vmask == 32'h1f, "values 0..16 make bits 0..4 variant");
    step32(32'd5, a, b);   check(!a, "value inside the established bits accepted");
    step32(32'd50, a, b);  check(a, "value 50 flags a value perturbation (bit 5)");
    check(s_vmask == 32'h3f, "bit 5 now variant");
    step32(32'd50, a, b);  check(!a, "repeated value accepted");

    // ---- directed: constant stride then stride change ----
    s_valid = 0;
    step32(32'h1000, a, b);
    step32(32'h1008, a, b); check(!b, "first delta sets the reference");
    step32(32'h1010, a, b); check(!b && s_dmask == 0, "same stride: no delta change");
    step32(32'h1018, a, b); check(!b, "same stride again");
    step32(32'h1019, a, b); check(b, "stride change flags a delta perturbation");
    check(s_delta == 32'd1, "delta recorded");
    check(s_last == 32'h1019, "last value recorded");

    // ---- random, 32 and 64 bit ----
    for (int n = 0; n < 20000; n++) begin
      ev  = ($urandom_range(0, 7) != 0);
      idv = ($urandom_range(0, 3) != 0);
      il  = $urandom(); id = $urandom();
      ivm = $urandom() & $urandom(); idm = $urandom() & $urandom();
      v   = ($urandom_range(0, 1) != 0) ? (il ^ (32'd1 << $urandom_range(0, 31))) : $urandom();
      ev6  = ($urandom_range(0, 7) != 0);
      idv6 = ($urandom_range(0, 3) != 0);
      il6  = {$urandom(), $urandom()}; id6 = {$urandom(), $urandom()};
      ivm6 = {$urandom(), $urandom()} & {$urandom(), $urandom()};
      idm6 = {$urandom(), $urandom()} | {$urandom(), $urandom()};
      v6   = ($urandom_range(0, 1) != 0) ? (il6 + 64'($urandom_range(0, 9))) : {$urandom(), $urandom()};
      #1;
      ref_model(32, ev, 64'(il), 64'(id), 64'(ivm), 64'(idm), idv, 64'(v),
                r_last, r_delta, r_vmask, r_dmask, r_dvalid, r_wv, r_wd);
      check(ol == r_last[31:0] && od == r_delta[31:0] && ovm == r_vmask[31:0] &&
            odm == r_dmask[31:0] && odv == r_dvalid && wv == r_wv && wd == r_wd,
            $sformatf("random 32-bit case %0d", n));
      ref_model(64, ev6, il6, id6, ivm6, idm6, idv6, v6,
                r_last, r_delta, r_vmask, r_dmask, r_dvalid, r_wv, r_wd);
      check(ol6 == r_last && od6 == r_delta && ovm6 == r_vmask &&
            odm6 == r_dmask && odv6 == r_dvalid && wv6 == r_wv && wd6 == r_wd,
            $sformatf("random 64-bit case %0d", n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
