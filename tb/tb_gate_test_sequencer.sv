// Runs the gate test against a model chip: each of the four types with the
// right chip must pass, with a chip of another type or a stuck gate output
// it must fail. Also checks the drive patterns and their order, the hold
// time per pattern, the exact test duration, and that the drive lines are
// low between tests.
module tb_gate_test_sequencer;
  import ictester_pkg::*;
  localparam int unsigned S = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  ic_type_e ic_type = IC_NONE, chip = IC_NONE;
  logic [3:0] gate_a, gate_b, gate_y, stuck_en = '0, stuck_val = '0;
  logic busy, done, pass;
  int cyc = 0;
  int n_pass = 0, n_fail = 0, n_wrong_chip = 0, n_stuck = 0, n_ignored = 0;

  gate_test_sequencer #(.SETTLE_CYCLES(S)) dut (.*);
  ttl_quad_gate #(.DELAY_NS(12)) u_chip (
    .kind(chip), .a(gate_a), .b(gate_b), .stuck_en, .stuck_val, .y(gate_y));

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  // Pattern log: the (A,B) values seen on each clock while busy.
  logic [1:0] seen [$];
  always @(negedge clk) if (busy) begin
    seen.push_back({gate_b[0], gate_a[0]});
    if (gate_a != {4{gate_a[0]}} || gate_b != {4{gate_b[0]}}) begin
      failures++; $display("gates not driven alike: a=%b b=%b", gate_a, gate_b);
    end
  end else if (gate_a != 0 || gate_b != 0) begin
    failures++; $display("drive lines not low when idle");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // First pattern number (0..3) on which the chip disagrees with the type
  // under test, or 4 if none.
  function automatic int first_bad(ic_type_e want, ic_type_e have, logic [3:0] sen, logic [3:0] sval);
    for (int v = 0; v < 4; v++) begin
      logic a = v[0], b = v[1], e, g;
      case (want)
        IC_7400: e = !(a && b);
        IC_7408: e = a && b;
        IC_7432: e = a || b;
        default: e = a != b;
      endcase
      case (have)
        IC_7400: g = !(a && b);
        IC_7408: g = a && b;
        IC_7432: g = a || b;
        IC_7486: g = a != b;
        default: g = 0;
      endcase
      for (int i = 0; i < 4; i++)
        if ((sen[i] ? sval[i] : g) != e) return v;
    end
    return 4;
  endfunction

  task automatic run(ic_type_e want, ic_type_e have, logic [3:0] sen, logic [3:0] sval);
    int t0, bad, exp_len;
    chip = have; stuck_en = sen; stuck_val = sval;
    seen.delete();
    @(negedge clk);
    ic_type = want; start = 1;
    t0 = cyc + 1;               // the edge that sees start
    @(negedge clk);
    start = 0; ic_type = IC_NONE;
    while (!done) @(negedge clk);
    bad = first_bad(want, have, sen, sval);
    exp_len = (bad == 4) ? 4 * S + 1 : (bad + 1) * S + 1;
    check(cyc - t0 == exp_len, $sformatf("%s: took %0d clocks, expected %0d", want.name(), cyc - t0, exp_len));
    check(pass == (bad == 4), $sformatf("%s on %s stuck %b/%b: pass=%0b", want.name(), have.name(), sen, sval, pass));
    // Each pattern held S clocks, in order 00,10,01,11 written as (A,B).
    for (int v = 0; v < ((bad == 4) ? 4 : bad + 1); v++)
      for (int c = 0; c < S; c++)
        check(seen[v * S + c] == 2'(v), $sformatf("pattern %0d clock %0d = %b", v, c, seen[v * S + c]));
    if (bad == 4) n_pass++; else n_fail++;
    if (bad != 4 && sen == 0) n_wrong_chip++;
    if (sen != 0) n_stuck++;
    repeat (2) @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    ic_type_e types [4] = '{IC_7400, IC_7408, IC_7432, IC_7486};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Unknown number: start is ignored.
    @(negedge clk); start = 1; ic_type = IC_NONE;
    @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    check(!busy && !done, "no test for an unknown number");
    n_ignored++;
    foreach (types[i]) run(types[i], types[i], '0, '0);
    foreach (types[i]) foreach (types[j]) if (i != j) run(types[i], types[j], '0, '0);
    foreach (types[i]) run(types[i], IC_NONE, '0, '0);
    for (int n = 0; n < 40; n++) begin
      logic [3:0] sen = 4'(1 << $urandom_range(0, 3));
      run(types[$urandom_range(0, 3)], types[$urandom_range(0, 3)], sen, 4'($urandom_range(0, 15)));
    end
    check(n_pass >= 4 && n_fail >= 12 && n_wrong_chip >= 12 && n_stuck >= 1 && n_ignored == 1,
          "every outcome seen");
    $display("runs: pass %0d fail %0d wrong chip %0d stuck %0d", n_pass, n_fail, n_wrong_chip, n_stuck);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
