// End-to-end test of the IC tester at its default parameters.
//
// A keypad-encoder model types part numbers and presses the start key; a
// model chip sits in the socket. The test follows the display digit by
// digit and checks the PASS/FAIL words and when they appear. It covers:
// every supported part passing, wrong parts and damaged gates failing,
// an unknown number (no test), more than four digits (entry wraps to the
// left), and keys pressed during a test (ignored). Each of these is
// counted and must happen at least once.
module tb_ictester;
  import ictester_pkg::*;
  localparam int unsigned S = 16;     // the top's default settle time
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, k = 0;
  nibble_t x = '0;
  seg7_t s0, s1, s2, s3;
  logic y0, y1, y2, y3, y4, y5, y6, y7, y8, y9, y10, y11;
  ic_type_e chip = IC_NONE;
  logic [3:0] stuck_en = '0, stuck_val = '0;
  int cyc = 0;

  ictester dut (.*);

  ttl_quad_gate u_chip (
    .kind(chip), .a({y9, y6, y3, y0}), .b({y10, y7, y4, y1}),
    .stuck_en, .stuck_val, .y({y11, y8, y5, y2}));

  always #7 clk = ~clk;
  always @(posedge clk) cyc++;

  // Counters of the mechanisms exercised.
  int n_digit = 0, n_wrap = 0, n_pass = 0, n_fail_wrong = 0, n_fail_stuck = 0;
  int n_unknown = 0, n_busy_key = 0;
  int n_type_pass [ic_type_e];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic seg7_t shape(nibble_t c);
    case (c)
      0: return 7'h7E; 1: return 7'h30; 2: return 7'h6D; 3: return 7'h79;
      4: return 7'h33; 5: return 7'h5B; 6: return 7'h5F; 7: return 7'h70;
      8: return 7'h7F; 9: return 7'h73; 10: return 7'h77; 11: return 7'h1F;
      12: return 7'h4E; 13: return 7'h3D; 14: return 7'h4F; default: return 7'h47;
    endcase
  endfunction
  localparam seg7_t WORD_PASS [4] = '{7'h67, 7'h77, 7'h5B, 7'h5B};
  localparam seg7_t WORD_FAIL [4] = '{7'h47, 7'h77, 7'h30, 7'h0E};

  // Reference state: what the display should show, entered digits, position.
  seg7_t   ref_s [4] = '{default: '0};
  nibble_t ref_d [4] = '{default: '0};
  int      ref_pos = 0;

  task automatic compare(string what);
    seg7_t got [4];
    got = '{s0, s1, s2, s3};
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (got[i] !== ref_s[i]) begin
        failures++;
        $display("FAIL @%0d: %s: digit %0d = %b, expected %b", cyc, what, i, got[i], ref_s[i]);
      end
    end
  endtask

  // Encoder model: code first, then DA for a few clocks, then a gap.
  int last_rise;
  task automatic key_strobe(nibble_t code, int hold);
    @(negedge clk) x = code;
    repeat (2) @(negedge clk);
    k = 1;
    last_rise = cyc;
    repeat (hold) @(negedge clk);
    k = 0;
    repeat (6) @(negedge clk);
  endtask

  task automatic type_digit(nibble_t c);
    key_strobe(c, 5);
    ref_d[ref_pos] = c;
    ref_s[ref_pos] = shape(c);
    ref_pos = (ref_pos + 1) % 4;
    if (ref_pos == 0) n_wrap++;
    n_digit++;
    compare($sformatf("after digit %h", c));
  endtask

  task automatic type_number(int num);
    type_digit(nibble_t'((num / 1000) % 10));
    type_digit(nibble_t'((num / 100) % 10));
    type_digit(nibble_t'((num / 10) % 10));
    type_digit(nibble_t'(num % 10));
  endtask

  function automatic ic_type_e ref_type();
    case ({ref_d[2], ref_d[3]})
      8'h00: return IC_7400;
      8'h08: return IC_7408;
      8'h32: return IC_7432;
      8'h86: return IC_7486;
      default: return IC_NONE;
    endcase
  endfunction

  function automatic logic eval(ic_type_e t, logic a, logic b);
    case (t)
      IC_7400: return !(a && b);
      IC_7408: return a && b;
      IC_7432: return a || b;
      IC_7486: return a != b;
      default: return 1'b0;
    endcase
  endfunction

  // Pattern (0..3) on which the socket first disagrees, 4 if never.
  function automatic int first_bad(ic_type_e want);
    for (int v = 0; v < 4; v++)
      for (int g = 0; g < 4; g++) begin
        logic got = stuck_en[g] ? stuck_val[g] : eval(chip, v[0], v[1]);
        if (got != eval(want, v[0], v[1])) return v;
      end
    return 4;
  endfunction

  // Press start and wait for the result; busy_key presses a digit key
  // while the test runs, which must be ignored.
  task automatic start_test(bit busy_key);
    ic_type_e want = ref_type();
    int bad, t_rise, t_show, exp;
    logic [27:0] prev_s;
    prev_s = {s0, s1, s2, s3};
    fork
      key_strobe(KEY_START, 3);
    join_none
    @(posedge k);
    t_rise = cyc;
    if (want == IC_NONE) begin
      repeat (4 * S + 20) begin
        @(negedge clk);
        check({y0, y1, y3, y4, y6, y7, y9, y10} == 0, "socket not driven for an unknown number");
      end
      compare("unknown number leaves the display");
      n_unknown++;
      return;
    end
    if (busy_key) begin
      repeat (12) @(negedge clk);
      key_strobe(4'h5, 3);
      key_strobe(KEY_START, 3);
      n_busy_key++;
    end
    bad = first_bad(want);
    t_show = -1;
    for (int i = 0; i < 4 * S + 40 && t_show < 0; i++) begin
      @(negedge clk);
      if ({s0, s1, s2, s3} != prev_s) t_show = cyc;
    end
    exp = ((bad == 4) ? 4 * S : (bad + 1) * S) + 6;
    check(t_show - t_rise == exp,
          $sformatf("result %0d clocks after start, expected %0d", t_show - t_rise, exp));
    ref_s = (bad == 4) ? WORD_PASS : WORD_FAIL;
    repeat (20) @(negedge clk);
    compare((bad == 4) ? "PASS" : "FAIL");
    if (bad == 4) begin n_pass++; n_type_pass[want]++; end
    else if (stuck_en != 0) n_fail_stuck++;
    else n_fail_wrong++;
  endtask

  initial begin
    int parts [4] = '{7400, 7408, 7432, 7486};
    ic_type_e kinds [4] = '{IC_7400, IC_7408, IC_7432, IC_7486};
    repeat (3) @(negedge clk);
    compare("reset");
    rst_n = 1;
    repeat (3) @(negedge clk);

    // The first test: a good 7408.
    chip = IC_7408;
    type_number(7408);
    start_test(0);

    // Every part, good.
    foreach (parts[i]) begin
      chip = kinds[i];
      type_number(parts[i]);
      start_test(i == 2);
    end

    // Wrong part in the socket.
    foreach (parts[i]) begin
      chip = kinds[(i + 1) % 4];
      type_number(parts[i]);
      start_test(0);
    end

    // A damaged gate on an otherwise right part.
    for (int n = 0; n < 8; n++) begin
      int i = $urandom_range(0, 3);
      chip = kinds[i];
      stuck_en = 4'(1 << $urandom_range(0, 3));
      stuck_val = 4'($urandom_range(0, 15));
      type_number(parts[i]);
      start_test(0);
    end
    stuck_en = '0;

    // Number the tester does not know.
    chip = IC_7408;
    type_number(7404);
    start_test(0);

    // Five digits: the fifth goes to the leftmost position; three more
    // bring the entry back in step.
    for (int i = 1; i <= 8; i++) type_digit(nibble_t'(i));
    chip = IC_7486;
    type_number(7486);
    start_test(1);

    check(n_digit >= 4 && n_wrap >= 2, "digit entry and wrap");
    check(n_pass >= 5, "passing tests");
    check(n_fail_wrong >= 1, "wrong part fails");
    check(n_fail_stuck >= 1, "damaged gate fails");
    check(n_unknown >= 1, "unknown number ignored");
    check(n_busy_key >= 1, "keys during a test ignored");
    foreach (kinds[i]) check(n_type_pass.exists(kinds[i]), $sformatf("%s passed", kinds[i].name()));
    $display("digits %0d wraps %0d pass %0d wrong-part %0d damaged %0d unknown %0d busy-keys %0d",
             n_digit, n_wrap, n_pass, n_fail_wrong, n_fail_stuck, n_unknown, n_busy_key);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
