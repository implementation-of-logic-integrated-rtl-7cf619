// Feeds digit pulses to the entry register and compares the stored number
// and the display write with a reference that fills positions left to
// right and wraps after four; pulses under hold must change nothing.
module tb_digit_entry;
  import ictester_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0, digit_valid = 0;
  nibble_t digit_code = '0;
  nibble_t digits [4];
  logic wr_en;
  logic [1:0] wr_pos;
  nibble_t wr_code;
  nibble_t ref_d [4] = '{default: '0};
  int ref_pos = 0, n_wrap = 0, n_hold = 0;

  digit_entry dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic key(nibble_t c, bit h);
    int p = ref_pos;
    @(negedge clk);
    digit_valid = 1; digit_code = c; hold = h;
    @(negedge clk);
    digit_valid = 0; hold = 0;
    if (!h) begin
      ref_d[p] = c;
      ref_pos = (p + 1) % 4;
      if (ref_pos == 0) n_wrap++;
      check(wr_en && wr_pos == 2'(p) && wr_code == c, $sformatf("write of %h at %0d", c, p));
    end else begin
      n_hold++;
      check(!wr_en, "no write while hold");
    end
    for (int i = 0; i < 4; i++)
      check(digits[i] == ref_d[i], $sformatf("digit %0d = %h, expected %h", i, digits[i], ref_d[i]));
    @(negedge clk);
    check(!wr_en, "write strobe lasts one clock");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 4; i++) check(digits[i] == 0, "cleared by reset");
    key(4'h7, 0); key(4'h4, 0); key(4'h0, 0); key(4'h8, 0);
    for (int i = 0; i < 60; i++) key(nibble_t'($urandom_range(0, 14)), ($urandom_range(0, 4) == 0));
    check(n_wrap >= 3 && n_hold >= 1, "wrap and hold exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
