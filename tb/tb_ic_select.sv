// Exhaustive check of the part-number recognition over every pair of last
// two key codes, with random leading digits.
module tb_ic_select;
  import ictester_pkg::*;
  int checks = 0, failures = 0;
  nibble_t  digits [4];
  ic_type_e ic_type;

  ic_select dut (.digits, .ic_type);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d2 = 0; d2 < 16; d2++)
      for (int d3 = 0; d3 < 16; d3++) begin
        ic_type_e want;
        int num;
        digits[0] = nibble_t'($urandom_range(0, 15));
        digits[1] = nibble_t'($urandom_range(0, 15));
        digits[2] = nibble_t'(d2);
        digits[3] = nibble_t'(d3);
        #1;
        num  = (d2 < 10 && d3 < 10) ? d2 * 10 + d3 : -1;
        want = (num == 0)  ? IC_7400 :
               (num == 8)  ? IC_7408 :
               (num == 32) ? IC_7432 :
               (num == 86) ? IC_7486 : IC_NONE;
        checks++;
        if (ic_type !== want) begin
          failures++;
          $display("digits ..%0d%0d: got %s, expected %s", d2, d3, ic_type.name(), want.name());
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
