// Writes digits and results into the display controller and compares the
// four digit outputs with a reference display built from the letter and
// digit shapes spelled out here.
module tb_display_controller;
  import ictester_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0, result_valid = 0, pass = 0;
  logic [1:0] wr_pos = '0;
  nibble_t wr_code = '0;
  seg7_t s [4];
  seg7_t ref_s [4] = '{default: '0};

  display_controller dut (.*);

  // Shapes, {a,b,c,d,e,f,g}.
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

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (s[i] !== ref_s[i]) begin
        failures++;
        $display("%s: digit %0d = %b, expected %b", what, i, s[i], ref_s[i]);
      end
    end
  endtask

  task automatic write(int p, nibble_t c);
    @(negedge clk); wr_en = 1; wr_pos = 2'(p); wr_code = c;
    @(negedge clk); wr_en = 0;
    ref_s[p] = shape(c);
    compare($sformatf("write %h at %0d", c, p));
  endtask

  task automatic result(bit ok, bit with_write);
    @(negedge clk); result_valid = 1; pass = ok; wr_en = with_write; wr_pos = 2'd1; wr_code = 4'h3;
    @(negedge clk); result_valid = 0; wr_en = 0;
    ref_s = ok ? WORD_PASS : WORD_FAIL;
    compare(ok ? "PASS" : "FAIL");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    compare("reset");
    rst_n = 1;
    for (int c = 0; c < 16; c++) write(c % 4, nibble_t'(c));
    result(1, 0);
    write(0, 4'h7);
    result(0, 1);
    for (int i = 0; i < 40; i++) begin
      if ($urandom_range(0, 7) == 0) result($urandom_range(0, 1), $urandom_range(0, 1));
      else write($urandom_range(0, 3), nibble_t'($urandom_range(0, 15)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
