// Checks the hex to seven-segment decoder against a reference built from
// which codes light each segment.
module tb_seg7_decoder;
  import ictester_pkg::*;
  int checks = 0, failures = 0;
  nibble_t code;
  seg7_t   seg;

  seg7_decoder dut (.code, .seg);

  // Bit c of each mask: segment lit for code c.
  localparam logic [15:0] ON_A = 16'b1101_0111_1110_1101;
  localparam logic [15:0] ON_B = 16'b0010_0111_1001_1111;
  localparam logic [15:0] ON_C = 16'b0010_1111_1111_1011;
  localparam logic [15:0] ON_D = 16'b0111_1001_0110_1101;
  localparam logic [15:0] ON_E = 16'b1111_1101_0100_0101;
  localparam logic [15:0] ON_F = 16'b1101_1111_0111_0001;
  localparam logic [15:0] ON_G = 16'b1110_1111_0111_1100;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      seg7_t want;
      code = nibble_t'(c);
      #1;
      want = {ON_A[c], ON_B[c], ON_C[c], ON_D[c], ON_E[c], ON_F[c], ON_G[c]};
      checks++;
      if (seg !== want) begin
        failures++;
        $display("code %h: seg %b, expected %b", code, seg, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
