// Behavioural model of a quad 2-input gate chip in the test socket
// (74x00 NAND, 74x08 AND, 74x32 OR or 74x86 XOR), for testbenches only.
// The chip type is an input so a test can insert the wrong part; stuck_en
// and stuck_val force single gate outputs to a constant to model a damaged
// gate. Outputs follow the inputs after DELAY_NS.
module ttl_quad_gate
  import ictester_pkg::*;
#(
  parameter int DELAY_NS = 15
) (
  input  ic_type_e   kind,
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] stuck_en,
  input  logic [3:0] stuck_val,
  output logic [3:0] y
);
  logic [3:0] f;
  always_comb begin
    for (int g = 0; g < 4; g++) begin
      unique case (kind)
        IC_7400: f[g] = ~(a[g] & b[g]);
        IC_7408: f[g] = a[g] & b[g];
        IC_7432: f[g] = a[g] | b[g];
        IC_7486: f[g] = a[g] ^ b[g];
        default: f[g] = 1'b0;          // empty socket
      endcase
      if (stuck_en[g]) f[g] = stuck_val[g];
    end
  end
  always @(f) y <= #(DELAY_NS * 1ns) f;
endmodule
