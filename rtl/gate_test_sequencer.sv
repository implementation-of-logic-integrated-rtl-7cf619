// Functional test of a quad 2-input gate package.
//
// On start, the sequencer applies the four input combinations
// (A,B) = 00, 10, 01, 11 to all four gates of the socket at once. Each
// combination is held for SETTLE_CYCLES clocks so that the chip's outputs
// and the board wiring settle; in the last of those clocks the four gate
// outputs are sampled and compared with the truth table of the selected type
// (NAND, AND, OR or XOR). The first mismatch ends the test with FAIL; if all
// four combinations match, the result is PASS. Between tests every drive
// line is held at 0.
//
// Interface: start is a one-cycle request, ignored while busy or when
// ic_type is IC_NONE. gate_a[g]/gate_b[g] drive the inputs of gate g,
// gate_y[g] is its output (asynchronous to clk; sampled through two flops).
// done pulses for one cycle with pass valid in the same cycle.
// Timing: a passing test takes NVECTORS*SETTLE_CYCLES+1 clocks from the
// edge that sees start to the edge that raises done; a failure found on
// pattern v (0..3) takes (v+1)*SETTLE_CYCLES+1.
//
// The patterns, their order, the per-gate comparison and stopping at the
// first failure follow the tester. The settle time, the input synchroniser
// and the idle level of the drive lines are this design's own choices.
module gate_test_sequencer
  import ictester_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 16   // clocks each pattern is held, >= 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  ic_type_e          ic_type,
  output logic [NGATES-1:0] gate_a,
  output logic [NGATES-1:0] gate_b,
  input  logic [NGATES-1:0] gate_y,
  output logic              busy,
  output logic              done,
  output logic              pass
);

  localparam int unsigned CW = $clog2(SETTLE_CYCLES + 1);

  typedef enum logic [1:0] {S_IDLE, S_APPLY, S_DONE} state_e;

  state_e            state;
  vec_t              vec;
  logic [CW-1:0]     cnt;
  ic_type_e          ic_q;
  logic [NGATES-1:0] y_s1, y_s2;
  logic              fail_q;
  logic [NGATES-1:0] expect_y;

  // Outputs settle, then cross two synchroniser stages before sampling.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_s1 <= '0;
      y_s2 <= '0;
    end else begin
      y_s1 <= gate_y;
      y_s2 <= y_s1;
    end
  end

  always_comb begin
    for (int g = 0; g < NGATES; g++)
      expect_y[g] = gate_expect(ic_q, vec[0], vec[1]);
  end

  wire last_clk = (cnt == CW'(SETTLE_CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      vec    <= '0;
      cnt    <= '0;
      ic_q   <= IC_NONE;
      fail_q <= 1'b0;
      done   <= 1'b0;
      pass   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start && ic_type != IC_NONE) begin
            state  <= S_APPLY;
            ic_q   <= ic_type;
            vec    <= '0;
            cnt    <= '0;
            fail_q <= 1'b0;
          end
        end
        S_APPLY: begin
          if (!last_clk) begin
            cnt <= cnt + CW'(1);
          end else begin
            cnt <= '0;
            if (y_s2 != expect_y) begin
              fail_q <= 1'b1;
              state  <= S_DONE;
            end else if (vec == 2'(NVECTORS - 1)) begin
              state <= S_DONE;
            end else begin
              vec <= vec + 2'd1;
            end
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          pass  <= ~fail_q;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  always_comb begin
    for (int g = 0; g < NGATES; g++) begin
      gate_a[g] = (state == S_APPLY) && vec[0];
      gate_b[g] = (state == S_APPLY) && vec[1];
    end
  end

  initial assert (SETTLE_CYCLES >= 3)
    else $error("SETTLE_CYCLES must cover the two-flop output synchroniser");

endmodule
