// csa: simple carry-save adder as a four-state Mealy machine.
//
// The machine takes its three operands on three successive clock edges
// and answers on the third:
//   edge k     in_data = a, output DC       (a stored)
//   edge k+1   in_data = b, output DC       (b stored)
//   edge k+2   in_data = c, output Val(purecsa a b c)
//   edge k+3   input ignored, output DC
//   edge k+4   next a
// The output is registered: out_val/out_carry/out_sum change on the edge
// that produces them and hold until the next edge. DC is out_val = 0 with
// the data bits keeping their last value. ready is high in the state
// whose edge takes operand a. The four-transition loop follows the
// machine's specification; reset and the output encoding are this
// design's own.
module csa #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_data,
  output logic         out_val,
  output logic [W-1:0] out_carry,
  output logic [W-1:0] out_sum,
  output logic         ready
);

  typedef enum logic [1:0] {
    ST_A,    // waiting for a
    ST_B,    // waiting for b
    ST_C,    // waiting for c, answer on this edge
    ST_IGN   // input ignored
  } state_e;

  state_e       state;
  logic [W-1:0] ra, rb;
  logic [W-1:0] carry_c, sum_c;

  purecsa #(.W(W)) u_purecsa (
    .a    (ra),
    .b    (rb),
    .c    (in_data),
    .carry(carry_c),
    .sum  (sum_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_A;
      ra        <= '0;
      rb        <= '0;
      out_val   <= 1'b0;
      out_carry <= '0;
      out_sum   <= '0;
    end else begin
      out_val <= 1'b0;
      unique case (state)
        ST_A: begin
          ra    <= in_data;
          state <= ST_B;
        end
        ST_B: begin
          rb    <= in_data;
          state <= ST_C;
        end
        ST_C: begin
          out_val   <= 1'b1;
          out_carry <= carry_c;
          out_sum   <= sum_c;
          state     <= ST_IGN;
        end
        ST_IGN:  state <= ST_A;
        default: state <= ST_A;
      endcase
    end
  end

  assign ready = (state == ST_A);

endmodule
