// pcsa: carry-save adder with pipelined input, temporally staged.
//
// The imperative reference adder keeps its operands and the pairwise ANDs
// in a six-register file (RA, RB, RC, A_and_B, A_and_C, B_and_C). This
// machine performs the same register operations, one per clock edge, in a
// ten-edge loop:
//   edge k     RA := in_data (a)          edge k+5   B_and_C := RB & RC
//   edge k+1   RB := in_data (b)          edge k+6   tmp1 := (A_and_B | A_and_C | B_and_C) << 1
//   edge k+2   RC := in_data (c)          edge k+7   tmp2 := RA ^ RB ^ RC
//   edge k+3   A_and_B := RA & RB         edge k+8   output Val(tmp1, tmp2)
//   edge k+4   A_and_C := RA & RC         edge k+9   output DC, input ignored
// and takes the next a at edge k+10. Every edge but k+8 outputs DC; inputs
// on edges k+3..k+9 are ignored. The output is registered (out_val = 1 for
// the one cycle after edge k+8, data held until the next Val). ready is
// high in the state whose edge takes operand a. The schedule of register
// operations and the ten-transition loop follow the staged design; reset
// and the output encoding are this design's own.
module pcsa #(
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

  typedef enum logic [3:0] {
    ST_SET_RA, ST_SET_RB, ST_SET_RC,
    ST_A_AND_B, ST_A_AND_C, ST_B_AND_C,
    ST_TMP1, ST_TMP2, ST_VAL, ST_DC
  } state_e;

  state_e       state;
  // register file of the reference algorithm
  logic [W-1:0] ra, rb, rc, a_and_b, a_and_c, b_and_c;
  // values carried from one stage to a later one
  logic [W-1:0] tmp1, tmp2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_SET_RA;
      ra        <= '0;
      rb        <= '0;
      rc        <= '0;
      a_and_b   <= '0;
      a_and_c   <= '0;
      b_and_c   <= '0;
      tmp1      <= '0;
      tmp2      <= '0;
      out_val   <= 1'b0;
      out_carry <= '0;
      out_sum   <= '0;
    end else begin
      out_val <= 1'b0;
      unique case (state)
        ST_SET_RA:  begin ra      <= in_data;                        state <= ST_SET_RB;  end
        ST_SET_RB:  begin rb      <= in_data;                        state <= ST_SET_RC;  end
        ST_SET_RC:  begin rc      <= in_data;                        state <= ST_A_AND_B; end
        ST_A_AND_B: begin a_and_b <= ra & rb;                        state <= ST_A_AND_C; end
        ST_A_AND_C: begin a_and_c <= ra & rc;                        state <= ST_B_AND_C; end
        ST_B_AND_C: begin b_and_c <= rb & rc;                        state <= ST_TMP1;    end
        ST_TMP1:    begin tmp1    <= (a_and_b | a_and_c | b_and_c) << 1; state <= ST_TMP2; end
        ST_TMP2:    begin tmp2    <= (ra ^ rb) ^ rc;                 state <= ST_VAL;     end
        ST_VAL: begin
          out_val   <= 1'b1;
          out_carry <= tmp1;
          out_sum   <= tmp2;
          state     <= ST_DC;
        end
        ST_DC:   state <= ST_SET_RA;
        default: state <= ST_SET_RA;
      endcase
    end
  end

  assign ready = (state == ST_SET_RA);

endmodule
