// acsa: carry-save adder with asynchronous input, temporally staged.
//
// Operands arrive as commands, in any order and with any gaps, one per
// clock edge (csa_pkg::acsa_cmd_e):
//   CMD_A w / CMD_B w / CMD_C w   RA / RB / RC := in_data, output DC
//   CMD_NOP                       nothing, output DC
//   CMD_GO                        start the staged computation
// Once GO is taken at edge e, the machine ignores its input for five more
// edges while it works through the reference register operations:
//   edge e     A_and_B := RA & RB       edge e+3   tmp1 := (A_and_B | A_and_C | B_and_C) << 1
//   edge e+1   A_and_C := RA & RC       edge e+4   tmp2 := RA ^ RB ^ RC
//   edge e+2   B_and_C := RB & RC       edge e+5   output Val(tmp1, tmp2)
// and takes the next command at edge e+6. Operands stay in RA/RB/RC, so
// GO may be repeated or only some operands replaced. The output is
// registered; busy is high while commands are ignored. The command set and
// the staging schedule follow the design; the tag encoding, reset and
// output encoding are this design's own.
module acsa
  import csa_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  acsa_cmd_e    in_cmd,
  input  logic [W-1:0] in_data,
  output logic         out_val,
  output logic [W-1:0] out_carry,
  output logic [W-1:0] out_sum,
  output logic         busy
);

  typedef enum logic [2:0] {
    ST_START, ST_A_AND_C, ST_B_AND_C, ST_TMP1, ST_TMP2, ST_VAL
  } state_e;

  state_e       state;
  logic [W-1:0] ra, rb, rc, a_and_b, a_and_c, b_and_c;
  logic [W-1:0] tmp1, tmp2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_START;
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
        ST_START: begin
          case (in_cmd)
            CMD_A: ra <= in_data;
            CMD_B: rb <= in_data;
            CMD_C: rc <= in_data;
            CMD_GO: begin
              a_and_b <= ra & rb;
              state   <= ST_A_AND_C;
            end
            default: ;  // CMD_NOP and unused codes
          endcase
        end
        ST_A_AND_C: begin a_and_c <= ra & rc;                            state <= ST_B_AND_C; end
        ST_B_AND_C: begin b_and_c <= rb & rc;                            state <= ST_TMP1;    end
        ST_TMP1:    begin tmp1    <= (a_and_b | a_and_c | b_and_c) << 1; state <= ST_TMP2;    end
        ST_TMP2:    begin tmp2    <= (ra ^ rb) ^ rc;                     state <= ST_VAL;     end
        ST_VAL: begin
          out_val   <= 1'b1;
          out_carry <= tmp1;
          out_sum   <= tmp2;
          state     <= ST_START;
        end
        default: state <= ST_START;
      endcase
    end
  end

  assign busy = (state != ST_START);

  // Only the five commands of the input type are defined
  a_cmd_known: assert property (@(posedge clk)
    (state == ST_START) |-> in_cmd inside {CMD_A, CMD_B, CMD_C, CMD_NOP, CMD_GO})
    else $error("undefined acsa command %0d", in_cmd);

endmodule
