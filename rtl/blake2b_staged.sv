// blake2b_staged: BLAKE2b compression function F as a staged Mealy machine.
//
// The device holds the register file of the BLAKE2b reference algorithm:
// the work vector v[0..15], the message block m[0..15] and the hash state
// h[0..7], all 64-bit words. Each clock edge consumes one W64x4 input
// (a command tag, a group index and four 64-bit words) and registers one
// output, which is either DC (out_val = 0) or Val with the eight-word hash
// state h[0..7] (out_val = 1).
//
// In the start state the device takes commands in any order:
//   B2_NOP            nothing happens
//   B2_LOAD_M idx     m[4*idx .. 4*idx+3] := data[0..3]
//   B2_LOAD_H idx     h[4*idx .. 4*idx+3] := data[0..3]   (idx 0 or 1)
//   B2_GO             compress with t = {data[1], data[0]}, f = data[2][0]
// GO starts the staged form of F; every stage takes one clock edge and
// ignores the input of the edges after GO:
//   edge e      init:  v[0..7] := h, v[8..15] := IV, v[12] ^= t[63:0],
//                      v[13] ^= t[127:64], and if f then v[14] := ~v[14]
//   edge e+1    cryptographic mixing: ROUNDS rounds of eight G calls
//               (ROUNDS_PER_STAGE rounds per edge; with the default the
//               whole mixing is one stage)
//   edge e+2    xor two halves: h[i] ^= v[i] ^ v[i+8]
//   edge e+3    out_val = 1, out_h = h (Val)
//   edge e+4    back in the start state, this edge's command is taken
// The three-stage split of F and the register file follow the staged
// algorithm of the design; the command encoding, the carrying of t and f
// on GO, the final Val transition and the reset are this design's own.
// The hash state persists across GO commands, so a message of several
// blocks is hashed by loading each block and issuing GO; the host loads the
// initial h (IV xor parameter block) and pads the last block.
module blake2b_staged
  import blake2b_pkg::*;
#(
  parameter int unsigned ROUNDS           = 12,
  parameter int unsigned ROUNDS_PER_STAGE = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  b2_cmd_e     in_cmd,
  input  logic [1:0]  in_idx,
  input  word_t       in_data [4],
  output logic        out_val,
  output word_t       out_h   [8],
  output logic        busy
);

  localparam int unsigned MIX_STAGES = ROUNDS / ROUNDS_PER_STAGE;

  typedef enum logic [1:0] {
    ST_START,  // dispatch commands
    ST_MIX,    // cryptographic mixing
    ST_XOR,    // xor two halves into h
    ST_VAL     // signal Val h
  } state_e;

  state_e     state;
  logic [3:0] rnd;     // first round of the current mixing stage
  word_t      v [16];
  word_t      m [16];
  word_t      h [8];

  // Mixing datapath: ROUNDS_PER_STAGE rounds chained combinationally
  for (genvar j = 0; j < ROUNDS_PER_STAGE; j++) begin : g_round
    logic [3:0] ridx;
    word_t      vi [16];
    word_t      vo [16];
    assign ridx = rnd + 4'(j);
    if (j == 0) begin : g_first
      assign vi = v;
    end else begin : g_next
      assign vi = g_round[j-1].vo;
    end
    blake2b_round #(.W(WORD)) u_round (
      .round_idx(ridx),
      .v_in     (vi),
      .m        (m),
      .v_out    (vo)
    );
  end

  word_t v_mixed [16];
  assign v_mixed = g_round[ROUNDS_PER_STAGE-1].vo;

  // Work vector after the init stage, from the GO command's t and f
  word_t v_init [16];
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      v_init[i]   = h[i];
      v_init[i+8] = iv(i);
    end
    v_init[12] = iv(4) ^ in_data[0];
    v_init[13] = iv(5) ^ in_data[1];
    if (in_data[2][0]) v_init[14] = ~iv(6);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_START;
      rnd     <= '0;
      out_val <= 1'b0;
      for (int i = 0; i < 16; i++) begin
        v[i] <= '0;
        m[i] <= '0;
      end
      for (int i = 0; i < 8; i++) begin
        h[i]     <= '0;
        out_h[i] <= '0;
      end
    end else begin
      out_val <= 1'b0;
      unique case (state)
        ST_START: begin
          case (in_cmd)
            B2_LOAD_M:
              for (int k = 0; k < 4; k++) m[4*in_idx+k] <= in_data[k];
            B2_LOAD_H:
              for (int k = 0; k < 4; k++) h[4*in_idx[0]+k] <= in_data[k];
            B2_GO: begin
              v     <= v_init;
              rnd   <= '0;
              state <= ST_MIX;
            end
            default: ;
          endcase
        end
        ST_MIX: begin
          v   <= v_mixed;
          rnd <= rnd + 4'(ROUNDS_PER_STAGE);
          if (32'(rnd) + ROUNDS_PER_STAGE >= ROUNDS) state <= ST_XOR;
        end
        ST_XOR: begin
          for (int i = 0; i < 8; i++) h[i] <= h[i] ^ v[i] ^ v[i+8];
          state <= ST_VAL;
        end
        ST_VAL: begin
          out_val <= 1'b1;
          out_h   <= h;
          state   <= ST_START;
        end
        default: state <= ST_START;
      endcase
    end
  end

  assign busy = (state != ST_START);

  // The mixing stage must cover the rounds exactly
  initial begin
    assert (ROUNDS % ROUNDS_PER_STAGE == 0 && ROUNDS <= 12 && MIX_STAGES >= 1)
      else $error("ROUNDS must be a multiple of ROUNDS_PER_STAGE and at most 12");
  end

  // Load of h uses only groups 0 and 1
  a_load_h_idx: assert property (@(posedge clk)
    (state == ST_START && in_cmd == B2_LOAD_H) |-> in_idx < 2'd2)
    else $error("LOAD_H index out of range");

endmodule
