// blake2b_round: one round of BLAKE2b cryptographic mixing, combinational.
//
// A round applies G eight times to the 16-word work vector: first to the
// four columns (0,4,8,12) (1,5,9,13) (2,6,10,14) (3,7,11,15), then to the
// four diagonals (0,5,10,15) (1,6,11,12) (2,7,8,13) (3,4,9,14). The k-th
// G call takes message words m[SIGMA[r][2k]] and m[SIGMA[r][2k+1]], where
// r = round_idx mod 10. Round structure and SIGMA follow the BLAKE2b
// specification. No clock; v_out is valid in the same cycle as v_in.
module blake2b_round
  import blake2b_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic [3:0]   round_idx,
  input  logic [W-1:0] v_in  [16],
  input  logic [W-1:0] m     [16],
  output logic [W-1:0] v_out [16]
);

  // Work-vector indices a,b,c,d of the eight G calls
  localparam int unsigned GA [8] = '{0, 1, 2,  3, 0, 1,  2,  3};
  localparam int unsigned GB [8] = '{4, 5, 6,  7, 5, 6,  7,  4};
  localparam int unsigned GC [8] = '{8, 9, 10, 11, 10, 11, 8, 9};
  localparam int unsigned GD [8] = '{12, 13, 14, 15, 15, 12, 13, 14};

  logic [3:0]   srow;
  logic [W-1:0] v_mid [16];
  logic [W-1:0] gx [8];
  logic [W-1:0] gy [8];

  always_comb begin
    srow = (round_idx >= 4'd10) ? round_idx - 4'd10 : round_idx;
    for (int k = 0; k < 8; k++) begin
      gx[k] = m[sigma(srow, 2*k)];
      gy[k] = m[sigma(srow, 2*k+1)];
    end
  end

  // Column step: v_in -> v_mid
  logic [W-1:0] ca [4], cb [4], cc [4], cd [4];
  for (genvar k = 0; k < 4; k++) begin : g_col
    blake2b_g #(.W(W)) u_g (
      .a_i(v_in[GA[k]]), .b_i(v_in[GB[k]]), .c_i(v_in[GC[k]]), .d_i(v_in[GD[k]]),
      .x(gx[k]), .y(gy[k]),
      .a_o(ca[k]), .b_o(cb[k]), .c_o(cc[k]), .d_o(cd[k])
    );
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      v_mid[GA[k]] = ca[k];
      v_mid[GB[k]] = cb[k];
      v_mid[GC[k]] = cc[k];
      v_mid[GD[k]] = cd[k];
    end
  end

  // Diagonal step: v_mid -> v_out
  logic [W-1:0] da [4], db [4], dc [4], dd [4];
  for (genvar k = 0; k < 4; k++) begin : g_diag
    blake2b_g #(.W(W)) u_g (
      .a_i(v_mid[GA[k+4]]), .b_i(v_mid[GB[k+4]]), .c_i(v_mid[GC[k+4]]), .d_i(v_mid[GD[k+4]]),
      .x(gx[k+4]), .y(gy[k+4]),
      .a_o(da[k]), .b_o(db[k]), .c_o(dc[k]), .d_o(dd[k])
    );
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      v_out[GA[k+4]] = da[k];
      v_out[GB[k+4]] = db[k];
      v_out[GC[k+4]] = dc[k];
      v_out[GD[k+4]] = dd[k];
    end
  end

endmodule
