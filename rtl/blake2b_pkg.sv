// blake2b_pkg: constants and types shared by the BLAKE2b compression device.
//
// Holds the BLAKE2b initialisation vector, the SIGMA message schedule and
// the device's command encoding. IV and SIGMA are the published BLAKE2b
// constants (RFC 7693); the command set is this design's own choice,
// modelled on the asynchronous-input style: operands are loaded by
// separate commands in any order, and GO starts the compression.
package blake2b_pkg;

  localparam int unsigned WORD   = 64;

  typedef logic [WORD-1:0] word_t;

  // Command tag of the W64x4 input
  typedef enum logic [2:0] {
    B2_NOP    = 3'd0,  // idle
    B2_LOAD_M = 3'd1,  // m[4*idx +: 4] := data
    B2_LOAD_H = 3'd2,  // h[4*idx +: 4] := data, idx in 0..1
    B2_GO     = 3'd3   // run F with t = {data[1],data[0]}, f = data[2][0]
  } b2_cmd_e;

  // Initialisation vector word i
  function automatic word_t iv(input int unsigned i);
    case (i)
      0:       return 64'h6a09e667f3bcc908;
      1:       return 64'hbb67ae8584caa73b;
      2:       return 64'h3c6ef372fe94f82b;
      3:       return 64'ha54ff53a5f1d36f1;
      4:       return 64'h510e527fade682d1;
      5:       return 64'h9b05688c2b3e6c1f;
      6:       return 64'h1f83d9abfb41bd6b;
      default: return 64'h5be0cd19137e2179;
    endcase
  endfunction

  // SIGMA[r][k]: index of the message word used as the k-th G input in
  // round r (r in 0..9); one hex digit per entry, entry 0 leftmost
  function automatic logic [3:0] sigma(input logic [3:0] r, input int unsigned k);
    logic [63:0] row;
    case (r)
      4'd0:    row = 64'h0123456789abcdef;
      4'd1:    row = 64'hea489fd61c02b753;
      4'd2:    row = 64'hb8c052fdae367194;
      4'd3:    row = 64'h7931dcbe265a40f8;
      4'd4:    row = 64'h905724afe1bc683d;
      4'd5:    row = 64'h2c6a0b834d75fe19;
      4'd6:    row = 64'hc51fed4a0763928b;
      4'd7:    row = 64'hdb7ec13950f4862a;
      4'd8:    row = 64'h6fe9b308c2d714a5;
      default: row = 64'ha2847615fb9e3cd0;
    endcase
    return row[60 - 4*k +: 4];
  endfunction

endpackage
