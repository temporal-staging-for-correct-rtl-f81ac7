// tb_blake2b_staged: end-to-end test of the staged BLAKE2b compression
// device.
//
// Two devices are tested one after the other: dut0 with the default
// single-stage mixing (Val three edges after GO) and dut1 with the mixing
// split into four stages of three rounds (Val six edges after GO). For each
// the testbench hashes messages of 0, 3 ("abc"), 128, 129 and 300 bytes,
// loading h and the message words in shuffled order with idle cycles in
// between, driving random commands while the device is busy (they must be
// ignored), and compares every compression result with the independent
// reference model, and the "abc" digest with the published BLAKE2b-512
// test vector. The Val cycle is checked to the exact edge.
module tb_blake2b_staged;
  import blake2b_pkg::*;
  import blake2b_ref_pkg::*;

  logic       clk = 0;
  logic       rst_n = 0;
  b2_cmd_e    cmd;
  logic [1:0] idx;
  word_t      data [4];
  int         sel;                 // which device is driven
  b2_cmd_e    cmd0, cmd1;
  logic       val0, val1, busy0, busy1;
  word_t      h0 [8], h1 [8];
  int checks = 0, failures = 0;

  assign cmd0 = (sel == 0) ? cmd : B2_NOP;
  assign cmd1 = (sel == 1) ? cmd : B2_NOP;

  blake2b_staged dut0 (
    .clk, .rst_n, .in_cmd(cmd0), .in_idx(idx), .in_data(data),
    .out_val(val0), .out_h(h0), .busy(busy0)
  );
  blake2b_staged #(.ROUNDS_PER_STAGE(3)) dut1 (
    .clk, .rst_n, .in_cmd(cmd1), .in_idx(idx), .in_data(data),
    .out_val(val1), .out_h(h1), .busy(busy1)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic cur_val();
    return (sel == 0) ? val0 : val1;
  endfunction
  function automatic logic cur_busy();
    return (sel == 0) ? busy0 : busy1;
  endfunction
  function automatic word_t cur_h(input int i);
    return (sel == 0) ? h0[i] : h1[i];
  endfunction

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (dut%0d): %s", sel, what);
    end
  endfunction

  // one clock edge with the given input; output must be DC afterwards
  task automatic send(input b2_cmd_e c, input logic [1:0] i, input word_t d [4]);
    cmd = c; idx = i; data = d;
    @(posedge clk); #1;
    check(!cur_val(), "Val outside the Val cycle");
    cmd = B2_NOP;
  endtask

  task automatic idle(input int n);
    word_t z [4];
    z = '{default: '0};
    for (int k = 0; k < n; k++) send(B2_NOP, 0, z);
  endtask

  // GO, then random commands while busy; Val expected exactly lat edges later
  task automatic compress(input logic [127:0] t, input bit f, input vec8_t exp_h, input int lat);
    word_t d [4];
    d = '{t[63:0], t[127:64], {63'($urandom), f}, 64'($urandom)};
    cmd = B2_GO; idx = 2'($urandom); data = d;
    @(posedge clk); #1;
    check(!cur_val() && cur_busy(), "GO not taken");
    for (int k = 1; k <= lat; k++) begin
      cmd  = b2_cmd_e'(1 + $urandom % 3);
      idx  = 2'($urandom);
      data = '{64'({$urandom, $urandom}), 64'({$urandom, $urandom}),
               64'({$urandom, $urandom}), 64'({$urandom, $urandom})};
      @(posedge clk); #1;
      if (k < lat) check(!cur_val() && cur_busy(), "early Val or not busy");
      else begin
        bit ok = cur_val() && !cur_busy();
        for (int i = 0; i < 8; i++) if (cur_h(i) !== exp_h[i]) ok = 0;
        check(ok, $sformatf("compression result or Val timing (t=%0d f=%0d)", t, f));
      end
    end
    cmd = B2_NOP;
  endtask

  // hash a message of len bytes (little-endian words), 64-byte digest
  task automatic hash_msg(input byte msg [], input int lat, output vec8_t dig);
    vec8_t  h;
    vec16_t mw;
    int     nblk, len;
    word_t  d [4];
    int     order [4];
    logic [127:0] tcount;
    len  = msg.size();
    nblk = (len == 0) ? 1 : (len + 127) / 128;
    ref_init(h, 64);
    d = '{h[0], h[1], h[2], h[3]}; send(B2_LOAD_H, 0, d);
    idle($urandom % 2);
    d = '{h[4], h[5], h[6], h[7]}; send(B2_LOAD_H, 1, d);
    for (int b = 0; b < nblk; b++) begin
      for (int w = 0; w < 16; w++) begin
        mw[w] = '0;
        for (int j = 0; j < 8; j++)
          if (b*128 + w*8 + j < len) mw[w][8*j +: 8] = msg[b*128 + w*8 + j];
      end
      order = '{0, 1, 2, 3};
      order.shuffle();
      foreach (order[o]) begin
        d = '{mw[4*order[o]], mw[4*order[o]+1], mw[4*order[o]+2], mw[4*order[o]+3]};
        send(B2_LOAD_M, 2'(order[o]), d);
        idle($urandom % 2);
      end
      tcount = (b == nblk-1) ? 128'(len) : {96'd0, 32'((b+1)*128)};
      ref_compress(h, mw, tcount, b == nblk-1);
      compress(tcount, b == nblk-1, h, lat);
      idle($urandom % 3);
    end
    dig = h;
  endtask

  // published BLAKE2b-512("abc")
  localparam logic [7:0] ABC_DIGEST [64] = '{
    8'hBA, 8'h80, 8'hA5, 8'h3F, 8'h98, 8'h1C, 8'h4D, 8'h0D, 8'h6A, 8'h27, 8'h97, 8'hB6, 8'h9F, 8'h12, 8'hF6, 8'hE9,
    8'h4C, 8'h21, 8'h2F, 8'h14, 8'h68, 8'h5A, 8'hC4, 8'hB7, 8'h4B, 8'h12, 8'hBB, 8'h6F, 8'hDB, 8'hFF, 8'hA2, 8'hD1,
    8'h7D, 8'h87, 8'hC5, 8'h39, 8'h2A, 8'hAB, 8'h79, 8'h2D, 8'hC2, 8'h52, 8'hD5, 8'hDE, 8'h45, 8'h33, 8'hCC, 8'h95,
    8'h18, 8'hD3, 8'h8A, 8'hA8, 8'hDB, 8'hF1, 8'h92, 8'h5A, 8'hB9, 8'h23, 8'h86, 8'hED, 8'hD4, 8'h00, 8'h99, 8'h23
  };

  initial begin
    byte   msg [];
    vec8_t dig;
    static int lens [5] = '{3, 0, 128, 129, 300};
    int    lat;
    cmd = B2_NOP; idx = 0; data = '{default: '0}; sel = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (sel = 0; sel < 2; sel++) begin
      lat = (sel == 0) ? 3 : 6;
      idle(2);
      check(!cur_busy() && !cur_val(), "idle after reset");
      foreach (lens[n]) begin
        msg = new[lens[n]];
        if (n == 0) msg = '{8'h61, 8'h62, 8'h63};
        else foreach (msg[j]) msg[j] = byte'($urandom);
        hash_msg(msg, lat, dig);
        if (n == 0) begin
          bit ok;
          ok = 1;
          for (int j = 0; j < 64; j++)
            if (cur_h(j / 8)[8*(j%8) +: 8] !== ABC_DIGEST[j]) ok = 0;
          check(ok, "BLAKE2b-512(\"abc\") test vector");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
