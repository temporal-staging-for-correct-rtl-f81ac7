// tb_temporal_staging_top: end-to-end test of the whole design at its
// default sizes.
//
// Four threads run at once, one per device:
//   BLAKE2b  hashes "abc" (checked against the published BLAKE2b-512 digest)
//            and random two- and three-block messages (checked against the
//            reference model), with random commands while busy
//   csa      random triples, Val on the edge that takes c
//   pcsa     random triples, Val nine edges after a, ten-edge loop
//   acsa     operands in shuffled order with Nop gaps, partial reloads and
//            repeated Go, random commands while busy
// Each mechanism is counted; one that never happened counts a failure.
module tb_temporal_staging_top;
  import blake2b_pkg::*;
  import blake2b_ref_pkg::*;
  import csa_pkg::*;

  logic       clk = 0, rst_n = 0;
  b2_cmd_e    b2_cmd;
  logic [1:0] b2_idx;
  word_t      b2_data [4];
  logic       b2_val, b2_busy;
  word_t      b2_h [8];
  logic [7:0] csa_in, csa_carry, csa_sum;
  logic       csa_val, csa_ready;
  logic [7:0] pcsa_in, pcsa_carry, pcsa_sum;
  logic       pcsa_val, pcsa_ready;
  acsa_cmd_e  acsa_cmd;
  logic [7:0] acsa_in, acsa_carry, acsa_sum;
  logic       acsa_val, acsa_busy;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_b2_load_h = 0, n_b2_load_m = 0, n_b2_go_last = 0, n_b2_go_mid = 0;
  int n_b2_ignored = 0, n_b2_val = 0;
  int n_csa_val = 0, n_pcsa_val = 0, n_pcsa_ignored = 0;
  int n_acsa_out_of_order = 0, n_acsa_nop = 0, n_acsa_reuse = 0;
  int n_acsa_ignored = 0, n_acsa_val = 0;

  temporal_staging_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endfunction

  function automatic logic [7:0] maj_shl(input logic [7:0] a, b, c);
    return 8'(((a & b) | (a & c) | (b & c)) << 1);
  endfunction

  // ---------------- BLAKE2b ----------------
  localparam logic [63:0] ABC_H0 = 64'h0D4D1C983FA580BA;  // first digest word, little-endian
  localparam logic [63:0] ABC_H7 = 64'h239900D4ED8623B9;  // last digest word

  task automatic b2_send(input b2_cmd_e c, input logic [1:0] i, input word_t d [4]);
    b2_cmd = c; b2_idx = i; b2_data = d;
    @(posedge clk); #1;
    check(!b2_val, "b2: Val outside the Val cycle");
    b2_cmd = B2_NOP;
  endtask

  task automatic b2_hash(input byte msg []);
    vec8_t  h;
    vec16_t mw;
    word_t  d [4];
    int     len, nblk;
    logic [127:0] t;
    bit     last;
    len  = msg.size();
    nblk = (len == 0) ? 1 : (len + 127) / 128;
    ref_init(h, 64);
    d = '{h[4], h[5], h[6], h[7]}; b2_send(B2_LOAD_H, 1, d); n_b2_load_h++;
    d = '{h[0], h[1], h[2], h[3]}; b2_send(B2_LOAD_H, 0, d); n_b2_load_h++;
    for (int b = 0; b < nblk; b++) begin
      for (int w = 0; w < 16; w++) begin
        mw[w] = '0;
        for (int j = 0; j < 8; j++)
          if (b*128 + w*8 + j < len) mw[w][8*j +: 8] = msg[b*128 + w*8 + j];
      end
      for (int g = 3; g >= 0; g--) begin
        d = '{mw[4*g], mw[4*g+1], mw[4*g+2], mw[4*g+3]};
        b2_send(B2_LOAD_M, 2'(g), d); n_b2_load_m++;
      end
      last = (b == nblk - 1);
      t    = last ? 128'(len) : {96'd0, 32'((b + 1) * 128)};
      ref_compress(h, mw, t, last);
      if (last) n_b2_go_last++; else n_b2_go_mid++;
      b2_cmd = B2_GO; b2_data = '{t[63:0], t[127:64], 64'(last), 64'h0};
      @(posedge clk); #1;
      check(b2_busy && !b2_val, "b2: GO taken");
      for (int k = 1; k <= 3; k++) begin
        // a load of garbage while busy must be ignored
        b2_cmd = B2_LOAD_M; b2_idx = 2'($urandom);
        b2_data = '{64'({$urandom, $urandom}), 64'({$urandom, $urandom}), 64'(0), 64'(0)};
        @(posedge clk); #1;
        n_b2_ignored++;
        if (k < 3) check(b2_busy && !b2_val, "b2: busy");
        else begin
          bit ok;
          ok = b2_val && !b2_busy;
          for (int i = 0; i < 8; i++) if (b2_h[i] !== h[i]) ok = 0;
          check(ok, $sformatf("b2: result of block %0d (len %0d)", b, len));
          if (ok) n_b2_val++;
        end
      end
      b2_cmd = B2_NOP;
    end
  endtask

  task automatic run_b2();
    byte msg [];
    msg = '{8'h61, 8'h62, 8'h63};
    b2_hash(msg);
    check(b2_h[0] == ABC_H0 && b2_h[7] == ABC_H7, "b2: BLAKE2b-512(\"abc\") digest");
    for (int n = 0; n < 4; n++) begin
      msg = new[200 + 60 * n];
      foreach (msg[j]) msg[j] = byte'($urandom);
      b2_hash(msg);
    end
  endtask

  // ---------------- csa ----------------
  task automatic run_csa();
    logic [7:0] a, b, c;
    for (int n = 0; n < 100; n++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      check(csa_ready, "csa: ready");
      csa_in = a; @(posedge clk); #1;
      csa_in = b; @(posedge clk); #1;
      csa_in = c; @(posedge clk); #1;
      check(csa_val && csa_sum == (a ^ b ^ c) && csa_carry == maj_shl(a, b, c), "csa: Val");
      if (csa_val) n_csa_val++;
      csa_in = 8'($urandom); @(posedge clk); #1;
      check(!csa_val, "csa: DC");
    end
  endtask

  // ---------------- pcsa ----------------
  task automatic run_pcsa();
    logic [7:0] a, b, c;
    for (int n = 0; n < 60; n++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      check(pcsa_ready, "pcsa: ready");
      for (int k = 0; k < 10; k++) begin
        pcsa_in = (k == 0) ? a : (k == 1) ? b : (k == 2) ? c : 8'($urandom);
        if (k >= 3) n_pcsa_ignored++;
        @(posedge clk); #1;
        if (k == 8) begin
          check(pcsa_val && pcsa_sum == (a ^ b ^ c) && pcsa_carry == maj_shl(a, b, c), "pcsa: Val");
          if (pcsa_val) n_pcsa_val++;
        end else check(!pcsa_val, "pcsa: DC");
      end
    end
  endtask

  // ---------------- acsa ----------------
  task automatic run_acsa();
    logic [7:0] r [3];
    int         order [3];
    r = '{default: '0};
    for (int n = 0; n < 60; n++) begin
      order = '{0, 1, 2};
      order.shuffle();
      if (order[0] != 0) n_acsa_out_of_order++;
      // reload all operands, or only one of them (reuse of the others)
      for (int o = 0; o < ((n % 3 == 2) ? 1 : 3); o++) begin
        acsa_cmd = acsa_cmd_e'(order[o]);
        acsa_in  = 8'($urandom);
        r[order[o]] = acsa_in;
        @(posedge clk); #1;
        check(!acsa_val && !acsa_busy, "acsa: load");
        if ($urandom % 2 == 1) begin
          acsa_cmd = CMD_NOP; acsa_in = 8'($urandom);
          @(posedge clk); #1;
          n_acsa_nop++;
          check(!acsa_val, "acsa: Nop");
        end
      end
      if (n % 3 == 2) n_acsa_reuse++;
      acsa_cmd = CMD_GO; @(posedge clk); #1;
      check(acsa_busy, "acsa: Go");
      for (int k = 1; k <= 5; k++) begin
        acsa_cmd = acsa_cmd_e'($urandom % 3); acsa_in = 8'($urandom);
        @(posedge clk); #1;
        n_acsa_ignored++;
        if (k == 5) begin
          check(acsa_val && acsa_sum == (r[0] ^ r[1] ^ r[2])
                && acsa_carry == maj_shl(r[0], r[1], r[2]), "acsa: Val");
          if (acsa_val) n_acsa_val++;
        end else check(!acsa_val && acsa_busy, "acsa: busy");
      end
      acsa_cmd = CMD_NOP;
    end
  endtask

  function automatic void need(input int n, input string what);
    $display("  %-28s %0d", what, n);
    check(n > 0, {"mechanism never happened: ", what});
  endfunction

  initial begin
    b2_cmd = B2_NOP; b2_idx = 0; b2_data = '{default: '0};
    csa_in = 0; pcsa_in = 0; acsa_cmd = CMD_NOP; acsa_in = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    fork
      run_b2();
      run_csa();
      run_pcsa();
      run_acsa();
    join
    $display("mechanisms:");
    need(n_b2_load_h,          "b2 LOAD_H");
    need(n_b2_load_m,          "b2 LOAD_M");
    need(n_b2_go_mid,          "b2 GO, non-final block");
    need(n_b2_go_last,         "b2 GO, final block");
    need(n_b2_ignored,         "b2 input ignored while busy");
    need(n_b2_val,             "b2 Val");
    need(n_csa_val,            "csa Val");
    need(n_pcsa_ignored,       "pcsa input ignored");
    need(n_pcsa_val,           "pcsa Val");
    need(n_acsa_out_of_order,  "acsa operands out of order");
    need(n_acsa_nop,           "acsa Nop");
    need(n_acsa_reuse,         "acsa Go with kept operands");
    need(n_acsa_ignored,       "acsa input ignored while busy");
    need(n_acsa_val,           "acsa Val");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
