// tb_blake2b_round: random test of one BLAKE2b round, for every round
// index 0..11, against the reference model.
module tb_blake2b_round;
  import blake2b_ref_pkg::*;

  logic [3:0]  round_idx;
  logic [63:0] v_in [16];
  logic [63:0] m    [16];
  logic [63:0] v_out[16];
  int checks = 0, failures = 0;

  blake2b_round dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec16_t v, mm;
    for (int n = 0; n < 240; n++) begin
      for (int i = 0; i < 16; i++) begin
        v[i]  = {$urandom, $urandom};
        mm[i] = {$urandom, $urandom};
        v_in[i] = v[i];
        m[i]    = mm[i];
      end
      round_idx = 4'(n % 12);
      ref_round(v, mm, n % 12);
      #1;
      checks++;
      for (int i = 0; i < 16; i++)
        if (v_out[i] !== v[i]) begin
          failures++;
          if (failures < 5) $display("round %0d word %0d: got %h exp %h", n % 12, i, v_out[i], v[i]);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
