// tb_blake2b_g: random test of the BLAKE2b G function against the
// reference model's G applied to a four-word vector.
module tb_blake2b_g;
  import blake2b_ref_pkg::*;

  logic [63:0] a_i, b_i, c_i, d_i, x, y, a_o, b_o, c_o, d_o;
  int checks = 0, failures = 0;

  blake2b_g dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec16_t v;
    for (int n = 0; n < 2000; n++) begin
      a_i = {$urandom, $urandom}; b_i = {$urandom, $urandom};
      c_i = {$urandom, $urandom}; d_i = {$urandom, $urandom};
      x   = {$urandom, $urandom}; y   = {$urandom, $urandom};
      if (n == 0) begin
        a_i = '0; b_i = '0; c_i = '0; d_i = '0; x = '0; y = '0;
      end
      for (int i = 0; i < 16; i++) v[i] = '0;
      v[0] = a_i; v[4] = b_i; v[8] = c_i; v[12] = d_i;
      ref_g(v, 0, 4, 8, 12, x, y);
      #1;
      checks++;
      if ({a_o, b_o, c_o, d_o} !== {v[0], v[4], v[8], v[12]}) begin
        failures++;
        if (failures < 5)
          $display("G mismatch: got %h %h %h %h exp %h %h %h %h",
                   a_o, b_o, c_o, d_o, v[0], v[4], v[8], v[12]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
