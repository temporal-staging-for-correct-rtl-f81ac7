// tb_csa: test of the simple carry-save adder machine.
//
// Feeds random operand triples a, b, c on successive edges (with a random
// value on the fourth, ignored edge) and checks that Val appears exactly
// after the edge that takes c, with carry + sum == a + b + c, that every
// other cycle is DC, and that ready marks the edge that takes a.
module tb_csa;
  logic       clk = 0, rst_n = 0;
  logic [7:0] in_data, out_carry, out_sum;
  logic       out_val, ready;
  int checks = 0, failures = 0;

  csa dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  initial begin
    logic [7:0] a, b, c;
    in_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      if (n == 0) begin a = 8'hFF; b = 8'hFF; c = 8'hFF; end
      check(ready, "ready before a");
      in_data = a; @(posedge clk); #1; check(!out_val && !ready, "DC after a");
      in_data = b; @(posedge clk); #1; check(!out_val && !ready, "DC after b");
      in_data = c; @(posedge clk); #1;
      check(out_val && 8'(out_carry + out_sum) == 8'(a + b + c)
            && out_sum == (a ^ b ^ c) && out_carry == 8'(((a & b) | (a & c) | (b & c)) << 1),
            $sformatf("Val(%h,%h) for %h %h %h", out_carry, out_sum, a, b, c));
      in_data = 8'($urandom); @(posedge clk); #1; check(!out_val, "DC on ignored edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
