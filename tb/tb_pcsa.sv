// tb_pcsa: test of the pipelined-input carry-save adder.
//
// Feeds a, b, c on three successive edges and random values on the next
// seven (which must be ignored), and checks that Val appears exactly after
// the ninth edge of the loop (edge k+8 when a is taken at edge k) with the
// carry-save result, DC everywhere else, and a loop length of ten edges.
module tb_pcsa;
  logic       clk = 0, rst_n = 0;
  logic [7:0] in_data, out_carry, out_sum;
  logic       out_val, ready;
  int checks = 0, failures = 0;

  pcsa dut (.*);

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

  initial begin
    logic [7:0] a, b, c;
    in_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      if (n == 0) begin a = 8'hFF; b = 8'hFF; c = 8'hFF; end
      check(ready, "ready at start of loop");
      for (int k = 0; k < 10; k++) begin
        in_data = (k == 0) ? a : (k == 1) ? b : (k == 2) ? c : 8'($urandom);
        @(posedge clk); #1;
        if (k == 8)
          check(out_val && 8'(out_carry + out_sum) == 8'(a + b + c)
                && out_sum == (a ^ b ^ c) && out_carry == 8'(((a & b) | (a & c) | (b & c)) << 1),
                $sformatf("Val(%h,%h) for %h %h %h", out_carry, out_sum, a, b, c));
        else
          check(!out_val && (ready == (k == 9)), $sformatf("DC / ready at edge k+%0d", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
