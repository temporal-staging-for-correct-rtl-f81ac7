// tb_purecsa: exhaustive test of the 8-bit carry-save adder over all a, b
// and a sample of c, checking carry + sum == a + b + c (mod 256) and both
// words against their bitwise definitions.
module tb_purecsa;
  logic [7:0] a, b, c, carry, sum;
  int checks = 0, failures = 0;

  purecsa dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ec, es;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int k = 0; k < 256; k += 17) begin
          a = 8'(i); b = 8'(j); c = 8'(k + (i % 17));
          #1;
          // bitwise definition, one bit position at a time
          for (int p = 0; p < 8; p++) begin
            es[p] = a[p] ^ b[p] ^ c[p];
            ec[p] = (p == 0) ? 1'b0 : (a[p-1] + b[p-1] + c[p-1] >= 2);
          end
          checks++;
          if (carry !== ec || sum !== es || 8'(carry + sum) !== 8'(a + b + c)) begin
            failures++;
            if (failures < 5) $display("a=%h b=%h c=%h: carry=%h sum=%h exp %h %h", a, b, c, carry, sum, ec, es);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
