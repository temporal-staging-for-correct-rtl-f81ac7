// tb_acsa: test of the asynchronous-input carry-save adder.
//
// Sends random streams of A, B, C and Nop commands (operands in any order,
// some replaced several times, some kept from earlier rounds), then Go,
// then random commands while the device is busy (they must be ignored).
// A model of the three operand registers gives the expected result; Val
// must appear exactly five edges after the edge that takes Go, busy must
// cover those edges, and every other cycle must be DC.
module tb_acsa;
  import csa_pkg::*;

  logic       clk = 0, rst_n = 0;
  acsa_cmd_e  in_cmd;
  logic [7:0] in_data, out_carry, out_sum;
  logic       out_val, busy;
  int checks = 0, failures = 0;

  acsa dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    acsa_cmd_e  cc;
    a = 0; b = 0; c = 0;
    in_cmd = CMD_NOP; in_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int len;
      len = (n == 0) ? 0 : $urandom % 8;
      for (int k = 0; k < len; k++) begin
        cc = acsa_cmd_e'($urandom % 4);
        in_cmd = cc; in_data = 8'($urandom);
        case (cc)
          CMD_A: a = in_data;
          CMD_B: b = in_data;
          CMD_C: c = in_data;
          default: ;
        endcase
        @(posedge clk); #1;
        check(!out_val && !busy, "DC and not busy while loading");
      end
      in_cmd = CMD_GO; in_data = 8'($urandom);
      @(posedge clk); #1;
      check(!out_val && busy, "Go taken");
      for (int k = 1; k <= 5; k++) begin
        in_cmd = acsa_cmd_e'($urandom % 5); in_data = 8'($urandom);
        @(posedge clk); #1;
        if (k < 5) check(!out_val && busy, $sformatf("busy at Go+%0d", k));
        else check(out_val && !busy && out_sum == (a ^ b ^ c)
                   && out_carry == 8'(((a & b) | (a & c) | (b & c)) << 1)
                   && 8'(out_carry + out_sum) == 8'(a + b + c),
                   $sformatf("Val(%h,%h) for %h %h %h", out_carry, out_sum, a, b, c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
