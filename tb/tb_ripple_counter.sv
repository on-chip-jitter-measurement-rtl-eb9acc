`timescale 1ps/1ps
// Testbench of ripple_counter: counts bursts of random length, checks the
// count against the number of edges driven, checks that preset returns it to
// zero, and checks wrap-around on a 4-bit instance.
module tb_ripple_counter;

  int checks = 0, failures = 0;

  logic clk_in = 1'b0, pre = 1'b0;
  logic [17:0] acnt;
  logic [3:0]  acnt4;

  ripple_counter dut (.clk_in, .pre, .acnt);
  ripple_counter #(.WIDTH(4)) dut4 (.clk_in, .pre, .acnt(acnt4));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic pulses(input int n);
    repeat (n) begin
      #(300 + ($urandom % 400)) clk_in = 1'b1;
      #(300 + ($urandom % 400)) clk_in = 1'b0;
    end
  endtask

  initial begin : watchdog
    #(100_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, total;
    #500;
    pre = 1'b1;
    #500;
    pre = 1'b0;
    #100;
    check("after preset", acnt, 0);
    for (int k = 0; k < 6; k++) begin
      total = 0;
      pre = 1'b1; #200; pre = 1'b0; #200;
      check("preset clears", acnt, 0);
      n = 1 + ($urandom % 3000);
      if (k == 0) n = 1;
      pulses(n);
      total += n;
      #100;
      check("count", acnt, total);
      check("count 4-bit wraps", acnt4, total % 16);
      // a second burst accumulates
      n = $urandom % 100;
      pulses(n);
      total += n;
      #100;
      check("count accumulates", acnt, total);
    end
    // preset overrides an edge
    pre = 1'b1; #100; clk_in = 1'b1; #100; clk_in = 1'b0; #100; pre = 1'b0; #100;
    check("edges ignored in preset", acnt, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
