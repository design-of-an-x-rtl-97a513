// tb_pcb: self-checking test of the primitive control block. Checked: reset
// state, do_prim sets busy and attention together, they stay up while the
// accepting side has not acknowledged, ack clears both, and a new primitive
// can follow directly after the acknowledge.
module tb_pcb;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;
  logic do_prim = 0, ack = 0, busy, atn;
  pcb dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #200000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(!busy && !atn, "free after reset");
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      int hold;
      hold = n % 5;
      @(negedge clk);
      if (busy) begin
        check(0, "still busy before a new primitive");
        break;
      end
      do_prim = 1;
      @(negedge clk) do_prim = 0;
      check(busy && atn, "set by do_prim");
      repeat (hold) begin
        @(negedge clk);
        check(busy && atn, "stays set until ack");
      end
      ack = 1;
      @(negedge clk) ack = 0;
      check(!busy && !atn, "cleared by ack");
    end
    // back to back: do in the cycle right after the ack
    @(negedge clk) do_prim = !busy;
    @(negedge clk) do_prim = 0; ack = 1;
    @(negedge clk) ack = 0; do_prim = !busy;
    check(!busy, "free right after the ack");
    @(negedge clk) do_prim = 0;
    check(busy, "new primitive right after ack");
    ack = 1;
    @(negedge clk) ack = 0;
    check(!busy, "second primitive acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
