`timescale 1ns/1ps
// Self-checking test of counter8: random load, count-enable and idle cycles
// compared each clock with a reference count kept in the testbench; checks
// the wrap from FF to 00 and the terminal-count flag.
module tb_counter8;
  logic       clk = 0, rst_n = 0, load = 0, ce = 0;
  logic [7:0] d = 0, q;
  logic       tc;
  int checks = 0, failures = 0;
  int unsigned ref_q;
  int wraps = 0;

  counter8 dut (.clk, .rst_n, .load, .d, .ce, .q, .tc);

  always #2 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    ref_q = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      load = ($urandom % 20) == 0;
      ce   = ($urandom % 4) != 0;
      d    = 8'($urandom);
      @(posedge clk);
      if (load) ref_q = d;
      else if (ce) begin
        if (ref_q == 255) wraps++;
        ref_q = (ref_q + 1) % 256;
      end
      #0.5;
      checks++;
      if (q !== 8'(ref_q) || tc !== (ref_q == 255)) begin
        failures++;
        $display("mismatch cycle %0d: q=%0h tc=%0b expected %0h", i, q, tc, ref_q);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("terminal count never passed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
