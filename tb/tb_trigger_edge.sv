`timescale 1ns/1ps
// Test of trigger_edge: random trigger pulses of 1 to 6 clock periods,
// changing between clock edges. load must be high for exactly the one cycle
// after the first clock edge that sees the trigger high, and never else.
module tb_trigger_edge;
  logic clk = 0, rst_n = 0, trig = 0, load;
  int checks = 0, failures = 0, loads = 0;
  logic seen_prev;
  logic seen;

  trigger_edge dut (.clk, .rst_n, .trig, .load);

  always #2 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: sampled trigger at this edge and the edge before.
  initial begin
    seen_prev = 0;
    seen = 0;
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      seen_prev = seen;
      seen = trig;
      #1;
      checks++;
      if (load !== (seen && !seen_prev)) begin
        failures++;
        $display("load=%b expected %b at %0t", load, seen && !seen_prev, $time);
      end
      if (load) loads++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      repeat (1 + $urandom % 5) @(posedge clk);
      #1.5 trig = 1;
      repeat (1 + $urandom % 6) @(posedge clk);
      #1.5 trig = 0;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (loads != 400) begin
      failures++;
      $display("loads=%0d expected 400", loads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
