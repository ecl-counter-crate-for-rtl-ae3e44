`timescale 1ns/1ps
// Test of the fine delay model: for random 9-bit codes the rising and
// falling edges of a pulse must come out code * 10 ps later; a code change
// while the latch is closed must not change the delay.
module tb_fine_delay;
  logic       d_in = 0, latch_en = 0, d_out;
  logic [8:0] code = 0;
  int checks = 0, failures = 0;
  realtime t_rise_in, t_fall_in, t_rise_out, t_fall_out;

  fine_delay dut (.d_in, .code, .latch_en, .d_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge d_out) t_rise_out = $realtime;
  always @(negedge d_out) t_fall_out = $realtime;

  task automatic pulse_and_check(input int unsigned exp_code);
    #20 t_rise_in = $realtime; d_in = 1;
    #4  t_fall_in = $realtime; d_in = 0;
    #10;
    checks++;
    if ((t_rise_out - t_rise_in - exp_code * 0.010) > 0.0005 ||
        (t_rise_out - t_rise_in - exp_code * 0.010) < -0.0005 ||
        (t_fall_out - t_fall_in - exp_code * 0.010) > 0.0005 ||
        (t_fall_out - t_fall_in - exp_code * 0.010) < -0.0005) begin
      failures++;
      $display("code %0d: delays %0t %0t", exp_code, t_rise_out - t_rise_in, t_fall_out - t_fall_in);
    end
  endtask

  initial begin
    int unsigned c, c2;
    #5;
    for (int i = 0; i < 60; i++) begin
      c = (i == 0) ? 511 : (i == 1) ? 0 : $urandom % 512;
      code = 9'(c);
      latch_en = 1;
      #1 latch_en = 0;
      c2 = $urandom % 512;
      code = 9'(c2);   // latch closed: must be ignored
      pulse_and_check(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
