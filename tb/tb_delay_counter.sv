`timescale 1ns/1ps
// Test of delay_counter at its full 24 bits. Each trial loads the inverse of
// a random delay (0 to 700 periods, so the carries into the upper counter
// stages are exercised) and checks that the output pulse rises exactly
// 1 + delay clock edges after the load edge and lasts one period. Some
// trials set disable (no pulse), and some reload while counting (the pulse
// follows the second load only).
module tb_delay_counter;
  logic        clk = 0, rst_n = 0, load = 0, disable_i = 0;
  logic [23:0] load_value = '1;
  logic        out, running;
  int checks = 0, failures = 0;
  int n_disabled = 0, n_reload = 0, n_carry = 0;

  delay_counter dut (.clk, .rst_n, .load, .load_value, .disable_i, .out, .running);

  always #2 clk = ~clk;

  int unsigned edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue a load in the cycle before the next edge; return that edge number.
  task automatic do_load(input int unsigned delay, output int unsigned load_edge);
    @(negedge clk);
    load_value = ~24'(delay);
    load = 1;
    @(posedge clk);
    #0.5 load_edge = edge_no;
    @(negedge clk);
    load = 0;
  endtask

  // Watch for the pulse; expect it to rise at edge exp_edge (or never).
  task automatic expect_pulse(input int unsigned exp_edge, input bit present);
    int unsigned rise = 0;
    int unsigned width = 0;
    bit got = 0;
    while (edge_no < exp_edge + 4) begin
      @(posedge clk); #0.5;
      if (out) begin
        if (!got) rise = edge_no;
        got = 1;
        width++;
      end
    end
    checks++;
    if (present && (!got || rise != exp_edge || width != 1)) begin
      failures++;
      $display("pulse: got=%0b rise=%0d width=%0d expected rise %0d", got, rise, width, exp_edge);
    end
    if (!present && got) begin
      failures++;
      $display("pulse while disabled");
    end
    checks++;
    if (running) begin
      failures++;
      $display("still running after the terminal count");
    end
  endtask

  initial begin
    int unsigned le, d, d2;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      d = (t < 4) ? t : $urandom % 700;
      if (d >= 256) n_carry++;
      if (t % 7 == 3) begin
        disable_i = 1;
        n_disabled++;
        do_load(d, le);
        expect_pulse(le + 1 + d, 0);
        disable_i = 0;
      end else if (t % 7 == 5 && d > 3) begin
        n_reload++;
        do_load(d, le);
        repeat (d / 2) @(posedge clk);
        d2 = $urandom % 300;
        do_load(d2, le);
        expect_pulse(le + 1 + d2, 1);
      end else begin
        do_load(d, le);
        expect_pulse(le + 1 + d, 1);
      end
    end
    checks++;
    if (n_disabled == 0 || n_reload == 0 || n_carry == 0) begin
      failures++;
      $display("a case was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
