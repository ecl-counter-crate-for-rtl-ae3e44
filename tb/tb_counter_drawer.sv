`timescale 1ns/1ps
// End-to-end test of one counter drawer at 250 MHz (4 ns clock).
//
// Remote mode: the host writes trigger select, enables, coarse and fine
// delays over the control bus, then fires the selected trigger. Each output
// pulse must rise at T + (2 + N) clock periods + F * 10 ps, where T is the
// clock edge that first sees the trigger, N the coarse and F the fine delay,
// and last one period. Also checked: out_sum, read-back, a computer disable,
// a fast disable, an unselected trigger, the trigger-path fine delay, local
// mode with the front-panel switches, the DIL local override, a retrigger
// while counting, and the front-panel displays.
module tb_counter_drawer;
  import ctf3_timing_pkg::*;
  localparam realtime TCLK = 4.0;

  logic              clk = 0, rst_n = 1;
  logic [3:0]        trig_rear = 0, fast_disable = 0;
  logic              trig_fp = 0;
  logic [7:0]        addr = 0, din = 0, dout;
  logic              write_n = 1, read_n = 1, local_line = 0, dout_en;
  logic [3:0]        dil_on;
  panel_switches_t   sw;
  logic [3:0]        psu_ok = 4'b1011;
  panel_indicators_t ind;
  logic              clk_mon, trig_mon, out_sum;
  logic [3:0]        out;
  int checks = 0, failures = 0;

  // board address 2 (A7..A5 = 010): pole ON reads as 0
  localparam logic [2:0] BOARD = 3'd2;
  initial dil_on = {~BOARD, 1'b1};

  counter_drawer #(.LED_HOLD_CYCLES(20)) dut (
    .clk, .rst_n, .trig_rear, .trig_fp, .fast_disable, .addr, .din, .write_n,
    .read_n, .local_line, .dout, .dout_en, .dil_on, .sw, .psu_ok, .ind,
    .clk_mon, .trig_mon, .out, .out_sum);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record output edges.
  realtime rise_t [4][$];
  realtime fall_t [4][$];
  int      sum_rises = 0;
  for (genvar c = 0; c < 4; c++) begin : g_mon
    always @(posedge out[c]) rise_t[c].push_back($realtime);
    always @(negedge out[c]) fall_t[c].push_back($realtime);
  end
  always @(posedge out_sum) sum_rises++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  task automatic bus_write(input logic [4:0] b, input logic [7:0] d);
    addr = {BOARD, b}; din = d;
    #20 write_n = 0;
    #50 write_n = 1;
    #20;
  endtask

  task automatic bus_read(input logic [4:0] b, output logic [7:0] d);
    addr = {BOARD, b};
    #20 read_n = 0;
    #40 d = dout;
    #10 read_n = 1;
    #20;
  endtask

  // Write the settings of one counter in the inverted byte format.
  logic [7:0] byte2 = 8'hFF;
  task automatic set_counter(input int ch, input int unsigned n, input int unsigned f);
    bus_write(5'(3 + 4*ch), ~8'(n));
    bus_write(5'(4 + 4*ch), ~8'(n >> 8));
    bus_write(5'(5 + 4*ch), ~8'(n >> 16));
    bus_write(5'(2 + 4*ch), ~8'(f >> 1));
    byte2[ch] = ~f[0];
    bus_write(5'd1, byte2);
  endtask

  // Raise a trigger 1 ns after a clock edge; return the sampling edge time.
  task automatic fire(input int src, output realtime t_edge);
    @(posedge clk);
    #1;
    if (src == 4) trig_fp = 1; else trig_rear[src] = 1;
    @(posedge clk);
    t_edge = $realtime;
    repeat (3) @(posedge clk);
    #1;
    trig_fp = 0;
    trig_rear = 0;
  endtask

  task automatic clear_edges();
    for (int c = 0; c < 4; c++) begin
      rise_t[c].delete();
      fall_t[c].delete();
    end
  endtask

  // Wait for the slowest pulse, then compare every channel.
  task automatic expect_outputs(input realtime t_edge, input int unsigned n[4],
                                input int unsigned f[4], input bit present[4],
                                input string what);
    int unsigned nmax = 0;
    for (int c = 0; c < 4; c++) if (n[c] > nmax) nmax = n[c];
    #((nmax + 6) * TCLK + 6.0);
    for (int c = 0; c < 4; c++) begin
      realtime exp_t = t_edge + (2 + n[c]) * TCLK + f[c] * 0.010;
      if (present[c]) begin
        check(rise_t[c].size() == 1 && fall_t[c].size() == 1, $sformatf("%s: ch%0d one pulse (%0d)", what, c, rise_t[c].size()));
        if (rise_t[c].size() == 1 && fall_t[c].size() == 1) begin
          check(rise_t[c][0] > exp_t - 0.001 && rise_t[c][0] < exp_t + 0.001,
                $sformatf("%s: ch%0d rise %0.3f expected %0.3f", what, c, rise_t[c][0], exp_t));
          check(fall_t[c][0] - rise_t[c][0] > TCLK - 0.001 && fall_t[c][0] - rise_t[c][0] < TCLK + 0.001,
                $sformatf("%s: ch%0d width", what, c));
        end
      end else begin
        check(rise_t[c].size() == 0, $sformatf("%s: ch%0d must stay quiet", what, c));
      end
    end
    clear_edges();
  endtask

  initial begin
    realtime te;
    logic [7:0] rd;
    int unsigned n[4], f[4];
    bit pres[4];
    int sums;
    sw = '0;
    #1 rst_n = 0;
    #10 rst_n = 1;

    // ---- remote mode, trigger 2 selected, all enabled ----
    bus_write(5'd0, 8'b0111_1110);   // counters 1-4 enabled, trigger 2
    n = '{0, 5, 260, 70000};
    f = '{0, 1, 255, 511};
    for (int c = 0; c < 4; c++) set_counter(c, n[c], f[c]);
    bus_read(5'd0, rd);            check(rd == 8'h7E, "read back byte 1");
    bus_read(5'd16, rd);           check(rd == 8'hEE, "read back byte 17");
    bus_read(5'd1, rd);            check(rd == byte2, "read back byte 2");
    check(ind.led_remote && ind.led_trig_sel == 5'b00010, "remote LEDs");
    check(ind.display[3] == {"0", "1", "1", "1", "7", "0", "F", "F"}, "display of counter 4");
    clear_edges();
    sums = sum_rises;
    fire(1, te);
    pres = '{1, 1, 1, 1};
    expect_outputs(te, n, f, pres, "remote");
    check(sum_rises - sums == 4, "sum output pulses");

    // ---- unselected trigger: nothing happens ----
    fire(0, te);
    fire(4, te);
    pres = '{0, 0, 0, 0};
    expect_outputs(te, n, f, pres, "unselected trigger");

    // ---- computer disable of counter 3, fast disable of counter 1 ----
    n = '{3, 7, 11, 2};
    f = '{10, 20, 30, 40};
    for (int c = 0; c < 4; c++) set_counter(c, n[c], f[c]);
    bus_write(5'd0, 8'b0101_1100);   // counter 3 disabled, trigger 4
    fast_disable = 4'b0001;
    #1;
    check(ind.led_disabled == 4'b0101, "disable LEDs");
    fire(3, te);
    pres = '{0, 1, 0, 1};
    expect_outputs(te, n, f, pres, "disables");
    fast_disable = 0;

    // ---- retrigger while counting: the second trigger restarts ----
    bus_write(5'd0, 8'b0111_1111);   // trigger 1, all enabled
    n = '{40, 40, 40, 40};
    f = '{0, 0, 0, 0};
    for (int c = 0; c < 4; c++) set_counter(c, n[c], f[c]);
    fire(0, te);
    repeat (10) @(posedge clk);
    fire(0, te);
    pres = '{1, 1, 1, 1};
    expect_outputs(te, n, f, pres, "retrigger");

    // ---- local mode via the LOCAL line, front-panel trigger ----
    local_line = 1;
    sw.trig_sel = 4'd0;
    sw.trig_delay = 8'd0;
    sw.disable_sw = 4'b0010;
    sw.coarse = {24'd9, 24'd1, 24'd300, 24'd0};
    sw.fine   = {8'd255, 8'd0, 8'd7, 8'd100};
    #1;
    check(!ind.led_remote && ind.led_trig_sel == 5'b10000, "local LEDs");
    check(ind.display[0] == {"0", "0", "0", "0", "0", "0", "6", "4"}, "local display");
    fire(4, te);
    n = '{0, 300, 1, 9};
    f = '{200, 14, 0, 510};
    pres = '{1, 0, 1, 1};
    expect_outputs(te, n, f, pres, "local");

    // ---- DIL local override with the LOCAL line low ----
    local_line = 0;
    dil_on[0] = 0;
    sw.disable_sw = 4'b0000;
    sw.trig_sel = 4'd3;
    #1;
    check(!ind.led_remote, "override forces local");
    fire(2, te);
    pres = '{1, 1, 1, 1};
    expect_outputs(te, n, f, pres, "override");
    dil_on[0] = 1;

    // ---- trigger-path fine delay: 2 ns shift of the monitor ----
    begin
      realtime t0, t1;
      sw.trig_delay = 8'd100;          // 100 x 20 ps
      local_line = 1;
      sw.trig_sel = 4'd1;
      @(posedge clk);
      #0.5 trig_rear[0] = 1; t0 = $realtime;
      @(posedge trig_mon); t1 = $realtime;
      check(t1 - t0 > 1.999 && t1 - t0 < 2.001, "trigger fine delay 2 ns");
      #10 trig_rear[0] = 0;
      repeat (50) @(posedge clk);
      clear_edges();
      local_line = 0;
    end

    check(ind.led_psu == psu_ok, "supply LEDs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
