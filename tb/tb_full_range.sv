`timescale 1ns/1ps
// Full-range workload: the largest settings the control tables allow.
//
// Drawer A (default 24-bit build, 250 MHz) gets all control bytes at 0x00:
// 16 711 680 + 65 280 + 255 = 16 777 215 clock periods (about 67 ms) and
// 5100 ps + 10 ps of fine delay on counter 1, with the other counters at
// the 8-bit and 16-bit boundaries 255, 256, 65535 and 65536 periods.
// Drawer B is the 16-bit build (two counter chips per channel) at 400 MHz,
// drawer C the 8-bit build at 400 MHz; both get their largest settings
// (65535 and 255 periods). Every pulse must arrive at
// T + (2 + N) periods + F * 10 ps and last one period.
module tb_full_range;
  import ctf3_timing_pkg::*;

  localparam realtime TA = 4.0, TB = 2.5;

  logic              rst_n = 1, clk_a = 0, clk_b = 0;
  logic [2:0][3:0]   trig_rear = '0;
  logic [7:0]        addr = 0, din = 0;
  logic              write_n = 1;
  logic [2:0][7:0]   dout;
  logic [2:0]        dout_en, clk_mon, trig_mon, out_sum;
  logic [2:0][3:0]   out;
  panel_indicators_t ind [3];
  int checks = 0, failures = 0;

  always #(TA / 2) clk_a = ~clk_a;
  always #(TB / 2) clk_b = ~clk_b;

  // board addresses 0, 1, 2
  counter_drawer u_a (.clk(clk_a), .rst_n, .trig_rear(trig_rear[0]), .trig_fp(1'b0),
    .fast_disable(4'b0), .addr, .din, .write_n, .read_n(1'b1), .local_line(1'b0),
    .dout(dout[0]), .dout_en(dout_en[0]), .dil_on(4'b1111), .sw('0), .psu_ok(4'hF),
    .ind(ind[0]), .clk_mon(clk_mon[0]), .trig_mon(trig_mon[0]), .out(out[0]),
    .out_sum(out_sum[0]));
  counter_drawer #(.COUNTER_STAGES(2)) u_b (.clk(clk_b), .rst_n, .trig_rear(trig_rear[1]),
    .trig_fp(1'b0), .fast_disable(4'b0), .addr, .din, .write_n, .read_n(1'b1),
    .local_line(1'b0), .dout(dout[1]), .dout_en(dout_en[1]), .dil_on(4'b1101), .sw('0),
    .psu_ok(4'hF), .ind(ind[1]), .clk_mon(clk_mon[1]), .trig_mon(trig_mon[1]),
    .out(out[1]), .out_sum(out_sum[1]));
  counter_drawer #(.COUNTER_STAGES(1)) u_c (.clk(clk_b), .rst_n, .trig_rear(trig_rear[2]),
    .trig_fp(1'b0), .fast_disable(4'b0), .addr, .din, .write_n, .read_n(1'b1),
    .local_line(1'b0), .dout(dout[2]), .dout_en(dout_en[2]), .dil_on(4'b1011), .sw('0),
    .psu_ok(4'hF), .ind(ind[2]), .clk_mon(clk_mon[2]), .trig_mon(trig_mon[2]),
    .out(out[2]), .out_sum(out_sum[2]));

  initial begin
    #80ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime rise_t [3][4];
  realtime fall_t [3][4];
  int      n_rise [3][4];
  for (genvar d = 0; d < 3; d++) begin : g_d
    for (genvar c = 0; c < 4; c++) begin : g_c
      always @(posedge out[d][c]) if (rst_n) begin rise_t[d][c] = $realtime; n_rise[d][c]++; end
      always @(negedge out[d][c]) fall_t[d][c] = $realtime;
    end
  end

  task automatic bus_write(input int d, input int b, input logic [7:0] v);
    addr = {3'(d), 5'(b)}; din = v;
    #20 write_n = 0;
    #50 write_n = 1;
    #20;
  endtask

  task automatic program_counter(input int d, input int c, input int unsigned n,
                                 input int unsigned f, inout logic [7:0] b2);
    bus_write(d, 3 + 4*c, ~8'(n));
    bus_write(d, 4 + 4*c, ~8'(n >> 8));
    bus_write(d, 5 + 4*c, ~8'(n >> 16));
    bus_write(d, 2 + 4*c, ~8'(f >> 1));
    b2[c] = ~f[0];
    bus_write(d, 1, b2);
  endtask

  int unsigned exp_n [3][4];
  int unsigned exp_f [3][4];
  realtime     t_edge [3];
  realtime     tclk [3] = '{TA, TB, TB};

  initial begin
    logic [7:0] b2;
    for (int d = 0; d < 3; d++) for (int c = 0; c < 4; c++) n_rise[d][c] = 0;
    #1 rst_n = 0;
    #10 rst_n = 1;
    exp_n[0] = '{16777215, 255, 256, 65535};
    exp_f[0] = '{511, 0, 1, 256};
    exp_n[1] = '{65535, 65535, 256, 1};
    exp_f[1] = '{511, 0, 0, 0};
    exp_n[2] = '{255, 254, 1, 0};
    exp_f[2] = '{511, 255, 0, 0};
    for (int d = 0; d < 3; d++) begin
      b2 = 8'hFF;
      bus_write(d, 0, 8'b0111_1111);   // trigger 1, all enabled
      for (int c = 0; c < 4; c++) program_counter(d, c, exp_n[d][c], exp_f[d][c], b2);
    end
    for (int d = 0; d < 3; d++) for (int c = 0; c < 4; c++) n_rise[d][c] = 0;
    fork
      begin @(posedge clk_a); #0.5 trig_rear[0][0] = 1; @(posedge clk_a); t_edge[0] = $realtime; end
      begin @(posedge clk_b); #0.5 trig_rear[1][0] = 1; @(posedge clk_b); t_edge[1] = $realtime; end
      begin @(posedge clk_b); #0.5 trig_rear[2][0] = 1; @(posedge clk_b); t_edge[2] = $realtime; end
    join
    #100 trig_rear = '0;
    #((16777215 + 8) * TA);
    for (int d = 0; d < 3; d++)
      for (int c = 0; c < 4; c++) begin
        realtime exp_t;
        exp_t = t_edge[d] + (2 + exp_n[d][c]) * tclk[d] + exp_f[d][c] * 0.010;
        checks++;
        if (n_rise[d][c] != 1 || rise_t[d][c] < exp_t - 0.001 || rise_t[d][c] > exp_t + 0.001 ||
            fall_t[d][c] - rise_t[d][c] < tclk[d] - 0.001 ||
            fall_t[d][c] - rise_t[d][c] > tclk[d] + 0.001) begin
          failures++;
          $display("drawer %0d ch %0d: %0d pulses, rise %0.3f expected %0.3f", d, c,
                   n_rise[d][c], rise_t[d][c], exp_t);
        end
      end
    $display("longest delay: %0.6f ms", (rise_t[0][0] - t_edge[0]) / 1.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
