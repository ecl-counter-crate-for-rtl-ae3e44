`timescale 1ns/1ps
// Test of drawer_regs with bus cycles timed as the host drives them: address
// and data stable 20 ns before and after a 50 ns strobe. Random writes to
// this board's 18 bytes, to unused byte addresses and to other boards'
// addresses, checked against a shadow copy by random read-backs and by the
// parallel register outputs. Also checks the reset value.
module tb_drawer_regs;
  logic             rst_n = 1;
  logic [2:0]       board_addr = 3'd5;
  logic [7:0]       addr = 0, din = 0, dout;
  logic             write_n = 1, read_n = 1, dout_en, addressed;
  logic [17:0][7:0] regs;
  logic [7:0]       shadow [18];
  int checks = 0, failures = 0;
  int foreign_writes = 0, unused_writes = 0;

  drawer_regs dut (.rst_n, .board_addr, .addr, .din, .write_n, .read_n,
                   .dout, .dout_en, .addressed, .regs);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input logic [7:0] a, input logic [7:0] d);
    addr = a; din = d;
    #20 write_n = 0;
    #50 write_n = 1;
    #20;
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [7:0] d, output logic en);
    addr = a;
    #20 read_n = 0;
    #40 d = dout; en = dout_en;
    #10 read_n = 1;
    #20;
  endtask

  initial begin
    logic [7:0] d, a;
    logic en;
    #2 rst_n = 0;
    #5 rst_n = 1;
    for (int i = 0; i < 18; i++) shadow[i] = 8'hFF;
    // reset value read back
    for (int i = 0; i < 18; i++) begin
      bus_read({3'd5, 5'(i)}, d, en);
      checks++;
      if (d !== 8'hFF || !en) begin failures++; $display("reset byte %0d = %h", i, d); end
    end
    for (int i = 0; i < 3000; i++) begin
      int unsigned kind;
      kind = $urandom % 10;
      if (kind < 5) begin
        a = {3'd5, 5'($urandom % 18)};
        d = 8'($urandom);
        bus_write(a, d);
        shadow[a[4:0]] = d;
      end else if (kind == 5) begin
        a = {3'($urandom % 5), 5'($urandom % 18)};   // boards 0..4
        bus_write(a, 8'($urandom));
        foreign_writes++;
      end else if (kind == 6) begin
        a = {3'd5, 5'(18 + $urandom % 14)};
        bus_write(a, 8'($urandom));
        unused_writes++;
      end else begin
        a = {3'($urandom % 8), 5'($urandom % 32)};
        bus_read(a, d, en);
        checks++;
        if (a[7:5] != 3'd5) begin
          if (en || d !== 8'h00) begin failures++; $display("foreign read answered"); end
        end else if (a[4:0] >= 18) begin
          if (!en || d !== 8'h00) begin failures++; $display("unused read %h", d); end
        end else if (!en || d !== shadow[a[4:0]]) begin
          failures++;
          $display("read %h = %h expected %h", a, d, shadow[a[4:0]]);
        end
      end
    end
    for (int i = 0; i < 18; i++) begin
      checks++;
      if (regs[i] !== shadow[i]) begin failures++; $display("regs[%0d] wrong", i); end
    end
    // no read strobe: output must be quiet
    addr = {3'd5, 5'd0};
    #10;
    checks++;
    if (dout_en || dout !== 0 || !addressed) begin failures++; $display("idle bus driven"); end
    checks++;
    if (foreign_writes == 0 || unused_writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
