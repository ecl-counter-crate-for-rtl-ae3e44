`timescale 1ns/1ps
// Exhaustive test of fanout_combiner: fan-out copies and complements, and
// the combiner OR with its true and complementary outputs.
module tb_fanout_combiner;
  logic       fo_in;
  logic [3:0] fo_out, comb_in;
  logic [1:0] fo_out_n, comb_out, comb_out_n;
  int checks = 0, failures = 0;

  fanout_combiner dut (.fo_in, .fo_out, .fo_out_n, .comb_in, .comb_out, .comb_out_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 32; p++) begin
      logic any;
      {fo_in, comb_in} = p[4:0];
      any = (p[3:0] != 0);
      #1;
      checks++;
      if (fo_out !== (p[4] ? 4'b1111 : 4'b0000) || fo_out_n !== (p[4] ? 2'b00 : 2'b11) ||
          comb_out !== {any, any} || comb_out_n !== {!any, !any}) begin
        failures++;
        $display("pattern %b wrong", p[4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
