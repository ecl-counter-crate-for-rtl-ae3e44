`timescale 1ns/1ps
// Coarse delay of one channel: cascaded 8-bit counters.
//
// NUM_STAGES counter8 chips (three for the full 24 bits; one or two when 8
// or 16 bits suffice) form one up-counter. In the load cycle, the first
// clock cycle after the trigger edge, the counter takes load_value. From the
// next cycle on it counts up, one step per clock, until every stage shows
// all ones. The cycle after that terminal count, out is high for exactly one
// clock period, unless disable_i is high in the terminal-count cycle. The
// counter then holds until the next load. A load while counting restarts it.
//
// Because the counter counts up to all ones, the delay in clock periods is
// the bitwise inverse of load_value: the value written by the computer is
// loaded as it is. With the load edge at clock edge L, out rises at edge
// L + 1 + delay. The hold at terminal count and the disable gating at the
// output register are this design's choices.
module delay_counter #(
  parameter int unsigned NUM_STAGES = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,       // load cycle strobe
  input  logic [8*NUM_STAGES-1:0] load_value, // inverse of the delay
  input  logic                    disable_i,  // 1 = suppress the output
  output logic                    out,        // one clock period long
  output logic                    running
);

  logic [NUM_STAGES-1:0] tc;
  logic [NUM_STAGES-1:0] stage_ce;
  logic                  tc_all;
  logic                  count_en;

  assign tc_all   = &tc;
  assign count_en = running & ~tc_all;

  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_stage
    // A stage advances when every stage below it is at terminal count.
    if (s == 0) begin : g_first
      assign stage_ce[s] = count_en;
    end else begin : g_next
      assign stage_ce[s] = count_en & (&tc[s-1:0]);
    end
    counter8 u_cnt (
      .clk  (clk),
      .rst_n(rst_n),
      .load (load),
      .d    (load_value[8*s +: 8]),
      .ce   (stage_ce[s]),
      .q    (),
      .tc   (tc[s])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      out     <= 1'b0;
    end else begin
      out <= running & tc_all & ~load & ~disable_i;
      if (load)                  running <= 1'b1;
      else if (running & tc_all) running <= 1'b0;
    end
  end

endmodule
