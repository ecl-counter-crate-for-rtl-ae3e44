`timescale 1ns/1ps
// Computer interface of a drawer: address decode and the 18 setting latches.
//
// The control bus carries an address byte, a data byte in, a data byte out
// and the active-low WRITE and READ strobes. A7..A5 select the drawer; it
// responds when they equal the board address set on its DIL switch. A4..A0
// pick one of the NUM_BYTES latches (byte 1 at address 0 .. byte 18 at 17).
//
// Write: the latch takes the data byte at the low-to-high edge of WRITE, at
// which point address and data are still stable (they must hold 20 ns past
// it). Read: while READ is low and the drawer is addressed, dout carries the
// addressed latch and dout_en is high; otherwise dout is zero, so the crate
// can OR the drawers' outputs. Addresses 18..31 are ignored on write and
// read back as zero. Both strobes may be used whatever the local/remote
// state. Reset (active low) sets every latch to all ones, the code for zero
// delay, 10 ps steps off, trigger 1 and all counters enabled; reset and the
// unused-address behaviour are this design's choices. Assertions flag a
// host that changes address or data while a strobe is low, or asserts both
// strobes together.
module drawer_regs
  import ctf3_timing_pkg::*;
#(
  parameter int unsigned NUM_LATCHES = NUM_BYTES
) (
  input  logic                         rst_n,
  input  logic [2:0]                   board_addr,
  input  logic [7:0]                   addr,
  input  logic [7:0]                   din,
  input  logic                         write_n,
  input  logic                         read_n,
  output logic [7:0]                   dout,
  output logic                         dout_en,
  output logic                         addressed,
  output logic [NUM_LATCHES-1:0][7:0]  regs
);

  logic [4:0] byte_idx;
  logic       byte_valid;

  assign addressed  = (addr[7:5] == board_addr);
  assign byte_idx   = addr[4:0];
  assign byte_valid = (32'(byte_idx) < NUM_LATCHES);

  // The WRITE strobe's rising edge is the latch clock.
  always_ff @(posedge write_n or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '1;
    end else if (addressed && byte_valid) begin
      regs[byte_idx] <= din;
    end
  end

  always_comb begin
    dout_en = addressed & ~read_n;
    dout    = '0;
    if (dout_en && byte_valid) dout = regs[byte_idx];
  end

  // Bus rules: a host never asserts both strobes at once, and keeps the
  // address (and, while writing, the data) stable while a strobe is low.
  always @(negedge write_n) begin
    assert (read_n) else $error("WRITE and READ low together");
  end

  always @(addr) begin
    assert (write_n && read_n) else $error("address changed during a strobe");
  end

  always @(din) begin
    assert (write_n) else $error("data changed during WRITE");
  end

endmodule
