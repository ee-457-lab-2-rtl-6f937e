// ee457_fifo: generic DEPTH x WIDTH first-in first-out buffer (basic form).
//
// A producer writes words on din with wen; a consumer sees the oldest word
// on dout and takes it with ren. Inside are a register array of DEPTH words,
// a write pointer (next location to write), a read pointer (next location to
// read), and a control unit that counts the items held, drives full and
// empty from that count, and carries out only the requests that can be
// served: a write is ignored while full, a read is ignored while empty. A
// write and a read in the same cycle both take place when neither flag
// blocks them. Both pointers start at 0 and wrap after location DEPTH-1.
//
// Timing: dout is the array word at the read pointer, read combinationally,
// so the oldest word is on dout whenever empty is low (first-word
// fall-through). ren asserted in a cycle means the consumer takes that word;
// the next word appears after the clock edge. full and empty are registered
// state and change only at clock edges. rst is active high and synchronous;
// it clears the pointers and the count but not the array.
//
// The structure, the parameter order (WIDTH then DEPTH), the port order and
// the item counter follow the lab description; the synchronous reset and
// the combinational read port are this design's choices.
//
// The control unit's item-count output is left unconnected on purpose:
// full and empty carry all the user needs, and the count stays internal.
module ee457_fifo
  import fifo_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  input  logic             wen,
  output logic             full,
  output logic [WIDTH-1:0] dout,
  input  logic             ren,
  output logic             empty
);

  localparam int unsigned AW = addr_bits(DEPTH);

  logic          wr_do, rd_do;
  logic [AW-1:0] waddr, raddr;

  fifo_ctrl #(.DEPTH(DEPTH), .MODE(FIFO_MODE_STRICT)) u_ctrl (
    .clk, .rst, .wen_req(wen), .ren_req(ren),
    .wr_do, .rd_do, .full, .empty, .count()
  );

  fifo_ptr #(.DEPTH(DEPTH)) u_wptr (.clk, .rst, .cnt_en(wr_do), .ptr(waddr));
  fifo_ptr #(.DEPTH(DEPTH)) u_rptr (.clk, .rst, .cnt_en(rd_do), .ptr(raddr));

  fifo_regarray #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_array (
    .clk, .din, .waddr, .wen(wr_do), .raddr, .dout
  );

endmodule
