// ee457_fifo_p2: generic DEPTH x WIDTH FIFO that accepts a write while full
// if a read is carried out in the same cycle.
//
// Structure and interface are those of ee457_fifo: a register array, a write
// pointer, a read pointer and a counting control unit. The difference is one
// rule in the control unit. In the basic FIFO a full buffer refuses every
// write until a read has freed a location. Here, when the buffer is full and
// ren is high, the read frees the oldest location at the coming clock edge,
// so a write in that same cycle is accepted: the word goes into the location
// at the write pointer (which, when full, equals the read pointer), the
// count stays at DEPTH and full stays high. A producer and a consumer can
// therefore stream through a full FIFO at one word per clock. Because a
// write can now succeed while full is high, full alone no longer tells the
// producer whether its write was taken: the write was taken when
// wen && (!full || ren).
//
// Timing: as ee457_fifo. dout is the array word at the read pointer, read
// combinationally; when a write and a read hit the same location at one
// edge, the consumer has already seen the old word in that cycle, and the
// new word becomes the newest entry. A read of an empty FIFO is still
// refused, even with a write in the same cycle.
//
// The write-on-read rule follows the lab description; the refused read when
// empty, the synchronous reset and the combinational read port are this
// design's choices.
//
// The control unit's item-count output is left unconnected on purpose:
// full and empty carry all the user needs, and the count stays internal.
module ee457_fifo_p2
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

  fifo_ctrl #(.DEPTH(DEPTH), .MODE(FIFO_MODE_WR_ON_READ)) u_ctrl (
    .clk, .rst, .wen_req(wen), .ren_req(ren),
    .wr_do, .rd_do, .full, .empty, .count()
  );

  fifo_ptr #(.DEPTH(DEPTH)) u_wptr (.clk, .rst, .cnt_en(wr_do), .ptr(waddr));
  fifo_ptr #(.DEPTH(DEPTH)) u_rptr (.clk, .rst, .cnt_en(rd_do), .ptr(raddr));

  fifo_regarray #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_array (
    .clk, .din, .waddr, .wen(wr_do), .raddr, .dout
  );

endmodule
