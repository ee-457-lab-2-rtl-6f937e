// ee457_fifo_lab_top: the two FIFOs of the design side by side.
//
// p1_* is the basic FIFO (ee457_fifo): a write while full and a read while
// empty are both ignored. p2_* is the updated FIFO (ee457_fifo_p2): a write
// while full is accepted when a read is carried out in the same cycle. Each
// has its own data, request and flag ports; they share clk and rst (active
// high, synchronous). Both are WIDTH x DEPTH, 8 bits by 4 locations by
// default, the size the lab's own test uses. Port timing is that of
// ee457_fifo: dout is valid whenever empty is low, and requests are sampled
// at the rising clock edge.
module ee457_fifo_lab_top #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  // basic FIFO
  input  logic [WIDTH-1:0] p1_din,
  input  logic             p1_wen,
  output logic             p1_full,
  output logic [WIDTH-1:0] p1_dout,
  input  logic             p1_ren,
  output logic             p1_empty,
  // FIFO with write-on-read while full
  input  logic [WIDTH-1:0] p2_din,
  input  logic             p2_wen,
  output logic             p2_full,
  output logic [WIDTH-1:0] p2_dout,
  input  logic             p2_ren,
  output logic             p2_empty
);

  ee457_fifo #(WIDTH, DEPTH) u_fifo_p1 (
    .clk, .rst, .din(p1_din), .wen(p1_wen), .full(p1_full),
    .dout(p1_dout), .ren(p1_ren), .empty(p1_empty)
  );

  ee457_fifo_p2 #(WIDTH, DEPTH) u_fifo_p2 (
    .clk, .rst, .din(p2_din), .wen(p2_wen), .full(p2_full),
    .dout(p2_dout), .ren(p2_ren), .empty(p2_empty)
  );

endmodule
