// fifo_ptr: wrapping pointer counter, used as both the write pointer (WPTR)
// and the read pointer (RPTR) of the FIFO.
//
// The pointer starts at 0 on reset and advances by one on every clock edge
// at which cnt_en is high, wrapping from DEPTH-1 back to 0. DEPTH need not be
// a power of two (a 6-deep FIFO uses locations 0..5), so the wrap is an
// explicit compare rather than a natural overflow.
//
// Ports: clk, rst (active high, synchronous), cnt_en (advance), ptr (the
// current location, registered). The start value of 0 and the wrap after the
// last location follow the lab description; the synchronous reset is this
// design's choice.
module fifo_ptr #(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = fifo_pkg::addr_bits(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cnt_en,
  output logic [AW-1:0] ptr
);

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  always_ff @(posedge clk) begin
    if (rst)
      ptr <= '0;
    else if (cnt_en)
      ptr <= (ptr == LAST) ? '0 : ptr + AW'(1);
  end

endmodule
