// fifo_ctrl: the FIFO's control unit.
//
// It turns the user's requests (wen_req, ren_req) into the operations that
// are actually carried out, keeps a count of the items held, and derives the
// Full and Empty flags from that count:
//   empty = (count == 0), full = (count == DEPTH).
// Both flags come straight from the count register, so they are Moore
// outputs: they change only at a clock edge.
//
// A read is carried out when ren_req is high and the FIFO is not empty.
// A write is carried out when wen_req is high and
//   MODE == FIFO_MODE_STRICT     : the FIFO is not full;
//   MODE == FIFO_MODE_WR_ON_READ : the FIFO is not full, or a read is carried
//                                  out in the same cycle (that read frees a
//                                  location at the same edge).
// wr_do drives the register array's write enable and the write pointer's
// count enable; rd_do drives the read pointer's count enable. The count goes
// up on a write alone, down on a read alone and stays on both.
//
// Ports: clk, rst (active high, synchronous; empties the FIFO), wen_req,
// ren_req, wr_do, rd_do, full, empty, count. The item counter, the
// refusal of writes when full and reads when empty, and the write-on-read
// rule follow the lab description. A read of an empty FIFO stays refused
// in both modes even when a write arrives in the same cycle, and the reset
// is synchronous: both are this design's choices.
module fifo_ctrl
  import fifo_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter fifo_mode_e  MODE  = FIFO_MODE_STRICT,
  localparam int unsigned CW   = count_bits(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wen_req,
  input  logic          ren_req,
  output logic          wr_do,
  output logic          rd_do,
  output logic          full,
  output logic          empty,
  output logic [CW-1:0] count
);

  localparam logic [CW-1:0] CAP = CW'(DEPTH);

  assign empty = (count == '0);
  assign full  = (count == CAP);

  always_comb begin
    rd_do = ren_req && !empty;
    if (MODE == FIFO_MODE_WR_ON_READ)
      wr_do = wen_req && (!full || rd_do);
    else
      wr_do = wen_req && !full;
  end

  always_ff @(posedge clk) begin
    if (rst)
      count <= '0;
    else if (wr_do && !rd_do)
      count <= count + CW'(1);
    else if (rd_do && !wr_do)
      count <= count - CW'(1);
  end

  // The count never leaves 0..DEPTH.
  a_count_range: assert property (@(posedge clk) disable iff (rst) count <= CAP);
  // Nothing is read from an empty FIFO.
  a_no_read_empty: assert property (@(posedge clk) disable iff (rst) !(rd_do && empty));
  // A full FIFO takes a write only together with a read.
  a_no_write_full: assert property (@(posedge clk) disable iff (rst)
                                    !(wr_do && full && !rd_do));

endmodule
