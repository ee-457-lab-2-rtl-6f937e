// fifo_scoreboard: reference model and checker for one FIFO, used by the
// FIFO testbenches.
//
// It watches a FIFO's ports and, at every rising clock edge, compares the
// outputs the FIFO shows before that edge with an independent model: a
// queue of the words accepted so far. Before the edge it expects
//   empty == (queue empty), full == (queue holds DEPTH words),
//   dout  == oldest word, whenever the queue is not empty.
// It then applies the edge: a read is taken when ren is high and the queue
// is not empty; a write is taken when wen is high and the queue is not full,
// or, with WR_ON_READ set, when it is full and a read is taken in the same
// cycle. rst empties the queue. Stimulus must change away from the rising
// edge (the testbenches drive on the falling edge).
//
// It also counts how often each mechanism occurred, so that a testbench can
// fail when its stimulus never reached one.
module fifo_scoreboard #(
  parameter int unsigned WIDTH      = 8,
  parameter int unsigned DEPTH      = 4,
  parameter bit          WR_ON_READ = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din,
  input  logic             wen,
  input  logic             ren,
  input  logic             full,
  input  logic             empty,
  input  logic [WIDTH-1:0] dout,
  output int               checks,
  output int               failures,
  output int               n_write,          // writes taken
  output int               n_read,           // reads taken
  output int               n_write_refused,  // wen while full, not taken
  output int               n_read_refused,   // ren while empty, not taken
  output int               n_write_on_full,  // write taken while full
  output int               n_both,           // write and read in one cycle
  output int               n_full_cycles,    // cycles with the FIFO full
  output int               n_wp_wrap,        // write pointer wrapped to 0
  output int               n_rp_wrap,        // read pointer wrapped to 0
  output int               n_reset,          // resets seen while holding data
  output int               n_full_wr_rd      // cycles full with wen and ren high
);

  logic [WIDTH-1:0] q[$];
  int unsigned      wp, rp;

  initial begin
    checks = 0; failures = 0; n_write = 0; n_read = 0; n_write_refused = 0;
    n_read_refused = 0; n_write_on_full = 0; n_both = 0; n_full_cycles = 0;
    n_wp_wrap = 0; n_rp_wrap = 0; n_reset = 0; n_full_wr_rd = 0; wp = 0; rp = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("%m t=%0t: mismatch: %s", $time, what);
    end
  endtask

  always @(posedge clk) begin
    bit exp_empty, exp_full, rd, wr;
    if (rst) begin
      if (q.size() != 0) n_reset++;
      q.delete();
      wp = 0;
      rp = 0;
    end else begin
      exp_empty = (q.size() == 0);
      exp_full  = (q.size() == DEPTH);
      check(empty == exp_empty, $sformatf("empty=%0b expected %0b", empty, exp_empty));
      check(full == exp_full, $sformatf("full=%0b expected %0b", full, exp_full));
      if (!exp_empty)
        check(dout == q[0], $sformatf("dout=%h expected %h", dout, q[0]));
      rd = ren && !exp_empty;
      wr = wen && (!exp_full || (WR_ON_READ && rd));
      if (ren && !rd) n_read_refused++;
      if (wen && !wr) n_write_refused++;
      if (wr && exp_full) n_write_on_full++;
      if (wr && rd) n_both++;
      if (exp_full) n_full_cycles++;
      if (exp_full && wen && ren) n_full_wr_rd++;
      if (rd) begin
        void'(q.pop_front());
        n_read++;
        rp = (rp == DEPTH - 1) ? 0 : rp + 1;
        if (rp == 0) n_rp_wrap++;
      end
      if (wr) begin
        q.push_back(din);
        n_write++;
        wp = (wp == DEPTH - 1) ? 0 : wp + 1;
        if (wp == 0) n_wp_wrap++;
      end
    end
  end

endmodule
