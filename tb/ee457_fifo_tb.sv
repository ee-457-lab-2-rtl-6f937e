// ee457_fifo_tb: self-checking testbench for the basic FIFO (ee457_fifo).
//
// Two FIFOs run on the same requests: 8 bits x 4 deep (the default size)
// and 16 bits x 6 deep (a depth that is not a power of two). Each is
// checked every cycle by a fifo_scoreboard against a queue model. The
// stimulus is a directed part (overfill, overdrain, a one-cycle latency
// check, a stream of simultaneous reads and writes while full, a reset with
// data held) followed by random traffic whose write and read probabilities
// change every 64 cycles so that the FIFOs swing between full and empty.
// Requests are driven on the falling clock edge.
//
// Checked besides the scoreboard: a word written into an empty FIFO is on
// dout, with empty low, one clock later; while full with both requests high
// the basic FIFO refuses the write (exactly one refusal, then one word per
// clock). Every mechanism (refused write, refused read, simultaneous read
// and write, both pointer wraps, full, reset) must occur at least once.
module ee457_fifo_tb;

  localparam bit WR_ON_READ = 1'b0;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [15:0] din = '0;
  logic        wen = 1'b0;
  logic        ren = 1'b0;

  logic       full_a, empty_a, full_b, empty_b;
  logic [7:0]  dout_a;
  logic [15:0] dout_b;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ee457_fifo #(8, 4) dut_a (
    .clk, .rst, .din(din[7:0]), .wen, .full(full_a), .dout(dout_a), .ren, .empty(empty_a)
  );
  ee457_fifo #(16, 6) dut_b (
    .clk, .rst, .din, .wen, .full(full_b), .dout(dout_b), .ren, .empty(empty_b)
  );

  int a_chk, a_fail, a_wr, a_rd, a_wref, a_rref, a_wfull, a_both, a_fullc, a_wwrap, a_rwrap, a_rst, a_fwr;
  int b_chk, b_fail, b_wr, b_rd, b_wref, b_rref, b_wfull, b_both, b_fullc, b_wwrap, b_rwrap, b_rst, b_fwr;

  fifo_scoreboard #(.WIDTH(8), .DEPTH(4), .WR_ON_READ(WR_ON_READ)) sb_a (
    .clk, .rst, .din(din[7:0]), .wen, .ren, .full(full_a), .empty(empty_a), .dout(dout_a),
    .checks(a_chk), .failures(a_fail), .n_write(a_wr), .n_read(a_rd),
    .n_write_refused(a_wref), .n_read_refused(a_rref), .n_write_on_full(a_wfull),
    .n_both(a_both), .n_full_cycles(a_fullc), .n_wp_wrap(a_wwrap), .n_rp_wrap(a_rwrap),
    .n_reset(a_rst), .n_full_wr_rd(a_fwr)
  );
  fifo_scoreboard #(.WIDTH(16), .DEPTH(6), .WR_ON_READ(WR_ON_READ)) sb_b (
    .clk, .rst, .din, .wen, .ren, .full(full_b), .empty(empty_b), .dout(dout_b),
    .checks(b_chk), .failures(b_fail), .n_write(b_wr), .n_read(b_rd),
    .n_write_refused(b_wref), .n_read_refused(b_rref), .n_write_on_full(b_wfull),
    .n_both(b_both), .n_full_cycles(b_fullc), .n_wp_wrap(b_wwrap), .n_rp_wrap(b_rwrap),
    .n_reset(b_rst), .n_full_wr_rd(b_fwr)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ee457_fifo_tb t=%0t: %s", $time, what);
    end
  endtask

  task automatic drive(input bit w, input bit r);
    @(negedge clk);
    wen = w;
    ren = r;
    din = 16'($urandom);
  endtask

  task automatic finish();
    checks   += a_chk + b_chk;
    failures += a_fail + b_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    $display("ee457_fifo_tb: watchdog expired");
    failures++;
    finish();
  end

  initial begin
    int wref0, wfull0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Flags straight after reset.
    @(negedge clk);
    check(empty_a && !full_a && empty_b && !full_b, "flags after reset");

    // Overfill, then overdrain, both FIFOs.
    repeat (8) drive(1, 0);
    repeat (8) drive(0, 1);
    drive(0, 0);

    // One-cycle write latency: the word is on dout one clock later.
    drive(1, 0);
    @(negedge clk);
    wen = 1'b0;
    check(!empty_a && dout_a == din[7:0], "4-deep: written word not on dout one clock later");
    check(!empty_b && dout_b == din, "6-deep: written word not on dout one clock later");
    drive(0, 1);
    drive(0, 0);

    // Full with a read and a write requested every cycle.
    repeat (6) drive(1, 0);
    drive(0, 0);
    check(full_a && full_b, "not full after six writes");
    wref0  = a_wref;
    wfull0 = a_wfull;
    repeat (20) drive(1, 1);
    drive(0, 0);
    if (WR_ON_READ) begin
      check(a_wfull - wfull0 == 20, $sformatf("4-deep: %0d of 20 writes taken while full", a_wfull - wfull0));
      check(full_a, "4-deep: not full after streaming while full");
    end else begin
      check(a_wref - wref0 == 1, $sformatf("4-deep: %0d writes refused in stream, expected 1", a_wref - wref0));
      check(a_wfull == 0, "4-deep: write taken while full");
    end

    // Reset with data held.
    drive(0, 0);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(empty_a && !full_a && empty_b && !full_b, "flags after reset with data held");

    // Random traffic with a changing bias.
    for (int blk = 0; blk < 40; blk++) begin
      int pw, pr;
      pw = 10 + 20 * ($urandom % 5);
      pr = 10 + 20 * ($urandom % 5);
      repeat (64) drive(($urandom % 100) < pw, ($urandom % 100) < pr);
    end
    drive(0, 0);
    @(negedge clk);

    // Every mechanism must have occurred on both FIFOs.
    check(a_wref > 0 && b_wref > 0, "no write refused while full");
    check(a_rref > 0 && b_rref > 0, "no read refused while empty");
    check(a_both > 0 && b_both > 0, "no simultaneous read and write");
    check(a_wwrap > 0 && b_wwrap > 0 && a_rwrap > 0 && b_rwrap > 0, "a pointer never wrapped");
    check(a_fullc > 0 && b_fullc > 0, "never full");
    check(a_fwr > 0 && b_fwr > 0, "never full with both requests high");
    check(a_rst > 0 && b_rst > 0, "no reset with data held");
    $display("4-deep: writes=%0d reads=%0d refused w/r=%0d/%0d both=%0d on-full=%0d wraps w/r=%0d/%0d",
             a_wr, a_rd, a_wref, a_rref, a_both, a_wfull, a_wwrap, a_rwrap);
    $display("6-deep: writes=%0d reads=%0d refused w/r=%0d/%0d both=%0d on-full=%0d wraps w/r=%0d/%0d",
             b_wr, b_rd, b_wref, b_rref, b_both, b_wfull, b_wwrap, b_rwrap);
    finish();
  end

endmodule
