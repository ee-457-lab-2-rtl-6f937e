// ee457_fifo_lab_top_tb: end-to-end testbench of the two-FIFO top level at
// its default size (8 bits x 4 locations, no parameter override).
//
// The basic FIFO (p1) and the write-on-read FIFO (p2) get independent
// request streams and each is checked every cycle by a fifo_scoreboard in
// the matching mode. The run has three parts: a stream of simultaneous
// reads and writes on both FIFOs while they are full, which must be refused
// once by p1 and taken at one word per clock by p2; a reset with data held;
// and random traffic with a bias that changes every 64 cycles. Each
// mechanism of the design must occur at least once on the FIFO that has it:
// write refused while full, read refused while empty, read and write in one
// cycle, both pointer wraps, reset with data held, and, on p2 only, a write
// taken while full (p1 must never take one).
module ee457_fifo_lab_top_tb;

  localparam int unsigned W = 8;
  localparam int unsigned D = 4;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [W-1:0] p1_din = '0, p2_din = '0;
  logic         p1_wen = 1'b0, p1_ren = 1'b0, p2_wen = 1'b0, p2_ren = 1'b0;
  logic         p1_full, p1_empty, p2_full, p2_empty;
  logic [W-1:0] p1_dout, p2_dout;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ee457_fifo_lab_top dut (.*);

  int c1, f1, w1, r1, wref1, rref1, wfull1, both1, fullc1, wwrap1, rwrap1, rst1, fwr1;
  int c2, f2, w2, r2, wref2, rref2, wfull2, both2, fullc2, wwrap2, rwrap2, rst2, fwr2;

  fifo_scoreboard #(.WIDTH(W), .DEPTH(D), .WR_ON_READ(1'b0)) sb1 (
    .clk, .rst, .din(p1_din), .wen(p1_wen), .ren(p1_ren), .full(p1_full),
    .empty(p1_empty), .dout(p1_dout), .checks(c1), .failures(f1), .n_write(w1),
    .n_read(r1), .n_write_refused(wref1), .n_read_refused(rref1),
    .n_write_on_full(wfull1), .n_both(both1), .n_full_cycles(fullc1),
    .n_wp_wrap(wwrap1), .n_rp_wrap(rwrap1), .n_reset(rst1), .n_full_wr_rd(fwr1)
  );
  fifo_scoreboard #(.WIDTH(W), .DEPTH(D), .WR_ON_READ(1'b1)) sb2 (
    .clk, .rst, .din(p2_din), .wen(p2_wen), .ren(p2_ren), .full(p2_full),
    .empty(p2_empty), .dout(p2_dout), .checks(c2), .failures(f2), .n_write(w2),
    .n_read(r2), .n_write_refused(wref2), .n_read_refused(rref2),
    .n_write_on_full(wfull2), .n_both(both2), .n_full_cycles(fullc2),
    .n_wp_wrap(wwrap2), .n_rp_wrap(rwrap2), .n_reset(rst2), .n_full_wr_rd(fwr2)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ee457_fifo_lab_top_tb t=%0t: %s", $time, what);
    end
  endtask

  task automatic drive(input bit w1_, input bit r1_, input bit w2_, input bit r2_);
    @(negedge clk);
    p1_wen = w1_; p1_ren = r1_; p1_din = W'($urandom);
    p2_wen = w2_; p2_ren = r2_; p2_din = W'($urandom);
  endtask

  task automatic finish();
    checks   += c1 + c2;
    failures += f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("ee457_fifo_lab_top_tb: watchdog expired");
    failures++;
    finish();
  end

  initial begin
    int wref1_0, w1_0, wfull2_0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Fill both, then stream reads and writes while full.
    repeat (D) drive(1, 0, 1, 0);
    drive(0, 0, 0, 0);
    check(p1_full && p2_full, "not full after DEPTH writes");
    wref1_0 = wref1; w1_0 = w1; wfull2_0 = wfull2;
    repeat (16) drive(1, 1, 1, 1);
    drive(0, 0, 0, 0);
    check(wref1 - wref1_0 == 1, $sformatf("p1: %0d writes refused in stream, expected 1", wref1 - wref1_0));
    check(w1 - w1_0 == 15, $sformatf("p1: %0d of 16 writes taken, expected 15", w1 - w1_0));
    check(wfull2 - wfull2_0 == 16, $sformatf("p2: %0d of 16 writes taken while full", wfull2 - wfull2_0));
    check(!p1_full && p2_full, "p1 should sit one below full, p2 full");

    // Reset with data held.
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(p1_empty && p2_empty && !p1_full && !p2_full, "flags after reset");

    // Random traffic.
    for (int blk = 0; blk < 40; blk++) begin
      int pw1, pr1, pw2, pr2;
      pw1 = 10 + 20 * ($urandom % 5); pr1 = 10 + 20 * ($urandom % 5);
      pw2 = 10 + 20 * ($urandom % 5); pr2 = 10 + 20 * ($urandom % 5);
      repeat (64) drive(($urandom % 100) < pw1, ($urandom % 100) < pr1,
                        ($urandom % 100) < pw2, ($urandom % 100) < pr2);
    end
    drive(0, 0, 0, 0);
    @(negedge clk);

    check(wref1 > 0 && wref2 > 0, "no write refused while full");
    check(rref1 > 0 && rref2 > 0, "no read refused while empty");
    check(both1 > 0 && both2 > 0, "no read and write in one cycle");
    check(wwrap1 > 0 && rwrap1 > 0 && wwrap2 > 0 && rwrap2 > 0, "a pointer never wrapped");
    check(rst1 > 0 && rst2 > 0, "no reset with data held");
    check(wfull2 > 0, "p2: no write taken while full");
    check(wfull1 == 0, "p1: write taken while full");
    $display("p1: writes=%0d reads=%0d refused w/r=%0d/%0d both=%0d full-cycles=%0d wraps w/r=%0d/%0d",
             w1, r1, wref1, rref1, both1, fullc1, wwrap1, rwrap1);
    $display("p2: writes=%0d reads=%0d refused w/r=%0d/%0d both=%0d on-full=%0d wraps w/r=%0d/%0d",
             w2, r2, wref2, rref2, both2, wfull2, wwrap2, rwrap2);
    finish();
  end

endmodule
