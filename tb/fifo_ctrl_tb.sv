// fifo_ctrl_tb: self-checking testbench for the FIFO control unit
// (fifo_ctrl), DEPTH 4, in both modes side by side.
//
// Random requests drive a strict controller and a write-on-read controller.
// In every cycle their decisions (wr_do, rd_do), flags (full, empty) and
// item count are compared with a model that applies the rules directly:
// read if requested and the count is above 0; write if requested and the
// count is below DEPTH, or, in write-on-read mode, if the count is DEPTH and
// a read is taken. The decisions are combinational, so they are checked
// 1 time unit after the requests change, before the next clock edge. Each
// rule that separates the two modes must occur.
module fifo_ctrl_tb;
  import fifo_pkg::*;

  localparam int unsigned D = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic wen = 1'b0, ren = 1'b0;

  logic       wr_s, rd_s, full_s, empty_s;
  logic       wr_w, rd_w, full_w, empty_w;
  logic [2:0] cnt_s, cnt_w;

  int checks = 0, failures = 0;
  int ms = 0, mw = 0;
  int n_full_rw = 0, n_empty_r = 0, n_full = 0;

  always #5 clk = ~clk;

  fifo_ctrl #(.DEPTH(D), .MODE(FIFO_MODE_STRICT)) dut_s (
    .clk, .rst, .wen_req(wen), .ren_req(ren),
    .wr_do(wr_s), .rd_do(rd_s), .full(full_s), .empty(empty_s), .count(cnt_s)
  );
  fifo_ctrl #(.DEPTH(D), .MODE(FIFO_MODE_WR_ON_READ)) dut_w (
    .clk, .rst, .wen_req(wen), .ren_req(ren),
    .wr_do(wr_w), .rd_do(rd_w), .full(full_w), .empty(empty_w), .count(cnt_w)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("fifo_ctrl_tb t=%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    $display("fifo_ctrl_tb: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ers, ews, erw, eww;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      if (i % 100 < 50) begin
        wen = ($urandom % 100) < 70; ren = ($urandom % 100) < 40;
      end else begin
        wen = ($urandom % 100) < 40; ren = ($urandom % 100) < 70;
      end
      rst = (i == 700);
      #1;
      if (rst) begin
        ms = 0; mw = 0;
        continue;
      end
      ers = ren && ms > 0;
      ews = wen && ms < D;
      erw = ren && mw > 0;
      eww = wen && (mw < D || erw);
      if (ms == D && wen && ren) n_full_rw++;
      if (ms == 0 && ren) n_empty_r++;
      if (ms == D) n_full++;
      check(rd_s == ers && wr_s == ews, $sformatf("strict: wr/rd=%0b%0b expected %0b%0b", wr_s, rd_s, ews, ers));
      check(rd_w == erw && wr_w == eww, $sformatf("wr-on-read: wr/rd=%0b%0b expected %0b%0b", wr_w, rd_w, eww, erw));
      check(int'(cnt_s) == ms && full_s == (ms == D) && empty_s == (ms == 0), "strict: count or flags");
      check(int'(cnt_w) == mw && full_w == (mw == D) && empty_w == (mw == 0), "wr-on-read: count or flags");
      ms = ms + int'(ews) - int'(ers);
      mw = mw + int'(eww) - int'(erw);
    end
    check(n_full_rw > 0, "never full with both requests");
    check(n_empty_r > 0, "never a read request while empty");
    check(n_full > 0, "never full");
    $display("full with wen&ren: %0d cycles, ren while empty: %0d", n_full_rw, n_empty_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
