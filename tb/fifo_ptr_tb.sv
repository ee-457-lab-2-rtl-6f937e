// fifo_ptr_tb: self-checking testbench for the wrapping pointer (fifo_ptr).
//
// Three pointers, DEPTH 4, 6 and 1, share a random count enable. Before
// every rising edge each is compared with a model counter that advances by
// one on an enabled edge and wraps from DEPTH-1 to 0; a reset in the middle
// of the run must return all of them to 0. Each pointer must wrap at least
// once. Enables are driven on the falling edge.
module fifo_ptr_tb;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;

  logic [1:0] p4;
  logic [2:0] p6;
  logic [0:0] p1;

  int checks = 0, failures = 0;
  int m4 = 0, m6 = 0, m1 = 0;
  int wraps4 = 0, wraps6 = 0;

  always #5 clk = ~clk;

  fifo_ptr #(.DEPTH(4)) dut4 (.clk, .rst, .cnt_en(en), .ptr(p4));
  fifo_ptr #(.DEPTH(6)) dut6 (.clk, .rst, .cnt_en(en), .ptr(p6));
  fifo_ptr #(.DEPTH(1)) dut1 (.clk, .rst, .cnt_en(en), .ptr(p1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("fifo_ptr_tb t=%0t: %s", $time, what);
    end
  endtask

  task automatic compare();
    check(int'(p4) == m4, $sformatf("DEPTH 4: ptr=%0d expected %0d", p4, m4));
    check(int'(p6) == m6, $sformatf("DEPTH 6: ptr=%0d expected %0d", p6, m6));
    check(int'(p1) == m1, $sformatf("DEPTH 1: ptr=%0d expected %0d", p1, m1));
  endtask

  // Model: advance on the enabled edges.
  always @(posedge clk) begin
    if (rst) begin
      m4 = 0; m6 = 0; m1 = 0;
    end else if (en) begin
      m4 = (m4 + 1) % 4;
      m6 = (m6 + 1) % 6;
      m1 = 0;
      if (m4 == 0) wraps4++;
      if (m6 == 0) wraps6++;
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("fifo_ptr_tb: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    compare();
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      compare();
      en  = ($urandom % 4) != 0;
      rst = (i == 150);
    end
    @(negedge clk);
    compare();
    check(wraps4 > 0 && wraps6 > 0, "a pointer never wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
