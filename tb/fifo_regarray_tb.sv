// fifo_regarray_tb: self-checking testbench for the register array
// (fifo_regarray), 16 bits x 6 locations.
//
// Every location is first written once. Then, for many cycles, a random
// location is written with a random word (or the write enable is left low)
// while a random location is read. A model array holds what should be
// stored; the read port is combinational, so dout is checked in the same
// cycle as raddr, and a write becomes visible only after its clock edge.
// Writes with wen low must leave the array unchanged.
module fifo_regarray_tb;

  localparam int unsigned W = 16;
  localparam int unsigned D = 6;

  logic         clk = 1'b0;
  logic [W-1:0] din = '0;
  logic [2:0]   waddr = '0, raddr = '0;
  logic         wen = 1'b0;
  logic [W-1:0] dout;

  logic [W-1:0] model [D];
  int checks = 0, failures = 0, blocked = 0;

  always #5 clk = ~clk;

  fifo_regarray #(.WIDTH(W), .DEPTH(D)) dut (.clk, .din, .waddr, .wen, .raddr, .dout);

  always @(posedge clk) if (wen) model[waddr] = din;

  initial begin
    repeat (2000) @(posedge clk);
    $display("fifo_regarray_tb: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      wen = 1'b1; waddr = 3'(a); din = W'($urandom);
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      wen   = ($urandom % 3) != 0;
      waddr = 3'($urandom % D);
      din   = W'($urandom);
      raddr = 3'($urandom % D);
      if (!wen) blocked++;
      #1;
      checks++;
      if (dout !== model[raddr]) begin
        failures++;
        if (failures <= 10)
          $display("fifo_regarray_tb t=%0t: raddr=%0d dout=%h expected %h",
                   $time, raddr, dout, model[raddr]);
      end
    end
    checks++;
    if (blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
