// fifo_regarray: the FIFO's storage, DEPTH locations of WIDTH bits each.
//
// One synchronous write port: din is stored at waddr on the rising clock
// edge when wen is high. One combinational read port: dout always shows the
// location addressed by raddr, so the FIFO's output is valid in the same
// cycle as the read pointer that selects it. The contents are not reset;
// a location is always written before the FIFO lets it be read.
//
// Ports: clk, din/waddr/wen (write), raddr/dout (read). An address at or
// above DEPTH (impossible from the wrapping pointers) reads location 0 and
// writes nothing.
module fifo_regarray #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = fifo_pkg::addr_bits(DEPTH)
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  input  logic [AW-1:0]    waddr,
  input  logic             wen,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wen && (32'(waddr) < DEPTH))
      mem[waddr] <= din;
  end

  always_comb begin
    dout = mem[0];
    if (32'(raddr) < DEPTH)
      dout = mem[raddr];
  end

endmodule
