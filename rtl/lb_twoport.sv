// lb_twoport: temporal line buffer built from one two-port memory.
//
// The registers of the across-line lifting unit, one set per position of a
// line, are merged into one word of WIDTH bits per address. One read and one
// write can happen in the same cycle on the separate ports. Reads are
// synchronous: rd_data is valid the cycle after rd_en. A read and a write to
// the same address in one cycle return the old word.
// Storage is DEPTH x WIDTH bits, half that of the ping-pong buffer.
module lb_twoport #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned WIDTH  = 80,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
