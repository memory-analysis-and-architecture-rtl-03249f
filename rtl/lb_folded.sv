// lb_folded: temporal line buffer built from one single-port memory, for the
// folded (half-rate) DWT unit.
//
// The DWT unit is slowed down by two so that each cycle needs only a read or
// only a write: the state word of a position is read on one cycle and written
// back on the next. One single-port memory of DEPTH x WIDTH bits, holding all
// registers of a position in one word, is then enough; the throughput is one
// sample every two cycles. The single address port is shared: a write cycle
// uses wr_addr, a read cycle rd_addr. Reads are synchronous (data the cycle
// after rd_en). An assertion checks that reads and writes alternate and never
// fall in the same cycle.
module lb_folded #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned WIDTH  = 80,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    addr;
  logic             last_was_read;

  assign addr = wr_en ? wr_addr : rd_addr;

  always_ff @(posedge clk) begin
    if (wr_en)      mem[addr] <= wr_data;
    else if (rd_en) rd_data   <= mem[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     last_was_read <= 1'b0;
    else if (rd_en) last_was_read <= 1'b1;
    else if (wr_en) last_was_read <= 1'b0;
  end

  // one port: never a read and a write together; two reads need a write between
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && wr_en));
  a_alternate:  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !last_was_read);

endmodule
