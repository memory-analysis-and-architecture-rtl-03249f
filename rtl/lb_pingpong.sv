// lb_pingpong: temporal line buffer built from two single-port memories used
// in ping-pong fashion.
//
// While line L is processed its state words are read from bank L%2 and the
// updated words are written to the other bank, so each bank sees only reads
// or only writes during a line, and the roles swap from line to line. Each
// bank holds DEPTH x WIDTH bits: twice the bits of the two-port buffer, but in
// cheaper single-port memories. rd_line / wr_line carry the parity of the line
// the access belongs to. Reads are synchronous (data the cycle after rd_en).
//
// Because a read's data comes one cycle late, the write of the last position of
// line L lands in the same cycle as the read of the first position of line L+1,
// and both go to the same bank. Such a write is parked in a one-word hold
// register; a later read of that address is served from it, and it is written
// to its bank on the first cycle that bank is idle. This conflict handling is
// this design's own addition.
module lb_pingpong #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned WIDTH  = 80,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  input  logic             rd_line,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic             wr_line,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] bank0 [DEPTH];
  logic [WIDTH-1:0] bank1 [DEPTH];

  // rd_line even -> read bank 0 and write bank 1; odd -> the reverse
  logic rd_bank, wr_bank, conflict;
  logic hold_valid, hold_bank;
  logic [AW-1:0]    hold_addr;
  logic [WIDTH-1:0] hold_data;
  logic             hold_hit, hold_hit_q, flush;
  logic [WIDTH-1:0] hold_data_q, ram_q;

  assign rd_bank  = rd_line;
  assign wr_bank  = ~wr_line;
  assign conflict = rd_en && wr_en && (rd_bank == wr_bank);
  assign hold_hit = rd_en && hold_valid && (hold_bank == rd_bank) && (hold_addr == rd_addr);
  // the held word goes to its bank when that bank is neither read nor written
  assign flush    = hold_valid && !conflict
                    && !(rd_en && rd_bank == hold_bank)
                    && !(wr_en && wr_bank == hold_bank);

  // bank 0 port
  always_ff @(posedge clk) begin
    if (wr_en && !conflict && wr_bank == 1'b0)
      bank0[wr_addr] <= wr_data;
    else if (flush && hold_bank == 1'b0)
      bank0[hold_addr] <= hold_data;
    else if (rd_en && rd_bank == 1'b0)
      ram_q <= bank0[rd_addr];
    if (wr_en && !conflict && wr_bank == 1'b1)
      bank1[wr_addr] <= wr_data;
    else if (flush && hold_bank == 1'b1)
      bank1[hold_addr] <= hold_data;
    else if (rd_en && rd_bank == 1'b1)
      ram_q <= bank1[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_valid  <= 1'b0;
      hold_bank   <= 1'b0;
      hold_addr   <= '0;
      hold_data   <= '0;
      hold_hit_q  <= 1'b0;
      hold_data_q <= '0;
    end else begin
      hold_hit_q  <= hold_hit;
      hold_data_q <= hold_data;
      if (conflict) begin
        hold_valid <= 1'b1;
        hold_bank  <= wr_bank;
        hold_addr  <= wr_addr;
        hold_data  <= wr_data;
      end else if (flush) begin
        hold_valid <= 1'b0;
      end
    end
  end

  assign rd_data = hold_hit_q ? hold_data_q : ram_q;

  // a parked word must have been read back or flushed before the next conflict
  logic hold_used;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        hold_used <= 1'b0;
    else if (conflict) hold_used <= 1'b0;
    else if (hold_hit) hold_used <= 1'b1;
  end
  a_hold_not_lost: assert property (@(posedge clk) disable iff (!rst_n)
    conflict && hold_valid |-> hold_used);

endmodule
