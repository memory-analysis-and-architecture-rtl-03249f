// coef_writer: keeps the valid coefficients of a stripe and writes them to the
// frame memory.
//
// Each input is a low-pass / high-pass pair from the across-line DWT unit,
// tagged with the line position j, the column counter c and the stripe's first
// valid row r0. With the K = 4 sample latency of each lifting unit, the pair
// belongs to stripe row p = j - K (frame row r0 - 2K + j) and to frame
// columns x = c - 2K and x + 1. Only rows K .. S-K-1 of a stripe were computed
// from real neighbours (the first and last K rows of a stripe are not valid),
// and only rows inside the frame are kept; everything else is dropped.
// A kept pair goes out as two word writes in the subband (Mallat) layout of an
// N x N coefficient frame at OUT_BASE: even rows to the top half (L), odd rows
// to the bottom half (H), the low-pass word to the left half, the high-pass
// word to the right half. Writes leave one cycle after the input.
module coef_writer
  import dwt97_pkg::*;
#(
  parameter int unsigned IMG_N    = 128,
  parameter int unsigned STRIPE_S = 64,
  parameter int unsigned K        = 4,
  parameter int unsigned OUT_BASE = IMG_N * IMG_N,
  localparam int unsigned WAW     = $clog2(OUT_BASE + IMG_N * IMG_N),
  localparam int unsigned SW      = $clog2(STRIPE_S),
  localparam int unsigned CW      = $clog2(IMG_N + 2 * K),
  localparam int unsigned RW      = $clog2(IMG_N) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [SW-1:0]  in_j,
  input  logic [CW-1:0]  in_c,
  input  logic [RW-1:0]  in_r0,
  input  word_t          in_low,
  input  word_t          in_high,
  output logic           wr_en,
  output logic [WAW-1:0] wr_addr [2],
  output word_t          wr_data [2],
  output logic           dropped     // a pair was discarded this cycle
);

  localparam int unsigned HALF = IMG_N / 2;

  logic keep;
  int   row, x, orow;

  always_comb begin
    row  = int'(in_r0) + int'(in_j) - 2 * int'(K);
    x    = int'(in_c) - 2 * int'(K);
    keep = (int'(in_j) >= 2 * int'(K)) && (row < int'(IMG_N))
           && (x >= 0) && (x <= int'(IMG_N) - 2);
    orow = (row % 2) * int'(HALF) + row / 2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en      <= 1'b0;
      dropped    <= 1'b0;
      wr_addr[0] <= '0;
      wr_addr[1] <= '0;
      wr_data[0] <= '0;
      wr_data[1] <= '0;
    end else begin
      wr_en   <= in_valid && keep;
      dropped <= in_valid && !keep;
      if (in_valid && keep) begin
        wr_addr[0] <= WAW'(OUT_BASE + orow * IMG_N + x / 2);
        wr_addr[1] <= WAW'(OUT_BASE + orow * IMG_N + HALF + x / 2);
        wr_data[0] <= in_low;
        wr_data[1] <= in_high;
      end
    end
  end

endmodule
