// stripe_addr_gen: frame memory read address generator for the overlapped
// stripe-based scan.
//
// The N x N frame is cut into horizontal stripes of S rows. Consecutive stripes
// overlap by 2K rows (K = 4 for the (9,7) filter), so a stripe starts S-2K rows
// below the previous one and only its middle S-2K rows give valid
// coefficients. Inside a stripe the frame is read column by column, each
// column top to bottom: every column is one line of S words for the
// line-based DWT unit behind this generator.
// Stripe r0 (its first valid row) reads rows r0-K .. r0+S-K-1 and columns
// -K .. N+K-1. Rows and columns outside the frame are mirrored about the
// first and last row or column (whole-sample symmetric extension), which
// gives the image border the same extension the coefficients in the middle
// see, so both the stripe edges and the frame edges end in K coefficients to
// discard. Stripes are issued until one reaches past the last frame row.
//
// One read is issued per cycle, or per two cycles with HALF_RATE (folded
// unit). Each read carries its line position j, its column counter c
// (c = column + K) and its stripe's r0 as tags. start begins a frame; busy is
// high while reads are issued; done pulses with the last read.
module stripe_addr_gen #(
  parameter int unsigned IMG_N     = 128,
  parameter int unsigned STRIPE_S  = 64,
  parameter int unsigned K         = 4,
  parameter bit          HALF_RATE = 1'b0,
  localparam int unsigned AW       = $clog2(IMG_N * IMG_N),
  localparam int unsigned SW       = $clog2(STRIPE_S),
  localparam int unsigned CW       = $clog2(IMG_N + 2 * K),
  localparam int unsigned RW       = $clog2(IMG_N) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic [SW-1:0] tag_j,
  output logic [CW-1:0] tag_c,
  output logic [RW-1:0] tag_r0
);

  localparam int unsigned STEP  = STRIPE_S - 2 * K;
  localparam int unsigned NCOLS = IMG_N + 2 * K;

  logic [SW-1:0] j_q;
  logic [CW-1:0] c_q;
  logic [RW-1:0] r0_q;
  logic          phase_q;
  logic          issue, last_j, last_c, last_stripe;

  function automatic int mirror(int i);
    if (i < 0)                return -i;
    if (i > int'(IMG_N) - 1)  return 2 * (int'(IMG_N) - 1) - i;
    return i;
  endfunction

  assign issue       = busy && (!HALF_RATE || !phase_q);
  assign last_j      = (j_q == SW'(STRIPE_S - 1));
  assign last_c      = (c_q == CW'(NCOLS - 1));
  assign last_stripe = (32'(r0_q) + STEP >= IMG_N);

  always_comb begin
    int row, col;
    row     = mirror(int'(r0_q) - int'(K) + int'(j_q));
    col     = mirror(int'(c_q) - int'(K));
    rd_en   = issue;
    rd_addr = AW'(row * int'(IMG_N) + col);
    tag_j   = j_q;
    tag_c   = c_q;
    tag_r0  = r0_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      j_q     <= '0;
      c_q     <= '0;
      r0_q    <= '0;
      phase_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          j_q     <= '0;
          c_q     <= '0;
          r0_q    <= '0;
          phase_q <= 1'b0;
        end
      end else begin
        if (HALF_RATE) phase_q <= ~phase_q;
        if (issue) begin
          j_q <= last_j ? '0 : j_q + 1'b1;
          if (last_j) begin
            c_q <= last_c ? '0 : c_q + 1'b1;
            if (last_c) begin
              r0_q <= r0_q + RW'(STEP);
              if (last_stripe) begin
                busy <= 1'b0;
                done <= 1'b1;
              end
            end
          end
        end
      end
    end
  end

  // the mirrored stripe must stay within one reflection of the frame
  initial begin
    assert (STRIPE_S > 2 * K && STRIPE_S % 2 == 0 && STRIPE_S <= IMG_N && IMG_N % 2 == 0)
      else $error("stripe_addr_gen: need even S with 2K < S <= N and even N");
  end

endmodule
