// conv97_row: convolution-based (9,7) 1-D DWT across lines, with its FIFO
// register chain turned into a rotating buffer of nine line memories.
//
// Drop-in alternative to lift97_row with the same interface and timing: lines
// of DEPTH words arrive one word per cycle (position in_addr, line parity
// in_even). Every word is stored in conv_rotating_buffer; on an even line c the
// eight older words of the position are read in the same cycle, and one cycle
// later the nine-sample window x[c-8..c] gives the 9-tap low-pass output at
// stream position c-4 and the 7-tap high-pass output at c-3, computed by two
// parallel symmetric filters (the window pairs that share a tap are added
// first). The pair leaves two cycles after the input, like lift97_row.
// Each filter output is round(sum of products / 2^12), rounding half up; the
// fixed-point taps are in dwt97_pkg. The results agree with the lifting unit
// only to within the rounding of the two arithmetics.
module conv97_row
  import dwt97_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned TAG_W = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_even,
  input  logic [AW-1:0]    in_addr,
  input  word_t            in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [AW-1:0]    out_addr,
  output word_t            out_low,
  output word_t            out_high,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned F = 9;

  word_t            win [F];
  logic             s1_valid;
  logic [AW-1:0]    s1_addr;
  logic [TAG_W-1:0] s1_tag;
  word_t            low, high;

  conv_rotating_buffer #(.F(F), .DEPTH(DEPTH)) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_read  (in_even),
    .in_addr  (in_addr),
    .in_data  (in_data),
    .win      (win)
  );

  function automatic logic signed [35:0] tap(word_t a, word_t b, word_t c);
    logic signed [16:0] s;
    s = 17'(a) + 17'(b);
    return 36'(s) * 36'(c);
  endfunction

  // win[4] is the low-pass centre (position c-4), win[5] the high-pass centre
  always_comb begin
    logic signed [35:0] acc_l, acc_h;
    acc_l = 36'(win[4]) * 36'(C_H0)
          + tap(win[3], win[5], C_H1) + tap(win[2], win[6], C_H2)
          + tap(win[1], win[7], C_H3) + tap(win[0], win[8], C_H4)
          + 36'(1 << (CF - 1));
    acc_h = 36'(win[5]) * 36'(C_G0)
          + tap(win[4], win[6], C_G1) + tap(win[3], win[7], C_G2)
          + tap(win[2], win[8], C_G3)
          + 36'(1 << (CF - 1));
    low  = word_t'(acc_l >>> CF);
    high = word_t'(acc_h >>> CF);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_addr   <= '0;
      s1_tag    <= '0;
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_low   <= '0;
      out_high  <= '0;
      out_tag   <= '0;
    end else begin
      s1_valid  <= in_valid && in_even;
      if (in_valid) begin
        s1_addr <= in_addr;
        s1_tag  <= in_tag;
      end
      out_valid <= s1_valid;
      if (s1_valid) begin
        out_addr <= s1_addr;
        out_low  <= low;
        out_high <= high;
        out_tag  <= s1_tag;
      end
    end
  end

endmodule
