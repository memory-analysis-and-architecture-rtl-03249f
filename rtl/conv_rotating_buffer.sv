// conv_rotating_buffer: temporal line buffer of the convolution-based DWT
// unit, built from F separate single-port memories used in rotation.
//
// A convolution unit needs, for each position of a line, the last F samples of
// that position's stream (a FIFO chain of registers in the 1-D filter). Shifting
// a FIFO would rewrite every word each time; instead the F samples stay where
// they were written and only the newest one is stored, into the memory that
// holds the oldest, no longer needed sample. A write pointer rotates over the
// F memories by one at the end of every line.
// Each input word is written to memory wptr at in_addr. When in_read is set
// (the lines on which the filter computes) the other F-1 memories are read at
// the same address in that cycle, so no memory is read and written at once.
// One cycle later win[] holds the window, oldest first: win[F-1] is the word
// just written, win[0] the one written F-1 lines before.
// Storage: F memories of DEPTH x 16 bits (F = 9 for the (9,7) filter).
module conv_rotating_buffer
  import dwt97_pkg::*;
#(
  parameter int unsigned F     = 9,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PW   = $clog2(F)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_read,
  input  logic [AW-1:0] in_addr,
  input  word_t         in_data,
  output word_t         win [F]
);

  word_t         q    [F];       // registered read port of each memory
  word_t         new_q;
  logic [PW-1:0] wptr, wptr_q;

  for (genvar m = 0; m < F; m++) begin : g_mem
    word_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (in_valid && wptr == PW'(m))
        mem[in_addr] <= in_data;
      else if (in_valid && in_read)
        q[m] <= mem[in_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      wptr_q <= '0;
      new_q  <= '0;
    end else if (in_valid) begin
      wptr_q <= wptr;
      new_q  <= in_data;
      if (in_addr == AW'(DEPTH - 1))
        wptr <= (wptr == PW'(F - 1)) ? '0 : wptr + 1'b1;
    end
  end

  // oldest first: memory wptr_q+1 holds the sample written F-1 lines ago
  always_comb begin
    for (int k = 0; k < F - 1; k++) begin
      int m;
      m = int'(wptr_q) + 1 + k;
      if (m >= int'(F)) m -= int'(F);
      win[k] = q[m];
    end
    win[F-1] = new_q;
  end

endmodule
