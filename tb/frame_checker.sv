// frame_checker: frame memory model and scoreboard for one dwt2d_stripe_top.
//
// It holds a generated N x N image (random pixels plus a 0/255 checkerboard
// patch that drives the filters to their largest values), answers the DUT's
// reads one cycle later, and checks:
//   - every read address, in order, against an independent model of the
//     overlapped stripe scan (mirrored borders included), and the spacing of
//     reads (1 cycle, or 2 for the folded buffer);
//   - every written coefficient against the array reference of dwt97_ref_pkg
//     (rows by lifting, or by direct convolution when ROW_CONV is set),
//     each of the N*N output words written exactly once;
//   - the number of reads, and that done follows the last read after the
//     5-cycle pipeline latency.
// It also counts how often each scan mechanism occurred: mirrored rows at the
// top and bottom, mirrored columns left and right, rows read again in the
// overlap of two stripes, and coefficient pairs discarded at stripe edges.
module frame_checker
  import dwt97_ref_pkg::*;
#(
  parameter int IMG_N     = 128,
  parameter int STRIPE_S  = 64,
  parameter bit HALF_RATE = 1'b0,
  parameter int SEED      = 1,
  parameter bit ROW_CONV  = 1'b0,
  localparam int RAW      = $clog2(IMG_N * IMG_N),
  localparam int WAW      = $clog2(2 * IMG_N * IMG_N)
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              start,
  input  logic              busy,
  input  logic              done,
  input  logic              fm_rd_en,
  input  logic [RAW-1:0]    fm_rd_addr,
  output logic [7:0]        fm_rd_data,
  input  logic              fm_wr_en,
  input  logic [WAW-1:0]    fm_wr_addr [2],
  input  logic signed [15:0] fm_wr_data [2],
  input  logic              pair_dropped,
  output logic              finished,
  output int                checks,
  output int                failures,
  output int                n_top_mirror,
  output int                n_bot_mirror,
  output int                n_left_mirror,
  output int                n_right_mirror,
  output int                n_overlap_reads,
  output int                n_dropped
);

  localparam int K = 4;
  localparam int STEP = STRIPE_S - 2 * K;

  int img[];
  int coef[];
  int pixmem  [IMG_N * IMG_N];
  int expv    [IMG_N * IMG_N];
  int written [IMG_N * IMG_N];
  int exp_addr[$];
  int exp_rowv[$];
  int exp_colv[$];
  int n_reads, n_writes, cycle, first_rd, last_rd, rd_gap_bad, done_cycle;

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("FAIL %s (N=%0d S=%0d half=%0d)", what, IMG_N, STRIPE_S, HALF_RATE);
  endtask

  initial begin
    int seed;
    seed = SEED;
    img  = new[IMG_N * IMG_N];
    for (int i = 0; i < IMG_N * IMG_N; i++) img[i] = $urandom(seed + i) % 256;
    for (int r = IMG_N / 4; r < IMG_N / 2; r++)
      for (int x = IMG_N / 4; x < IMG_N / 2; x++)
        img[r * IMG_N + x] = ((r + x) % 2 == 1) ? 255 : 0;
    dwt2d(img, coef, IMG_N, ROW_CONV);
    for (int i = 0; i < IMG_N * IMG_N; i++) pixmem[i] = img[i];
    for (int r = 0; r < IMG_N; r++)
      for (int x = 0; x < IMG_N; x++) begin
        expv[band_addr(r, x, IMG_N)] = coef[r * IMG_N + x];
        written[band_addr(r, x, IMG_N)] = 0;
      end
    // expected read sequence of the overlapped stripe scan
    for (int r0 = 0; r0 < IMG_N; r0 += STEP)
      for (int c = -K; c < IMG_N + K; c++)
        for (int j = 0; j < STRIPE_S; j++) begin
          int row;
          row = r0 - K + j;
          exp_addr.push_back(mirror(row, IMG_N) * IMG_N + mirror(c, IMG_N));
          exp_rowv.push_back(row);
          exp_colv.push_back(c);
        end
  end

  initial begin
    checks = 0; failures = 0; finished = 0; start = 0;
    n_top_mirror = 0; n_bot_mirror = 0; n_left_mirror = 0; n_right_mirror = 0;
    n_overlap_reads = 0; n_dropped = 0;
    n_reads = 0; n_writes = 0; cycle = 0; done_cycle = -1; first_rd = -1; last_rd = -1; rd_gap_bad = 0;
    wait (rst_n);
    repeat (3) @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk iff done);
    @(posedge clk);
    checks++;
    if (exp_addr.size() != 0)
      fail($sformatf("reads: %0d done, %0d expected reads left", n_reads, exp_addr.size()));
    checks++;
    if (done_cycle - last_rd != 6) fail($sformatf("done %0d cycles after the last read", done_cycle - last_rd));
    checks++;
    if (n_writes != IMG_N * IMG_N) fail($sformatf("wrote %0d words, expected %0d", n_writes, IMG_N * IMG_N));
    checks++;
    if (rd_gap_bad != 0) fail($sformatf("%0d reads not %0d cycle(s) apart", rd_gap_bad, HALF_RATE ? 2 : 1));
    checks++;
    if (last_rd - first_rd != (n_reads - 1) * (HALF_RATE ? 2 : 1))
      fail($sformatf("reads took %0d cycles", last_rd - first_rd));
    finished = 1;
  end

  // frame memory: one cycle read latency
  always @(posedge clk) if (rst_n) begin
    cycle = cycle + 1;
    if (done && done_cycle < 0) done_cycle = cycle;
    if (fm_rd_en) begin
      int pix;
      pix = pixmem[int'(fm_rd_addr)];
      fm_rd_data <= 8'(pix);
      if (first_rd < 0) first_rd = cycle;
      else if (cycle - last_rd != (HALF_RATE ? 2 : 1)) rd_gap_bad = rd_gap_bad + 1;
      last_rd = cycle;
      n_reads = n_reads + 1;
      checks = checks + 1;
      if (exp_addr.size() == 0) fail("read beyond the end of the scan");
      else begin
        int a, row, col;
        a = exp_addr.pop_front();
        row = exp_rowv.pop_front();
        col = exp_colv.pop_front();
        if (a != int'(fm_rd_addr)) fail($sformatf("read %0d: addr %0d, expected %0d", n_reads, fm_rd_addr, a));
        if (row < 0) n_top_mirror = n_top_mirror + 1;
        if (row >= IMG_N) n_bot_mirror = n_bot_mirror + 1;
        if (col < 0) n_left_mirror = n_left_mirror + 1;
        if (col >= IMG_N) n_right_mirror = n_right_mirror + 1;
        // rows r0-K .. r0+K-1 of a later stripe were read by the stripe before
        if (row >= 0 && row < IMG_N && row >= STEP - K && ((row + K) % STEP) < 2 * K)
          n_overlap_reads = n_overlap_reads + 1;
      end
    end
    if (pair_dropped) n_dropped = n_dropped + 1;
    if (fm_wr_en) begin
      for (int l = 0; l < 2; l++) begin
        int idx;
        idx = int'(fm_wr_addr[l]) - IMG_N * IMG_N;
        checks = checks + 1;
        if (idx < 0 || idx >= IMG_N * IMG_N) fail($sformatf("write address %0d out of range", fm_wr_addr[l]));
        else begin
          if (written[idx] != 0) fail($sformatf("word %0d written twice", idx));
          written[idx] = 1;
          if (int'(fm_wr_data[l]) != expv[idx])
            fail($sformatf("word %0d = %0d, expected %0d", idx, fm_wr_data[l], expv[idx]));
        end
      end
      n_writes = n_writes + 2;
    end
  end

endmodule
