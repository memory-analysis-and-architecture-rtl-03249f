// tb_coef_writer: random coefficient pairs with random line position, column
// counter and stripe start go into the writer; one cycle later it must write
// exactly the pairs that lie in the valid middle of their stripe and inside the
// frame, at the subband-layout addresses of their two coefficients, and flag
// every other pair as dropped. Frame 24 x 24, stripes of 16 rows.
module tb_coef_writer;
  import dwt97_pkg::*;
  import dwt97_ref_pkg::*;

  localparam int N = 24, S = 16, K = 4, BASE = N * N;
  localparam int WAW = $clog2(2 * N * N), SW = $clog2(S), CW = $clog2(N + 2 * K), RW = $clog2(N) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, wr_en, dropped;
  logic [SW-1:0] in_j;
  logic [CW-1:0] in_c;
  logic [RW-1:0] in_r0;
  word_t in_low, in_high;
  logic [WAW-1:0] wr_addr [2];
  word_t wr_data [2];
  int checks = 0, failures = 0, kept = 0, drops = 0;

  coef_writer #(.IMG_N(N), .STRIPE_S(S), .K(K), .OUT_BASE(BASE)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_j(in_j), .in_c(in_c), .in_r0(in_r0),
    .in_low(in_low), .in_high(in_high), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .dropped(dropped));

  task automatic fail(string s);
    failures++;
    if (failures < 8) $display("FAIL %s", s);
  endtask

  initial begin
    in_valid = 0; in_j = 0; in_c = 0; in_r0 = 0; in_low = 0; in_high = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int j, c, r0, row, x, keep;
      word_t lo, hi;
      bit v;
      v  = ($urandom % 5 != 0);
      j  = $urandom % S;
      c  = 2 * ($urandom % ((N + 2 * K) / 2));
      r0 = (S - 2 * K) * ($urandom % 3);
      lo = word_t'($urandom);
      hi = word_t'($urandom);
      in_valid <= v; in_j <= SW'(j); in_c <= CW'(c); in_r0 <= RW'(r0); in_low <= lo; in_high <= hi;
      @(posedge clk);
      #1;
      row  = r0 + j - 2 * K;
      x    = c - 2 * K;
      keep = (j >= 2 * K && row < N && x >= 0 && x <= N - 2);
      checks++;
      if (wr_en !== (v && keep) || dropped !== (v && !keep))
        fail($sformatf("j %0d c %0d r0 %0d: wr_en %0d dropped %0d", j, c, r0, wr_en, dropped));
      if (v && keep) begin
        kept++;
        checks += 2;
        if (int'(wr_addr[0]) != BASE + band_addr(row, x, N) || wr_data[0] !== lo)
          fail($sformatf("low of (%0d,%0d) to %0d", row, x, wr_addr[0]));
        if (int'(wr_addr[1]) != BASE + band_addr(row, x + 1, N) || wr_data[1] !== hi)
          fail($sformatf("high of (%0d,%0d) to %0d", row, x + 1, wr_addr[1]));
      end
      if (v && !keep) drops++;
    end
    checks++;
    if (kept == 0 || drops == 0) fail("kept and dropped pairs must both occur");
    $display("%0d pairs kept, %0d dropped", kept, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
