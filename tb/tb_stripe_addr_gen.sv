// tb_stripe_addr_gen: runs the overlapped stripe scan on a small frame
// (N = 20, S = 12, so the stripes step by 4 rows and the last one reaches
// past the bottom) at full rate and at half rate. Every read address and tag
// is compared with a nested-loop model of the scan with mirrored borders; the
// number of reads, their spacing (1 or 2 cycles), busy and the done pulse
// with the last read are checked. A second start after done must repeat the
// same scan.
module tb_stripe_addr_gen;
  import dwt97_ref_pkg::*;

  localparam int N = 20, S = 12, K = 4;
  localparam int AW = $clog2(N * N), SW = $clog2(S), CW = $clog2(N + 2 * K), RW = $clog2(N) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit fin [2] = '{0, 0};

  task automatic fail(string s);
    failures++;
    if (failures < 8) $display("FAIL %s", s);
  endtask

  for (genvar h = 0; h < 2; h++) begin : g_rate
    logic start, busy, done, rd_en;
    logic [AW-1:0] rd_addr;
    logic [SW-1:0] tag_j;
    logic [CW-1:0] tag_c;
    logic [RW-1:0] tag_r0;

    stripe_addr_gen #(.IMG_N(N), .STRIPE_S(S), .K(K), .HALF_RATE(h == 1)) u_dut (
      .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done), .rd_en(rd_en),
      .rd_addr(rd_addr), .tag_j(tag_j), .tag_c(tag_c), .tag_r0(tag_r0));

    initial begin
      start = 0;
      wait (rst_n);
      @(posedge clk);
      for (int run = 0; run < 2; run++) begin
        int last, n, cyc;
        start <= 1;
        @(posedge clk);
        start <= 0;
        n = 0; cyc = 0; last = -1;
        for (int r0 = 0; r0 < N; r0 += S - 2 * K)
          for (int c = 0; c < N + 2 * K; c++)
            for (int j = 0; j < S; j++) begin
              int exp_a;
              while (!rd_en) begin
                @(posedge clk);
                cyc++;
                if (cyc > 10000) break;
              end
              exp_a = mirror(r0 - K + j, N) * N + mirror(c - K, N);
              checks++;
              if (int'(rd_addr) != exp_a || int'(tag_j) != j || int'(tag_c) != c || int'(tag_r0) != r0)
                fail($sformatf("rate %0d read %0d: addr %0d j %0d c %0d r0 %0d, expected %0d %0d %0d %0d",
                               h, n, rd_addr, tag_j, tag_c, tag_r0, exp_a, j, c, r0));
              if (last >= 0) begin
                checks++;
                if (cyc - last != h + 1) fail($sformatf("rate %0d: reads %0d cycles apart", h, cyc - last));
              end
              last = cyc;
              n++;
              checks++;
              if (!busy) fail("busy low during the scan");
              @(posedge clk);
              cyc++;
              if (n == ((N - 1) / (S - 2 * K) + 1) * (N + 2 * K) * S) begin
                checks++;
                if (!done) fail($sformatf("rate %0d: no done after the last read", h));
              end else if (done) fail("early done");
            end
        checks++;
        if (busy || rd_en) fail("still reading after the last stripe");
        repeat (3) @(posedge clk);
        checks++;
        if (rd_en || done) fail("activity after done");
      end
      fin[h] = 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
