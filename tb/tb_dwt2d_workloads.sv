// tb_dwt2d_workloads: the evaluated configurations, run end to end. The
// buffer-size comparison uses line widths of 64 and 128 words with 16-bit
// internal words; here each width is taken as a frame whose stripe is as tall
// as the frame (S = N, so the line buffer holds one full frame column), and
// each is run with all four buffer styles: two-port, ping-pong, folded and the
// rotating convolution buffer. Eight instances of dwt2d_stripe_top run side by
// side, each with its own frame_checker, which checks every read address,
// every coefficient against the reference transform, the write count, the
// read rate (one pixel per cycle, or per two cycles for the folded buffer)
// and the done latency. Every instance must also mirror at all four borders
// and discard edge pairs at least once.
module tb_dwt2d_workloads;
  import dwt97_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NI = 8;
  localparam int NS [NI] = '{64, 64, 64, 64, 128, 128, 128, 128};
  localparam lb_mode_e MS [NI] = '{LB_TWO_PORT, LB_PING_PONG, LB_FOLDED, LB_CONV_ROT,
                                   LB_TWO_PORT, LB_PING_PONG, LB_FOLDED, LB_CONV_ROT};

  int checks [NI], failures [NI], n_top [NI], n_bot [NI], n_left [NI], n_right [NI];
  int n_ovl [NI], n_drop [NI];
  logic finished [NI];

  for (genvar g = 0; g < NI; g++) begin : g_dut
    localparam int N = NS[g];
    logic start, busy, done, rd_en, wr_en, dropped;
    logic [$clog2(N*N)-1:0]   rd_addr;
    logic [7:0]               rd_data;
    logic [$clog2(2*N*N)-1:0] wr_addr [2];
    word_t                    wr_data [2];

    dwt2d_stripe_top #(.IMG_N(N), .STRIPE_S(N), .LB_MODE(MS[g])) u_dut (
      .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
      .fm_rd_en(rd_en), .fm_rd_addr(rd_addr), .fm_rd_data(rd_data),
      .fm_wr_en(wr_en), .fm_wr_addr(wr_addr), .fm_wr_data(wr_data),
      .pair_dropped(dropped));

    frame_checker #(.IMG_N(N), .STRIPE_S(N), .HALF_RATE(MS[g] == LB_FOLDED), .SEED(101 + g),
                    .ROW_CONV(MS[g] == LB_CONV_ROT)) u_chk (
      .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
      .fm_rd_en(rd_en), .fm_rd_addr(rd_addr), .fm_rd_data(rd_data),
      .fm_wr_en(wr_en), .fm_wr_addr(wr_addr), .fm_wr_data(wr_data),
      .pair_dropped(dropped), .finished(finished[g]), .checks(checks[g]), .failures(failures[g]),
      .n_top_mirror(n_top[g]), .n_bot_mirror(n_bot[g]), .n_left_mirror(n_left[g]),
      .n_right_mirror(n_right[g]), .n_overlap_reads(n_ovl[g]), .n_dropped(n_drop[g]));
  end

  int xc = 0, xf = 0;
  task automatic need(string what, int n);
    xc++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      xf++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  function automatic int total(int a [NI]);
    int t = 0;
    foreach (a[i]) t += a[i];
    return t;
  endfunction

  function automatic bit all_finished();
    foreach (finished[i]) if (!finished[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (!all_finished()) @(posedge clk);
    $display("configurations run:");
    for (int g = 0; g < NI; g++) begin
      string tag;
      tag = $sformatf("width %0d, %s", NS[g], MS[g].name());
      need({tag, ": top mirrored reads"}, n_top[g]);
      need({tag, ": bottom mirrored reads"}, n_bot[g]);
      need({tag, ": left mirrored reads"}, n_left[g]);
      need({tag, ": right mirrored reads"}, n_right[g]);
      need({tag, ": discarded edge pairs"}, n_drop[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", total(checks) + xc, total(failures) + xf);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks) + xc, total(failures) + xf + 1);
    $finish;
  end
endmodule
