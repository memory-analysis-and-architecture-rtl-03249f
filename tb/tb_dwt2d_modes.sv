// tb_dwt2d_modes: end-to-end runs of dwt2d_stripe_top with each temporal line
// buffer style on a 40 x 40 frame with 16-row stripes (five stripes, the last
// one reaching past the bottom border), the same with the convolution-based
// across-line unit, and a 32 x 32 frame whose stripe is as tall as the frame. A frame_checker per instance checks every read address,
// every coefficient and the read rate: one pixel per cycle for the two-port
// and ping-pong buffers, one per two cycles for the folded buffer. Each
// mechanism must occur at least once: border mirroring on all four sides,
// stripe-overlap reads, discarded edge pairs, the ping-pong hold register and
// the folded buffer's alternating read/write cycles, the wrap of the rotating
// buffer's write pointer.
module tb_dwt2d_modes;
  import dwt97_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NI = 5;
  localparam int NS [NI] = '{40, 40, 40, 32, 40};
  localparam int SS [NI] = '{16, 16, 16, 32, 16};
  localparam lb_mode_e MS [NI] = '{LB_TWO_PORT, LB_PING_PONG, LB_FOLDED, LB_TWO_PORT, LB_CONV_ROT};

  int checks [NI], failures [NI], n_top [NI], n_bot [NI], n_left [NI], n_right [NI];
  int n_ovl [NI], n_drop [NI];
  logic finished [NI];
  int hold_hits = 0, folded_writes = 0, conv_wraps = 0;

  for (genvar g = 0; g < NI; g++) begin : g_dut
    localparam int N = NS[g];
    localparam int S = SS[g];
    logic start, busy, done, rd_en, wr_en, dropped;
    logic [$clog2(N*N)-1:0]   rd_addr;
    logic [7:0]               rd_data;
    logic [$clog2(2*N*N)-1:0] wr_addr [2];
    word_t                    wr_data [2];

    dwt2d_stripe_top #(.IMG_N(N), .STRIPE_S(S), .LB_MODE(MS[g])) u_dut (
      .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
      .fm_rd_en(rd_en), .fm_rd_addr(rd_addr), .fm_rd_data(rd_data),
      .fm_wr_en(wr_en), .fm_wr_addr(wr_addr), .fm_wr_data(wr_data),
      .pair_dropped(dropped));

    frame_checker #(.IMG_N(N), .STRIPE_S(S), .HALF_RATE(MS[g] == LB_FOLDED), .SEED(11 + g),
                    .ROW_CONV(MS[g] == LB_CONV_ROT)) u_chk (
      .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
      .fm_rd_en(rd_en), .fm_rd_addr(rd_addr), .fm_rd_data(rd_data),
      .fm_wr_en(wr_en), .fm_wr_addr(wr_addr), .fm_wr_data(wr_data),
      .pair_dropped(dropped), .finished(finished[g]), .checks(checks[g]), .failures(failures[g]),
      .n_top_mirror(n_top[g]), .n_bot_mirror(n_bot[g]), .n_left_mirror(n_left[g]),
      .n_right_mirror(n_right[g]), .n_overlap_reads(n_ovl[g]), .n_dropped(n_drop[g]));
  end

  always @(posedge clk) begin
    if (g_dut[1].u_dut.g_lift.u_row.g_pp.u_lb.hold_hit) hold_hits++;
    if (g_dut[2].u_dut.g_lift.u_row.g_fold.u_lb.wr_en) folded_writes++;
    if (g_dut[4].u_dut.g_conv.u_row.u_buf.wptr == 4'd8 && g_dut[4].u_dut.g_conv.u_row.u_buf.in_valid
        && g_dut[4].u_dut.g_conv.u_row.u_buf.in_addr == 4'd15) conv_wraps++;
  end

  int xc = 0, xf = 0;
  task automatic need(string what, int n);
    xc++;
    $display("  %-34s %0d", what, n);
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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (finished[0] && finished[1] && finished[2] && finished[3] && finished[4]);
    $display("mechanisms seen:");
    for (int g = 0; g < NI; g++) begin
      need($sformatf("inst %0d top-border mirrored reads", g), n_top[g]);
      need($sformatf("inst %0d bottom-border mirrored reads", g), n_bot[g]);
      need($sformatf("inst %0d left-border mirrored reads", g), n_left[g]);
      need($sformatf("inst %0d right-border mirrored reads", g), n_right[g]);
      need($sformatf("inst %0d discarded edge pairs", g), n_drop[g]);
    end
    need("stripe-overlap reads (40x40)", n_ovl[0] + n_ovl[1] + n_ovl[2] + n_ovl[4]);
    need("rotating-buffer pointer wraps", conv_wraps);
    need("ping-pong hold register reads", hold_hits);
    need("folded buffer write cycles", folded_writes);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks) + xc, total(failures) + xf);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks) + xc, total(failures) + xf + 1);
    $finish;
  end
endmodule
