// tb_dwt2d_stripe_top: end-to-end test of dwt2d_stripe_top at its default size
// (128 x 128 frame, 64-row stripes, two-port line buffer).
//
// A frame_checker plays the frame memory and scores the run: every read
// address of the overlapped stripe scan, every coefficient against an array
// reference of the 2-D (9,7) DWT, the read rate of one pixel per cycle and the
// read-to-done latency. Each scan mechanism (mirrored rows and columns at the
// four frame borders, rows re-read in stripe overlaps, discarded edge
// coefficients) must occur at least once. A watchdog ends a hung run.
module tb_dwt2d_stripe_top;
  import dwt97_pkg::*;

  localparam int N = 128;
  localparam int S = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, rd_en, wr_en, dropped, finished;
  logic [$clog2(N*N)-1:0]   rd_addr;
  logic [7:0]               rd_data;
  logic [$clog2(2*N*N)-1:0] wr_addr [2];
  word_t                    wr_data [2];
  int checks, failures, n_top, n_bot, n_left, n_right, n_ovl, n_drop;

  dwt2d_stripe_top u_dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .fm_rd_en(rd_en), .fm_rd_addr(rd_addr), .fm_rd_data(rd_data),
    .fm_wr_en(wr_en), .fm_wr_addr(wr_addr), .fm_wr_data(wr_data),
    .pair_dropped(dropped)
  );

  frame_checker #(.IMG_N(N), .STRIPE_S(S), .HALF_RATE(0), .SEED(7)) u_chk (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .fm_rd_en(rd_en), .fm_rd_addr(rd_addr), .fm_rd_data(rd_data),
    .fm_wr_en(wr_en), .fm_wr_addr(wr_addr), .fm_wr_data(wr_data),
    .pair_dropped(dropped), .finished(finished), .checks(checks), .failures(failures),
    .n_top_mirror(n_top), .n_bot_mirror(n_bot), .n_left_mirror(n_left),
    .n_right_mirror(n_right), .n_overlap_reads(n_ovl), .n_dropped(n_drop)
  );

  int extra_checks = 0, extra_fail = 0;

  task automatic need(string what, int n);
    extra_checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      extra_fail++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (finished);
    $display("mechanisms seen:");
    need("top-border mirrored reads", n_top);
    need("bottom-border mirrored reads", n_bot);
    need("left-border mirrored reads", n_left);
    need("right-border mirrored reads", n_right);
    need("stripe-overlap reads", n_ovl);
    need("discarded edge pairs", n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail + 1);
    $finish;
  end

endmodule
