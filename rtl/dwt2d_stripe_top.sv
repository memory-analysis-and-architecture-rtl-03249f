// dwt2d_stripe_top: one-level 2-D (9,7) DWT of an N x N frame with the
// overlapped stripe-based scan.
//
// The frame sits in an external frame memory. stripe_addr_gen reads it stripe
// by stripe (S rows per stripe, 2K = 8 rows of overlap, mirrored at the frame
// border), one column of S pixels after another. The pixels then pass a
// line-based DWT unit of width S: lift97_col filters each column along its S
// samples with registers, lift97_row filters across the columns with its
// state in a temporal line buffer of S words. coef_writer drops the K
// coefficients at each stripe edge and writes the rest, in subband layout,
// back to the frame memory from OUT_BASE on. Because the stripes overlap, no
// buffer between stripes is needed: the internal buffer is S words, not N.
// With S = N the scan is the plain line-based one (one stripe, mirrored).
//
// Frame memory interface: fm_rd_en/fm_rd_addr request an 8-bit pixel, which
// must be on fm_rd_data the next cycle. fm_wr_en writes two 16-bit words at
// once (low-pass and high-pass of one pair). start launches a frame; busy
// stays high until the last coefficient is written; done pulses once then.
// Throughput: one pixel per cycle, or one per two cycles when LB_MODE is the
// folded single-port buffer. Latency from a read to its write is 5 cycles.
module dwt2d_stripe_top
  import dwt97_pkg::*;
#(
  parameter int unsigned IMG_N    = 128,
  parameter int unsigned STRIPE_S = 64,
  parameter lb_mode_e    LB_MODE  = LB_TWO_PORT,
  parameter int unsigned OUT_BASE = IMG_N * IMG_N,
  localparam int unsigned K       = 4,
  localparam int unsigned RAW     = $clog2(IMG_N * IMG_N),
  localparam int unsigned WAW     = $clog2(OUT_BASE + IMG_N * IMG_N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            fm_rd_en,
  output logic [RAW-1:0]  fm_rd_addr,
  input  logic [PIXW-1:0] fm_rd_data,
  output logic            fm_wr_en,
  output logic [WAW-1:0]  fm_wr_addr [2],
  output word_t           fm_wr_data [2],
  output logic            pair_dropped   // a coefficient pair outside the valid area was discarded
);

  localparam int unsigned SW  = $clog2(STRIPE_S);
  localparam int unsigned CW  = $clog2(IMG_N + 2 * K);
  localparam int unsigned RW  = $clog2(IMG_N) + 1;
  localparam int unsigned LAT = 5;

  typedef struct packed {
    logic [SW-1:0] j;
    logic [CW-1:0] c;
    logic [RW-1:0] r0;
  } pos_t;

  logic  ag_done, ag_rd_en;
  pos_t  ag_pos, px_pos, vc_pos;
  logic  px_valid, vc_valid;
  word_t vc_data;
  logic  hz_valid;
  logic [SW-1:0] hz_addr;
  word_t hz_low, hz_high;
  logic [CW+RW-1:0] hz_tag;
  logic [LAT-1:0] done_sr;

  stripe_addr_gen #(
    .IMG_N(IMG_N), .STRIPE_S(STRIPE_S), .K(K), .HALF_RATE(LB_MODE == LB_FOLDED)
  ) u_ag (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start && !busy),
    .busy    (),
    .done    (ag_done),
    .rd_en   (ag_rd_en),
    .rd_addr (fm_rd_addr),
    .tag_j   (ag_pos.j),
    .tag_c   (ag_pos.c),
    .tag_r0  (ag_pos.r0)
  );

  assign fm_rd_en = ag_rd_en;

  // frame memory read latency: the pixel of a request arrives one cycle later
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      px_valid <= 1'b0;
      px_pos   <= '0;
      vc_pos   <= '0;
    end else begin
      px_valid <= ag_rd_en;
      if (ag_rd_en) px_pos <= ag_pos;
      if (px_valid) vc_pos <= px_pos;
    end
  end

  lift97_col u_col (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (px_valid),
    .in_even   (~px_pos.j[0]),
    .in_data   (word_t'({{(W - PIXW - FRAC){1'b0}}, fm_rd_data, {FRAC{1'b0}}})),
    .out_valid (vc_valid),
    .out_data  (vc_data)
  );

  // across-line unit: lifting with a merged-word line buffer, or convolution
  // with nine rotating line memories
  generate
    if (LB_MODE == LB_CONV_ROT) begin : g_conv
      conv97_row #(.DEPTH(STRIPE_S), .TAG_W(CW + RW)) u_row (
        .clk       (clk),
        .rst_n     (rst_n),
        .in_valid  (vc_valid),
        .in_even   (~vc_pos.c[0]),
        .in_addr   (vc_pos.j),
        .in_data   (vc_data),
        .in_tag    ({vc_pos.c, vc_pos.r0}),
        .out_valid (hz_valid),
        .out_addr  (hz_addr),
        .out_low   (hz_low),
        .out_high  (hz_high),
        .out_tag   (hz_tag)
      );
    end else begin : g_lift
      lift97_row #(.DEPTH(STRIPE_S), .LB_MODE(LB_MODE), .TAG_W(CW + RW)) u_row (
        .clk       (clk),
        .rst_n     (rst_n),
        .in_valid  (vc_valid),
        .in_even   (~vc_pos.c[0]),
        .in_addr   (vc_pos.j),
        .in_data   (vc_data),
        .in_tag    ({vc_pos.c, vc_pos.r0}),
        .out_valid (hz_valid),
        .out_addr  (hz_addr),
        .out_low   (hz_low),
        .out_high  (hz_high),
        .out_tag   (hz_tag)
      );
    end
  endgenerate

  coef_writer #(
    .IMG_N(IMG_N), .STRIPE_S(STRIPE_S), .K(K), .OUT_BASE(OUT_BASE)
  ) u_wr (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (hz_valid),
    .in_j     (hz_addr),
    .in_c     (hz_tag[CW+RW-1:RW]),
    .in_r0    (hz_tag[RW-1:0]),
    .in_low   (hz_low),
    .in_high  (hz_high),
    .wr_en    (fm_wr_en),
    .wr_addr  (fm_wr_addr),
    .wr_data  (fm_wr_data),
    .dropped  (pair_dropped)
  );

  // the last write leaves LAT cycles after the last read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_sr <= '0;
      busy    <= 1'b0;
    end else begin
      done_sr <= {done_sr[LAT-2:0], ag_done};
      if (start && !busy)  busy <= 1'b1;
      else if (done_sr[LAT-1]) busy <= 1'b0;
    end
  end

  assign done = done_sr[LAT-1];

endmodule
