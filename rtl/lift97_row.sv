// lift97_row: (9,7) lifting 1-D DWT across lines, with its registers turned
// into a temporal line buffer.
//
// Lines of DEPTH words arrive one word per cycle, position in_addr, line parity
// in_even. Each position of a line is a separate sample stream that advances by
// one sample per line, so the five state words of the lifting unit are kept per
// position, merged into one line-buffer word. For every input the word at
// in_addr is read (cycle t), then updated and written back (cycle t+1): an odd
// line only parks its sample, an even line takes a lifting step (lift97_step).
// On an even line a low-pass / high-pass pair comes out two cycles after the
// input: the pair at line positions c-4 and c-3 when c is the even line.
//
// LB_MODE picks how the buffer is built: one two-port memory, two single-port
// memories in ping-pong, or one single-port memory for the folded unit (inputs
// then may come at most every second cycle). TAG rides along with each input
// and leaves with the matching output.
module lift97_row
  import dwt97_pkg::*;
#(
  parameter int unsigned DEPTH   = 64,
  parameter lb_mode_e    LB_MODE = LB_TWO_PORT,
  parameter int unsigned TAG_W   = 8,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
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

  // stage 1: the read has been issued, data arrives from the buffer
  logic             s1_valid, s1_even;
  logic [AW-1:0]    s1_addr;
  word_t            s1_data;
  logic [TAG_W-1:0] s1_tag;

  lift_state_t st_rd, st_step, st_wr;
  logic [STATE_W-1:0] rd_word;
  word_t low, high;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_even  <= 1'b0;
      s1_addr  <= '0;
      s1_data  <= '0;
      s1_tag   <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_even <= in_even;
        s1_addr <= in_addr;
        s1_data <= in_data;
        s1_tag  <= in_tag;
      end
    end
  end

  assign st_rd = lift_state_t'(rd_word);

  lift97_step u_step (
    .st_in  (st_rd),
    .x_even (s1_data),
    .st_out (st_step),
    .low    (low),
    .high   (high)
  );

  always_comb begin
    st_wr = st_rd;
    if (s1_even) st_wr = st_step;
    else         st_wr.o = s1_data;
  end

  generate
    if (LB_MODE == LB_TWO_PORT) begin : g_tp
      lb_twoport #(.DEPTH(DEPTH), .WIDTH(STATE_W)) u_lb (
        .clk     (clk),
        .rd_en   (in_valid),
        .rd_addr (in_addr),
        .rd_data (rd_word),
        .wr_en   (s1_valid),
        .wr_addr (s1_addr),
        .wr_data (STATE_W'(st_wr))
      );
    end else if (LB_MODE == LB_PING_PONG) begin : g_pp
      lb_pingpong #(.DEPTH(DEPTH), .WIDTH(STATE_W)) u_lb (
        .clk     (clk),
        .rst_n   (rst_n),
        .rd_en   (in_valid),
        .rd_addr (in_addr),
        .rd_line (~in_even),
        .rd_data (rd_word),
        .wr_en   (s1_valid),
        .wr_addr (s1_addr),
        .wr_line (~s1_even),
        .wr_data (STATE_W'(st_wr))
      );
    end else begin : g_fold
      lb_folded #(.DEPTH(DEPTH), .WIDTH(STATE_W)) u_lb (
        .clk     (clk),
        .rst_n   (rst_n),
        .rd_en   (in_valid),
        .rd_addr (in_addr),
        .rd_data (rd_word),
        .wr_en   (s1_valid),
        .wr_addr (s1_addr),
        .wr_data (STATE_W'(st_wr))
      );
    end
  endgenerate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_low   <= '0;
      out_high  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= s1_valid && s1_even;
      if (s1_valid && s1_even) begin
        out_addr <= s1_addr;
        out_low  <= low;
        out_high <= high;
        out_tag  <= s1_tag;
      end
    end
  end

endmodule
