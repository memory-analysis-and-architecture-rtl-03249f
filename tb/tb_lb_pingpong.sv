// tb_lb_pingpong: drives the ping-pong line buffer as the across-line DWT unit
// does: lines of DEPTH positions, each position read in one cycle and written
// back the next, read from the bank of the line's parity and written to the
// other. Back-to-back lines make the last write of a line collide with the
// first read of the next, so the hold register is exercised (its use is
// counted and must occur); random idle gaps between lines let it drain to the
// memory. A model keeps, per line parity, the words of the line before; every
// read must return the word written for that position one line earlier.
module tb_lb_pingpong;
  localparam int DEPTH = 8, WIDTH = 80, AW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en, wr_en, rd_line, wr_line;
  int cur_line;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [WIDTH-1:0] rd_data, wr_data;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0, hold_hits = 0, flushes = 0;

  lb_pingpong #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_dut (.clk(clk), .rst_n(rst_n),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_line(rd_line), .rd_data(rd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_line(wr_line), .wr_data(wr_data));

  always @(posedge clk) begin
    if (u_dut.hold_hit) hold_hits++;
    if (u_dut.flush) flushes++;
  end

  // stage 2: the cycle after a read its data is compared and the new word
  // for that position is written back
  logic s_v = 0, s_line = 0;
  logic [AW-1:0] s_addr;
  logic [WIDTH-1:0] s_data;
  int s_lineno = 0;
  assign wr_en   = s_v;
  assign wr_addr = s_addr;
  assign wr_line = s_line;
  assign wr_data = s_data;
  always @(posedge clk) begin
    if (s_v) begin
      if (s_lineno > 0) begin
        checks++;
        if (rd_data !== model[s_addr]) begin
          failures++;
          if (failures < 6) $display("FAIL line %0d addr %0d: got %h expected %h", s_lineno, s_addr, rd_data, model[s_addr]);
        end
      end
      model[s_addr] = s_data;
    end
    s_v      <= rd_en;
    s_addr   <= rd_addr;
    s_line   <= rd_line;
    s_lineno <= cur_line;
    s_data   <= {$urandom, $urandom, $urandom};
  end

  initial begin
    rd_en = 0; rd_addr = 0; rd_line = 0; cur_line = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ln = 0; ln < 60; ln++) begin
      cur_line <= ln;
      for (int a = 0; a < DEPTH; a++) begin
        rd_en <= 1; rd_addr <= AW'(a); rd_line <= ln[0];
        @(posedge clk);
      end
      if (ln % 5 == 4) begin
        rd_en <= 0;
        repeat ($urandom % 4 + 1) @(posedge clk);
      end
    end
    rd_en <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (hold_hits == 0 || flushes == 0) begin
      failures++;
      $display("FAIL hold register never used (%0d hits, %0d flushes)", hold_hits, flushes);
    end
    $display("hold register: %0d reads served, %0d flushes", hold_hits, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
