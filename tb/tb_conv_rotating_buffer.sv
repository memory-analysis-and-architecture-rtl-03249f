// tb_conv_rotating_buffer: streams 40 lines of random words through the nine
// rotating line memories (4 positions per line, idle gaps between some
// lines). On every even line, one cycle after each input, the window must
// hold the nine most recent words of that position, oldest first, as kept by
// a plain history array. The write pointer must wrap around several times.
module tb_conv_rotating_buffer;
  import dwt97_pkg::*;

  localparam int F = 9, DEPTH = 4, AW = 2, LINES = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_read;
  logic [AW-1:0] in_addr;
  word_t in_data;
  word_t win [F];
  int hist [LINES][DEPTH];
  int checks = 0, failures = 0, wraps = 0;

  conv_rotating_buffer #(.F(F), .DEPTH(DEPTH)) u_dut (.clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_read(in_read), .in_addr(in_addr), .in_data(in_data), .win(win));

  initial begin
    in_valid = 0; in_read = 0; in_addr = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int c = 0; c < LINES; c++) begin
      for (int a = 0; a < DEPTH; a++) begin
        hist[c][a] = int'(word_t'($urandom));
        in_valid <= 1; in_read <= (c % 2 == 0); in_addr <= AW'(a); in_data <= word_t'(hist[c][a]);
        @(posedge clk);
        if (a == DEPTH - 1 && u_dut.wptr == 0) wraps++;
        @(negedge clk);
        if (c % 2 == 0 && c >= F - 1)
          for (int k = 0; k < F; k++) begin
            checks++;
            if (int'(win[k]) != hist[c - (F - 1) + k][a]) begin
              failures++;
              if (failures < 6) $display("FAIL line %0d addr %0d tap %0d: got %0d expected %0d",
                                         c, a, k, win[k], hist[c - (F - 1) + k][a]);
            end
          end
      end
      if (c % 7 == 3) begin
        in_valid <= 0;
        repeat (2) @(posedge clk);
      end
    end
    checks++;
    if (wraps < 3) begin
      failures++;
      $display("FAIL write pointer wrapped %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
