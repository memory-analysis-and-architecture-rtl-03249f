// tb_conv97_row: checks the convolution-based across-line unit. Every buffer
// address carries its own random stream, mirrored by four samples at each end;
// line c presents sample c of every stream. On each even line the unit must
// return, two cycles after each input, the pair at stream positions c-8 and
// c-7 (original indexing), equal to the direct-convolution reference of the
// (9,7) filters; the number of pairs is checked. Two frames run back to back.
module tb_conv97_row;
  import dwt97_pkg::*;
  import dwt97_ref_pkg::*;

  localparam int DEPTH = 8, L = 20, AW = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_even, out_valid;
  logic [AW-1:0] in_addr, out_addr;
  word_t in_data, out_low, out_high;
  logic [7:0] in_tag, out_tag;
  int y [DEPTH][L];
  int checks = 0, failures = 0, pairs = 0;

  conv97_row #(.DEPTH(DEPTH), .TAG_W(8)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_even(in_even),
    .in_addr(in_addr), .in_data(in_data), .in_tag(in_tag),
    .out_valid(out_valid), .out_addr(out_addr), .out_low(out_low),
    .out_high(out_high), .out_tag(out_tag));

  always @(posedge clk) if (rst_n && out_valid) begin
    int c, p;
    c = int'(out_tag);
    p = c - 8;
    if (c >= 8 && p + 1 < L) begin
      pairs++;
      checks += 2;
      if (int'(out_low) != y[out_addr][p] || int'(out_high) != y[out_addr][p + 1]) begin
        failures++;
        if (failures < 6)
          $display("FAIL line %0d addr %0d: got %0d/%0d expected %0d/%0d", c, out_addr,
                   out_low, out_high, y[out_addr][p], y[out_addr][p + 1]);
      end
    end
  end

  initial begin
    in_valid = 0; in_even = 0; in_addr = 0; in_data = 0; in_tag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int frame = 0; frame < 2; frame++) begin
      int x [DEPTH][L];
      for (int a = 0; a < DEPTH; a++) begin
        int v[];
        v = new[L];
        for (int i = 0; i < L; i++) begin
          x[a][i] = int'($urandom % 1500) - 700;
          v[i] = x[a][i];
        end
        conv1d(v, L);
        for (int i = 0; i < L; i++) y[a][i] = v[i];
      end
      for (int c = 0; c < L + 8; c++)
        for (int a = 0; a < DEPTH; a++) begin
          in_valid <= 1;
          in_even  <= (c % 2 == 0);
          in_addr  <= AW'(a);
          in_data  <= word_t'(x[a][mirror(c - 4, L)]);
          in_tag   <= 8'(c);
          @(posedge clk);
        end
      in_valid <= 0;
      repeat (4) @(posedge clk);
    end
    checks++;
    if (pairs != 2 * DEPTH * (L / 2)) begin
      failures++;
      $display("FAIL %0d pairs, expected %0d", pairs, 2 * DEPTH * (L / 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
