// tb_lift97_row: checks the across-line lifting unit with each of its three
// line buffer styles (two-port, ping-pong, folded).
//
// Every buffer address carries its own random sample stream, mirrored by four
// samples at both ends; line c presents sample c of every stream, address by
// address. On each even line the unit must return, two cycles after each
// input, the pair at stream positions c-8 and c-7 (original indexing), equal
// to the array reference of the 1-D (9,7) DWT. The folded unit is fed one
// word every second cycle, the others one word per cycle, and the number of
// pairs out per mode is checked as well. Two frames run back to back.
module tb_lift97_row;
  import dwt97_pkg::*;
  import dwt97_ref_pkg::*;

  localparam int DEPTH = 8;
  localparam int L = 20;           // stream length (lines of the original frame)
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks [3] = '{0, 0, 0};
  int failures [3] = '{0, 0, 0};
  int pairs [3] = '{0, 0, 0};
  bit fin [3] = '{0, 0, 0};

  for (genvar m = 0; m < 3; m++) begin : g_mode
    localparam lb_mode_e MODE = lb_mode_e'(m);
    logic in_valid, in_even, out_valid;
    logic [AW-1:0] in_addr, out_addr;
    word_t in_data, out_low, out_high;
    logic [7:0] in_tag, out_tag;
    int y [DEPTH][L];

    lift97_row #(.DEPTH(DEPTH), .LB_MODE(MODE), .TAG_W(8)) u_dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_even(in_even),
      .in_addr(in_addr), .in_data(in_data), .in_tag(in_tag),
      .out_valid(out_valid), .out_addr(out_addr), .out_low(out_low),
      .out_high(out_high), .out_tag(out_tag));

    always @(posedge clk) if (rst_n && out_valid) begin
      int c, p;
      c = int'(out_tag);
      p = c - 8;
      if (c >= 8 && p + 1 < L) begin
        pairs[m]++;
        checks[m] += 2;
        if (int'(out_low) != y[out_addr][p] || int'(out_high) != y[out_addr][p + 1]) begin
          failures[m]++;
          if (failures[m] < 6)
            $display("FAIL mode %0d line %0d addr %0d: got %0d/%0d expected %0d/%0d", m, c,
                     out_addr, out_low, out_high, y[out_addr][p], y[out_addr][p + 1]);
        end
      end
    end

    initial begin
      in_valid = 0; in_even = 0; in_addr = 0; in_data = 0; in_tag = 0;
      wait (rst_n);
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
          dwt1d(v, L);
          // results of this frame are compared after its inputs start
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
            if (MODE == LB_FOLDED) begin
              in_valid <= 0;
              @(posedge clk);
            end
          end
        in_valid <= 0;
        repeat (4) @(posedge clk);
      end
      checks[m]++;
      if (pairs[m] != 2 * DEPTH * (L / 2)) begin
        failures[m]++;
        $display("FAIL mode %0d: %0d pairs, expected %0d", m, pairs[m], 2 * DEPTH * (L / 2));
      end
      fin[m] = 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    for (int m = 0; m < 3; m++) $display("mode %0d: %0d pairs checked", m, pairs[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end
endmodule
