// tb_lift97_col: streams several lines through the register-based lifting unit
// and checks its output word by word.
//
// Each line is a random sequence of L samples mirrored by four samples at
// both ends (L + 8 inputs). The word that leaves one cycle after input j is
// the coefficient at extended position j - 4; for the L original positions it
// must equal the array reference of the 1-D (9,7) DWT. Lines are sent back to
// back in one run and in a second run with random idle cycles between inputs,
// so a line starts with the state the previous one left behind and valid gaps
// are tolerated. One output per input (the throughput) is checked too.
module tb_lift97_col;
  import dwt97_pkg::*;
  import dwt97_ref_pkg::*;

  localparam int L = 24;
  localparam int LINES = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_even, out_valid;
  word_t in_data, out_data;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;
  int exp_q[$];

  lift97_col u_dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_even(in_even),
                    .in_data(in_data), .out_valid(out_valid), .out_data(out_data));

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    n_out++;
    e = exp_q.pop_front();
    if (e != 99999) begin
      checks++;
      if (int'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("FAIL out %0d: got %0d expected %0d", n_out, out_data, e);
      end
    end
  end

  task automatic run(bit gaps);
    for (int ln = 0; ln < LINES; ln++) begin
      int x[], y[];
      x = new[L];
      for (int i = 0; i < L; i++) x[i] = int'($urandom % 1024) - 200;
      y = x;
      dwt1d(y, L);
      for (int j = 0; j < L + 8; j++) begin
        // output at input j is position j-4 of the extended line
        if (j >= 8) exp_q.push_back(y[j - 8]);
        else        exp_q.push_back(99999);
        while (gaps && ($urandom % 3 == 0)) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_even  <= (j % 2 == 0);
        in_data  <= word_t'(x[mirror(j - 4, L)]);
        n_in++;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    in_valid = 0; in_even = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run(0);
    run(1);
    checks++;
    if (n_out != n_in) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", n_out, n_in);
    end
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
