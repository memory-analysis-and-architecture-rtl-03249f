// tb_lb_folded: drives the single-port folded line buffer the way the folded
// DWT unit does (read one cycle, write back the next) with random addresses and
// random idle cycles, against an array model. Reads return the word last
// written, one cycle after rd_en.
module tb_lb_folded;
  localparam int DEPTH = 16, WIDTH = 80, AW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [WIDTH-1:0] rd_data, wr_data, model [DEPTH];
  int checks = 0, failures = 0;

  lb_folded #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_dut (.clk(clk), .rst_n(rst_n), .rd_en(rd_en),
    .rd_addr(rd_addr), .rd_data(rd_data), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      wr_en <= 1; wr_addr <= AW'(a); wr_data <= {$urandom, $urandom, $urandom};
      @(posedge clk);
      model[a] = wr_data;
      wr_en <= 0;
      @(posedge clk);
    end
    for (int i = 0; i < 1000; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      rd_en <= 1; rd_addr <= a; wr_en <= 0;
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        if (failures < 6) $display("FAIL read %0d addr %0d: got %h expected %h", i, a, rd_data, model[a]);
      end
      rd_en <= 0; wr_en <= 1; wr_addr <= a; wr_data <= rd_data ^ {$urandom, $urandom, $urandom};
      @(posedge clk);
      model[a] = wr_data;
      wr_en <= 0;
      if ($urandom % 4 == 0) @(posedge clk);
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
