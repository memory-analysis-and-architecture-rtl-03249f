// tb_lb_twoport: random reads and writes on the two-port line buffer, both
// ports active in the same cycle, against an array model. A read returns the
// word last written before the read's cycle (old data on a same-address
// collision), one cycle after rd_en.
module tb_lb_twoport;
  localparam int DEPTH = 16, WIDTH = 80, AW = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [WIDTH-1:0] rd_data, wr_data, model [DEPTH];
  int checks = 0, failures = 0;

  lb_twoport #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_dut (.clk(clk), .rd_en(rd_en), .rd_addr(rd_addr),
    .rd_data(rd_data), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      wr_en <= 1; wr_addr <= AW'(a); wr_data <= {$urandom, $urandom, $urandom};
      @(posedge clk);
      model[a] = wr_data;
    end
    for (int i = 0; i < 2000; i++) begin
      rd_en   <= ($urandom % 4 != 0);
      rd_addr <= AW'($urandom);
      wr_en   <= ($urandom % 2 == 0);
      wr_addr <= AW'($urandom);
      wr_data <= {$urandom, $urandom, $urandom};
      @(posedge clk);
      #1;
      if (rd_en) begin
        checks++;
        if (rd_data !== model[rd_addr]) begin
          failures++;
          if (failures < 6) $display("FAIL read %0d: got %h expected %h", i, rd_data, model[rd_addr]);
        end
      end
      if (wr_en) model[wr_addr] = wr_data;
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
