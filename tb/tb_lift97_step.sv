// tb_lift97_step: checks one (9,7) lifting step against the lifting equations
// evaluated with the reference arithmetic, on random 16-bit states and inputs
// (small and full-range values), comparing the next state and both outputs.
module tb_lift97_step;
  import dwt97_pkg::*;
  import dwt97_ref_pkg::*;

  lift_state_t st_in, st_out;
  word_t x, low, high;
  int checks = 0, failures = 0;

  lift97_step u_dut (.st_in(st_in), .x_even(x), .st_out(st_out), .low(low), .high(high));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic word_t rnd(int i);
    int r;
    r = $urandom;
    return (i % 2 == 0) ? word_t'((r % 2001) - 1000) : word_t'(r);
  endfunction

  initial begin
    for (int i = 0; i < 500; i++) begin
      int d1, s1, d2, s2;
      st_in = '{e: rnd(i), o: rnd(i), d1: rnd(i), s1: rnd(i), d2: rnd(i)};
      x = rnd(i);
      #1;
      d1 = mac(st_in.o, st_in.e, x, A);
      s1 = mac(st_in.e, st_in.d1, d1, B);
      d2 = mac(st_in.d1, st_in.s1, s1, G);
      s2 = mac(st_in.s1, st_in.d2, d2, D);
      chk("d1", st_out.d1, d1);
      chk("s1", st_out.s1, s1);
      chk("d2", st_out.d2, d2);
      chk("e",  st_out.e, x);
      chk("o",  st_out.o, st_in.o);
      chk("low",  low,  scl(s2, ZL));
      chk("high", high, scl(d2, ZH));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
