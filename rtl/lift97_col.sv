// lift97_col: (9,7) lifting 1-D DWT along one line, state kept in registers.
//
// Samples of a line arrive one per cycle with their position parity (in_even).
// An odd sample is parked in the state; an even sample triggers one lifting
// step (lift97_step), which yields a low-pass and a high-pass coefficient at
// once. The low-pass leaves on the next cycle and the high-pass is held and
// leaves after the following odd sample, so the output is again one word per
// input: the word that leaves one cycle after the input at position j is the
// coefficient at position j-4 (low-pass if even, high-pass if odd).
// No boundary extension is done: the first coefficients of a line are built
// from the state the previous line left behind. The overlapped stripe scan
// reads K = 4 extra samples at each end of a line and throws these
// coefficients away, so none of them is ever used.
// in_valid may be held low for any number of cycles (half-rate operation).
module lift97_col
  import dwt97_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_even,
  input  word_t in_data,
  output logic  out_valid,
  output word_t out_data
);

  lift_state_t st_q, st_step;
  word_t       low, high, high_q;

  lift97_step u_step (
    .st_in  (st_q),
    .x_even (in_data),
    .st_out (st_step),
    .low    (low),
    .high   (high)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= '0;
      high_q    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (in_even) begin
          st_q     <= st_step;
          high_q   <= high;
          out_data <= low;
        end else begin
          st_q.o   <= in_data;
          out_data <= high_q;
        end
      end
    end
  end

endmodule
