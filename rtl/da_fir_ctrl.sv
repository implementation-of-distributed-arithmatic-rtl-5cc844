// da_fir_ctrl: sample framing for the DA FIR filter.
//
// Every input sample occupies R consecutive clock cycles, one per bit-slice of
// a section. The controller accepts a sample (x_valid && x_ready), asks the
// input register to shift it in (shift_en), and then steps r_idx through
// 0 .. R-1 in the following R cycles, emitting the slice tag (valid, first at
// r_idx = 0, last at r_idx = R-1) that travels down the pipeline with the
// slice. x_ready is high while idle and in the last slice cycle, so back-to-
// back samples are accepted once every R cycles: the input rate is f/R.
module da_fir_ctrl
  import da_fir_pkg::*;
#(
  parameter int unsigned R = 4,
  localparam int unsigned RW = idx_w(R)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  output logic          x_ready,
  output logic          shift_en,
  output logic [RW-1:0] r_idx,
  output slice_tag_t    tag
);

  logic busy;
  logic at_last;

  assign at_last  = (int'(r_idx) == R - 1);
  assign x_ready  = !busy || at_last;
  assign shift_en = x_valid && x_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      r_idx <= '0;
    end else if (shift_en) begin
      busy  <= 1'b1;
      r_idx <= '0;
    end else if (busy) begin
      if (at_last) busy <= 1'b0;
      else         r_idx <= r_idx + 1'b1;
    end
  end

  assign tag = '{valid: busy, first: busy && (r_idx == '0), last: busy && at_last};

  // A sample's slices start the cycle after it is accepted, and the step
  // counter never leaves 0 .. R-1 while a sample is in progress.
  a_frame_starts: assert property (@(posedge clk) disable iff (!rst_n) shift_en |=> tag.first);
  a_step_range:   assert property (@(posedge clk) disable iff (!rst_n) busy |-> int'(r_idx) < R);

endmodule
