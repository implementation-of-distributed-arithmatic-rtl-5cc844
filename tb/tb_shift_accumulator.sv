// tb_shift_accumulator: self-checking test of the bit-serial shift
// accumulator. Two instances, one for an unsigned-weight section and one for
// the sign section (first slice subtracted), receive the same random slice
// sums in frames of R slices, back to back or with idle gaps. Each result is
// compared with sum_r (+/-)2^(R-1-r) * s_r, and out_valid must pulse exactly
// once, on the cycle after the last slice of a frame.
module tb_shift_accumulator;
  import da_fir_pkg::*;
  localparam int unsigned IN_W = 12, R = 4, OUT_W = IN_W + R;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [IN_W-1:0] s = '0;
  slice_tag_t tag_in = '0;
  logic signed [OUT_W-1:0] acc_pos, acc_neg;
  logic val_pos, val_neg;
  int checks = 0, failures = 0, frames = 0;

  shift_accumulator #(.IN_W(IN_W), .R(R), .NEG_FIRST(1'b0)) u_pos (
    .clk, .rst_n, .s, .tag_in, .acc_out(acc_pos), .out_valid(val_pos));
  shift_accumulator #(.IN_W(IN_W), .R(R), .NEG_FIRST(1'b1)) u_neg (
    .clk, .rst_n, .s, .tag_in, .acc_out(acc_neg), .out_valid(val_neg));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 200; f++) begin
      longint e_pos, e_neg;
      e_pos = 0; e_neg = 0;
      for (int r = 0; r < R; r++) begin
        longint v;
        @(negedge clk);
        if (r > 0) begin
          checks++;
          if (val_pos || val_neg) begin failures++; $display("early out_valid"); end
        end
        s = (f % 9 == 0) ? {1'b1, {(IN_W-1){1'b0}}} : IN_W'($urandom);
        v = longint'($signed(s));
        tag_in = '{valid: 1'b1, first: r == 0, last: r == R - 1};
        e_pos += v <<< (R - 1 - r);
        e_neg += (r == 0) ? -(v <<< (R - 1)) : (v <<< (R - 1 - r));
      end
      @(negedge clk);
      checks += 3;
      if (!val_pos || !val_neg) begin failures++; $display("frame %0d: no out_valid", f); end
      if (longint'(acc_pos) != e_pos) begin failures++; $display("frame %0d: pos %0d vs %0d", f, acc_pos, e_pos); end
      if (longint'(acc_neg) != e_neg) begin failures++; $display("frame %0d: neg %0d vs %0d", f, acc_neg, e_neg); end
      frames++;
      // random idle gap with garbage data and valid low
      tag_in = '0;
      if ($urandom_range(0, 1) == 1) begin
        s = IN_W'($urandom);
        tag_in = '{valid: 1'b0, first: 1'b1, last: 1'b1};
        @(negedge clk);
        checks++;
        if (val_pos || val_neg) begin failures++; $display("out_valid while idle"); end
        checks++;
        if (longint'(acc_pos) != e_pos) begin failures++; $display("result not held"); end
        tag_in = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
