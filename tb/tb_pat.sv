// tb_pat: self-checking test of the pipelined adder tree.
// Three trees are driven with new random signed words every cycle: 8 inputs
// (3 levels), 5 inputs (padded to 8) and 1 input (no register). Each sum is
// compared with a reference sum delayed by the expected latency, and the tag
// must arrive with the sum.
module tb_pat;
  import da_fir_pkg::*;
  localparam int unsigned IN_W = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0][IN_W-1:0] din8;
  logic [4:0][IN_W-1:0] din5;
  logic [0:0][IN_W-1:0] din1;
  slice_tag_t tag_in = '0, tag8, tag5, tag1;
  logic signed [IN_W+2:0] sum8, sum5;
  logic signed [IN_W-1:0] sum1;
  int checks = 0, failures = 0;
  longint exp8 [$], exp5 [$];
  slice_tag_t exptag [$];

  pat #(.NUM(8), .IN_W(IN_W)) u8 (.clk, .rst_n, .din(din8), .tag_in, .sum(sum8), .tag_out(tag8));
  pat #(.NUM(5), .IN_W(IN_W)) u5 (.clk, .rst_n, .din(din5), .tag_in, .sum(sum5), .tag_out(tag5));
  pat #(.NUM(1), .IN_W(IN_W)) u1 (.clk, .rst_n, .din(din1), .tag_in, .sum(sum1), .tag_out(tag1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din8 = '0; din5 = '0; din1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      longint s8, s5;
      @(negedge clk);
      // compare outputs of the words applied 3 cycles ago
      if (exp8.size() == 3) begin
        longint e8, e5;
        slice_tag_t et;
        e8 = exp8.pop_front(); e5 = exp5.pop_front(); et = exptag.pop_front();
        checks += 3;
        if (longint'(sum8) != e8) begin failures++; $display("sum8 %0d vs %0d", sum8, e8); end
        if (longint'(sum5) != e5) begin failures++; $display("sum5 %0d vs %0d", sum5, e5); end
        if (tag8 !== et || tag5 !== et) begin failures++; $display("tag misaligned"); end
      end
      s8 = 0; s5 = 0;
      for (int k = 0; k < 8; k++) begin
        // bias some cycles to extreme values
        din8[k] = (i % 7 == 0) ? {1'b1, {(IN_W-1){1'b0}}} : IN_W'($urandom);
        s8 += longint'($signed(din8[k]));
      end
      for (int k = 0; k < 5; k++) begin
        din5[k] = (i % 11 == 0) ? {1'b0, {(IN_W-1){1'b1}}} : IN_W'($urandom);
        s5 += longint'($signed(din5[k]));
      end
      din1[0] = IN_W'($urandom);
      tag_in = slice_tag_t'($urandom);
      exp8.push_back(s8); exp5.push_back(s5); exptag.push_back(tag_in);
      #1;
      checks += 2;
      if (sum1 !== $signed(din1[0])) begin failures++; $display("sum1 wrong"); end
      if (tag1 !== tag_in) begin failures++; $display("tag1 wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
