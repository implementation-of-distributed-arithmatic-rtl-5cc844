// tb_psat: self-checking test of the pipelined shift-adder tree.
// Random section results (including extremes) go into a Q = 2 tree (one
// register level) and a Q = 3 tree (two levels) every cycle; the outputs
// must equal sum_q 2^(qR) * acc[q] after the tree latency, with valid
// arriving alongside.
module tb_psat;
  localparam int unsigned R = 4, IN_W = 16;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [1:0][IN_W-1:0] acc2;
  logic [2:0][IN_W-1:0] acc3;
  logic signed [IN_W+R+1:0] y2;
  logic signed [IN_W+2*R+2:0] y3;
  logic v2, v3;
  int checks = 0, failures = 0;
  longint e2 [$], e3 [$];
  logic ev2 [$], ev3 [$];

  psat #(.Q(2), .R(R), .IN_W(IN_W)) u2 (.clk, .rst_n, .acc(acc2), .in_valid, .y(y2), .y_valid(v2));
  psat #(.Q(3), .R(R), .IN_W(IN_W)) u3 (.clk, .rst_n, .acc(acc3), .in_valid, .y(y3), .y_valid(v3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc2 = '0; acc3 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      longint s2, s3;
      s2 = 0; s3 = 0;
      @(negedge clk);
      if (e2.size() == 1) begin
        longint x;
        logic ev;
        x = e2.pop_front(); ev = ev2.pop_front();
        checks += 2;
        if (longint'(y2) != x) begin failures++; $display("Q=2: %0d vs %0d", y2, x); end
        if (v2 !== ev) begin failures++; $display("Q=2 valid wrong"); end
      end
      if (e3.size() == 2) begin
        longint x;
        logic ev;
        x = e3.pop_front(); ev = ev3.pop_front();
        checks += 2;
        if (longint'(y3) != x) begin failures++; $display("Q=3: %0d vs %0d", y3, x); end
        if (v3 !== ev) begin failures++; $display("Q=3 valid wrong"); end
      end
      for (int q = 0; q < 3; q++) begin
        logic [IN_W-1:0] a;
        a = (i % 5 == 0) ? {1'b1, {(IN_W-1){1'b0}}} : (i % 5 == 1) ? {1'b0, {(IN_W-1){1'b1}}} : IN_W'($urandom);
        acc3[q] = a;
        s3 += longint'($signed(a)) <<< (q * R);
        if (q < 2) begin
          acc2[q] = a;
          s2 += longint'($signed(a)) <<< (q * R);
        end
      end
      in_valid = $urandom_range(0, 1) == 1;
      e2.push_back(s2); e3.push_back(s3);
      ev2.push_back(in_valid); ev3.push_back(in_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
