// tb_sipo_reg: self-checking test of the SIPO input register.
// Shifts random samples in (with random idle cycles), keeps its own copy of
// the delay line, and checks every tap and, for every step r_idx, every
// section's bit-slice (bit q*R + R-1-r_idx of each tap, MSB first).
module tb_sipo_reg;
  import da_fir_pkg::*;
  localparam int unsigned N = 16, L = 8, R = 4, Q = L / R;

  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0;
  logic [L-1:0] x_in = '0;
  logic [idx_w(R)-1:0] r_idx = '0;
  logic [N-1:0][L-1:0] taps;
  logic [Q-1:0][N-1:0] slice;
  int checks = 0, failures = 0;
  logic [L-1:0] model [N];

  sipo_reg #(.N(N), .L(L), .R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int k = 0; k < N; k++) begin
      checks++;
      if (taps[k] !== model[k]) begin
        failures++;
        $display("tap %0d: got %h expected %h", k, taps[k], model[k]);
      end
    end
    for (int r = 0; r < R; r++) begin
      r_idx = r[idx_w(R)-1:0];
      #1;
      for (int q = 0; q < Q; q++) begin
        for (int k = 0; k < N; k++) begin
          checks++;
          if (slice[q][k] !== model[k][q*R + R - 1 - r]) begin
            failures++;
            $display("slice q=%0d r=%0d k=%0d wrong", q, r, k);
          end
        end
      end
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) model[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      shift_en = ($urandom_range(0, 3) != 0);
      x_in     = L'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int k = N - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = x_in;
      end
      @(negedge clk);
      shift_en = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
