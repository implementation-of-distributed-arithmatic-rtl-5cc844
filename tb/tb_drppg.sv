// tb_drppg: self-checking test of the partial product generator.
// The testbench plays the LUTs: it answers each group's read address from its
// own table of random words. Random slices with random tags are applied; one
// cycle later the partial products must equal the table words selected by the
// M-bit groups of the slice, and the tag must come out delayed by one cycle.
// Partial products must hold while the tag is not valid.
module tb_drppg;
  import da_fir_pkg::*;
  localparam int unsigned N = 16, M = 2, DW = 9, P = N / M;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] slice = '0;
  slice_tag_t tag_in = '0, tag_out;
  logic [P-1:0][M-1:0] lut_raddr;
  logic [P-1:0][DW-1:0] lut_rdata, pp, exp_pp;
  slice_tag_t exp_tag;
  logic [DW-1:0] table_w [P][2**M];
  int checks = 0, failures = 0;

  drppg #(.N(N), .M(M), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    for (int p = 0; p < P; p++) lut_rdata[p] = table_w[p][lut_raddr[p]];
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < P; p++)
      for (int a = 0; a < 2**M; a++) table_w[p][a] = DW'($urandom);
    exp_pp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      slice  = N'($urandom);
      tag_in = slice_tag_t'($urandom);
      exp_tag = tag_in;
      if (tag_in.valid) begin
        for (int p = 0; p < P; p++) begin
          logic [M-1:0] a;
          for (int j = 0; j < M; j++) a[j] = slice[p*M + j];
          exp_pp[p] = table_w[p][a];
        end
      end
      @(posedge clk);
      #1;
      checks += 2;
      if (pp !== exp_pp) begin
        failures++; $display("cycle %0d: pp %h expected %h", i, pp, exp_pp);
      end
      if (tag_out !== exp_tag) begin
        failures++; $display("cycle %0d: tag wrong", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
