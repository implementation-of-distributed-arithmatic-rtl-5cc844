// tb_dram_lut: self-checking test of the dual-port LUT RAM.
// Writes every word, then mixes random writes with random reads on both
// ports, comparing with a reference copy. Also checks that a word written on
// a clock edge reads back old data before the edge and new data after it.
module tb_dram_lut;
  localparam int unsigned M = 2, DW = 9;

  logic clk = 1'b0, we = 1'b0;
  logic [M-1:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [DW-1:0] wdata = '0, rdata_a, rdata_b;
  logic [DW-1:0] model [2**M];
  int checks = 0, failures = 0;

  dram_lut #(.M(M), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int a = 0; a < 2**M; a++) begin
      raddr_a = M'(a);
      raddr_b = M'((2**M - 1) - a);
      #1;
      checks += 2;
      if (rdata_a !== model[a]) begin
        failures++; $display("port a addr %0d: %h vs %h", a, rdata_a, model[a]);
      end
      if (rdata_b !== model[(2**M - 1) - a]) begin
        failures++; $display("port b addr %0d wrong", (2**M - 1) - a);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 2**M; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = M'(a); wdata = DW'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    check_reads();
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1;
      waddr = M'($urandom); wdata = DW'($urandom);
      raddr_a = waddr;
      raddr_b = M'($urandom);
      #1;
      // before the edge: old contents on both ports
      checks += 2;
      if (rdata_a !== model[raddr_a]) begin failures++; $display("early write seen"); end
      if (rdata_b !== model[raddr_b]) begin failures++; $display("port b wrong"); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata_a !== model[raddr_a]) begin failures++; $display("write not seen after edge"); end
    end
    @(negedge clk);
    we = 1'b0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
