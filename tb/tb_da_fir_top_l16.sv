// tb_da_fir_top_l16: end-to-end self-checking test of the DA FIR filter with
// 16-bit samples: four bit sections, which share two copies of the
// dual-port LUT set in pairs. Apart from the sizes it is the same test
// as tb_da_fir_top.
//
// The testbench computes the LUT words from a coefficient set (word a of
// group p = sum_j a[j] * c[pM+j]), writes them through the LUT write port,
// streams samples and compares every output with a direct convolution
// y(n) = sum_k c[k] x(n-k) on its own copy of the input history. For each
// output it also checks the latency (R + 2 + log2(N/M) + log2(L/R) cycles
// after the sample was accepted) and, while samples are offered back to
// back, that one is accepted exactly every R cycles.
//
// Phases: back-to-back streaming, streaming with random gaps, several
// run-time coefficient changes (including all-extreme coefficient and sample
// values), each between bursts. Every mechanism is counted and must occur:
// back-to-back acceptance, back-pressure (x_valid held while x_ready is low),
// idle gaps, reconfiguration, negative samples (sign bit slice subtracted)
// and the largest possible output magnitude.
module tb_da_fir_top_l16;
  import da_fir_pkg::*;
  localparam int unsigned N = 16, L = 16, W = 8, M = 2, R = 4;
  localparam int unsigned P = N / M, Q = L / R;
  localparam int unsigned DW = W + grow_w(M);
  localparam int unsigned YW = W + L + grow_w(N);
  localparam int unsigned LAT = R + 2 + grow_w(P) + grow_w(Q);
  // largest output: every coefficient and every sample at its most negative value
  localparam longint Y_MAX = longint'(N) <<< (W + L - 2);

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid = 1'b0, x_ready;
  logic [L-1:0] x_in = '0;
  logic lut_we = 1'b0;
  logic [idx_w(P)-1:0] lut_wgroup = '0;
  logic [M-1:0] lut_waddr = '0;
  logic [DW-1:0] lut_wdata = '0;
  logic y_valid;
  logic signed [YW-1:0] y_out;

  da_fir_top #(.N(N), .L(L), .W(W), .M(M), .R(R)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  longint coef [N];
  longint hist [N];
  longint exp_y [$];
  longint exp_t [$];
  longint last_accept = -1;
  int accepted = 0, produced = 0;
  int n_back_to_back = 0, n_backpressure = 0, n_idle = 0, n_reconfig = 0;
  int n_negative = 0, n_extreme = 0;
  bit streaming = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model and throughput check, sampled at each rising edge
  always @(posedge clk) begin
    if (rst_n && x_valid && !x_ready) n_backpressure++;
    if (rst_n && !x_valid && x_ready) n_idle++;
    if (rst_n && x_valid && x_ready) begin
      longint y;
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = longint'($signed(x_in));
      if (hist[0] < 0) n_negative++;
      y = 0;
      for (int k = 0; k < N; k++) y += coef[k] * hist[k];
      if (y == Y_MAX) n_extreme++;
      exp_y.push_back(y);
      exp_t.push_back(cycle);
      if (streaming && last_accept >= 0) begin
        checks++;
        if (cycle - last_accept != R) begin
          failures++;
          $display("accept interval %0d, expected %0d", cycle - last_accept, R);
        end else n_back_to_back++;
      end
      last_accept = cycle;
      accepted++;
    end
    if (rst_n && y_valid) begin
      longint e, t;
      produced++;
      checks += 2;
      if (exp_y.size() == 0) begin
        failures++;
        $display("unexpected output %0d", y_out);
      end else begin
        e = exp_y.pop_front();
        t = exp_t.pop_front();
        if (longint'(y_out) != e) begin
          failures++;
          $display("output %0d: got %0d expected %0d", produced, y_out, e);
        end
        if (cycle - t != LAT) begin
          failures++;
          $display("output %0d: latency %0d expected %0d", produced, cycle - t, LAT);
        end
      end
    end
  end

  task automatic program_coefs(input int mode);
    for (int k = 0; k < N; k++) begin
      case (mode)
        0: coef[k] = longint'($signed(W'($urandom)));
        1: coef[k] = -(longint'(1) <<< (W - 1));   // most negative
        default: coef[k] = (k == 0) ? 1 : 0;      // pass-through
      endcase
    end
    for (int p = 0; p < P; p++) begin
      for (int a = 0; a < 2**M; a++) begin
        longint s;
        s = 0;
        for (int j = 0; j < M; j++) if (a[j]) s += coef[p*M + j];
        @(negedge clk);
        lut_we = 1'b1;
        lut_wgroup = p[idx_w(P)-1:0];
        lut_waddr = M'(a);
        lut_wdata = DW'(s);
      end
    end
    @(negedge clk);
    lut_we = 1'b0;
  endtask

  // offer count samples; gaps: 0 = back to back, 1 = random idle cycles
  task automatic stream(input int count, input int gaps, input int kind);
    streaming = (gaps == 0);
    last_accept = -1;
    for (int i = 0; i < count; i++) begin
      @(negedge clk);
      if (gaps != 0) begin
        x_valid = 1'b0;
        repeat ($urandom_range(0, 6)) @(negedge clk);
      end
      x_valid = 1'b1;
      x_in = (kind == 1) ? {1'b1, {(L-1){1'b0}}} : L'($urandom);
      @(posedge clk);
      while (!x_ready) @(posedge clk);
    end
    @(negedge clk);
    x_valid = 1'b0;
    streaming = 1'b0;
    // let the last sample leave the slice cycles before anything else
    repeat (R + 1) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < N; k++) hist[k] = 0;
    program_coefs(0);          // LUT has no reset: program before use
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    stream(60, 0, 0);
    stream(60, 1, 0);
    for (int c = 0; c < 4; c++) begin
      program_coefs(c == 1 ? 1 : (c == 3 ? 2 : 0));
      n_reconfig++;
      stream(40, c % 2, (c == 1) ? 1 : 0);
    end
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (produced != accepted || exp_y.size() != 0) begin
      failures++;
      $display("accepted %0d samples but produced %0d outputs", accepted, produced);
    end
    $display("mechanisms: back_to_back=%0d backpressure=%0d idle=%0d reconfig=%0d negative=%0d extreme=%0d",
             n_back_to_back, n_backpressure, n_idle, n_reconfig, n_negative, n_extreme);
    checks += 6;
    if (n_back_to_back == 0) begin failures++; $display("no back-to-back samples"); end
    if (n_backpressure == 0) begin failures++; $display("no back-pressure"); end
    if (n_idle == 0) begin failures++; $display("no idle cycles"); end
    if (n_reconfig == 0) begin failures++; $display("no reconfiguration"); end
    if (n_negative == 0) begin failures++; $display("no negative samples"); end
    if (n_extreme == 0) begin failures++; $display("no extreme output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
