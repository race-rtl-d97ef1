// tb_pe_group: random GNN and RNN tasks on one PE group. Checks each result
// against a direct model (ReLU(W*agg) or alpha*S + beta*X), that a GNN task
// takes exactly one cycle per non-zero aggregate element (at least one) and
// an RNN task two cycles, that zero columns are counted as skipped, and that
// the result is held while out_ready is low.
module tb_pe_group;
  import race_pkg::*;
  localparam int NV = 64, CW = $clog2(DIM);
  logic clk = 0, rst_n = 0;
  elem_t alpha = elem_t'(192), beta = elem_t'(-64);
  logic in_valid = 0, in_ready, in_rnn = 0, out_valid, out_ready = 0, out_rnn;
  logic [5:0] in_vid = '0, out_vid;
  logic [1:0] in_layer = '0, w_layer, out_layer;
  logic [CW-1:0] w_col;
  vec_t in_a = '0, in_b = '0, w_data, out_data;
  logic [31:0] n_skipped;
  elem_t W [4][DIM][DIM];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  always_comb for (int i = 0; i < DIM; i++) w_data[i] = W[w_layer][i][w_col];

  pe_group #(.NV(NV), .LW(2)) dut (.*);

  initial begin
    vec_t exp;
    int nz, zeros, t0, t1;
    zeros = 0;
    for (int n = 0; n < 4; n++) for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++)
      W[n][i][j] = elem_t'(int'($urandom % 160) - 80);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      in_rnn = (k % 4) == 3; in_layer = 2'(1 + $urandom % 3); in_vid = 6'(k);
      nz = 0;
      for (int i = 0; i < DIM; i++) begin
        in_a[i] = ((k % 7) == 0 || ($urandom % 3) == 0) ? '0 : elem_t'(int'($urandom % 1024) - 512);
        in_b[i] = elem_t'(int'($urandom % 1024) - 512);
        if (in_a[i] != 0) nz++;
      end
      if (!in_rnn) zeros += DIM - nz;
      for (int i = 0; i < DIM; i++) begin
        if (in_rnn) exp[i] = fx_mul(alpha, in_b[i]) + fx_mul(beta, in_a[i]);
        else begin
          elem_t acc;
          acc = '0;
          for (int j = 0; j < DIM; j++) acc = acc + fx_mul(W[in_layer][i][j], in_a[j]);
          exp[i] = (acc < 0) ? '0 : acc;
        end
      end
      in_valid = 1;
      @(posedge clk); t0 = $time;
      #1 in_valid = 0;
      #1;
      while (!out_valid) begin @(posedge clk); #1; end
      t1 = $time - 1;
      checks++;
      if ((t1 - t0) / 10 != (in_rnn ? 2 : (nz == 0 ? 1 : nz))) begin
        failures++; $display("FAIL: task %0d took %0d cycles, nz %0d", k, (t1 - t0) / 10, nz);
      end
      repeat (2) @(posedge clk);   // held while out_ready is low
      #1;
      checks++;
      if (!out_valid || out_data !== exp || out_vid !== 6'(k) || out_rnn !== in_rnn) begin
        failures++; $display("FAIL: task %0d result %h exp %h", k, out_data, exp);
      end
      @(negedge clk); out_ready = 1;
      @(negedge clk); out_ready = 0;
    end
    checks++;
    if (n_skipped !== 32'(zeros)) begin failures++; $display("FAIL: skipped %0d exp %0d", n_skipped, zeros); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
