// tb_pe_array: loads weights, then streams 80 GNN and RNN tasks into a
// 4-group array as fast as it accepts them while the result side applies
// random back-pressure. Every result is matched by vertex ID against a
// direct model; the test also checks that several groups worked at once,
// that in_ready drops when all groups are busy, and that no result is lost
// or duplicated.
module tb_pe_array;
  import race_pkg::*;
  localparam int NV = 128, NG = 4, CW = $clog2(DIM), NT = 80;
  logic clk = 0, rst_n = 0;
  elem_t alpha = elem_t'(100), beta = elem_t'(156);
  logic w_we = 0;
  logic [1:0] w_layer = '0, in_layer = '0, out_layer;
  logic [CW-1:0] w_col = '0;
  vec_t w_data = '0, in_a = '0, in_b = '0, out_data;
  logic in_valid = 0, in_ready, in_rnn = 0, out_valid, out_ready = 0, out_rnn;
  logic [6:0] in_vid = '0, out_vid;
  logic [31:0] n_skipped;
  logic [2:0] max_busy;
  elem_t W [4][DIM][DIM];
  vec_t exp_r [NT];
  bit got [NT];
  int checks = 0, failures = 0, n_out = 0, full_seen = 0;
  always #5 clk = ~clk;

  pe_array #(.NV(NV), .NLAYER(3), .NGROUP(NG), .LW(2)) dut (.*);

  always @(posedge clk) begin
    if (in_valid && !in_ready) full_seen++;
    if (out_valid && out_ready) begin
      checks++;
      if (int'(out_vid) >= NT || got[out_vid] || out_data !== exp_r[out_vid]) begin
        failures++; $display("FAIL: result for vertex %0d", out_vid);
      end else got[out_vid] = 1;
      n_out++;
    end
    out_ready <= ($urandom % 3) != 0;
  end

  initial begin
    for (int n = 1; n < 4; n++) for (int i = 0; i < DIM; i++) for (int j = 0; j < DIM; j++)
      W[n][i][j] = elem_t'(int'($urandom % 200) - 100);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n < 4; n++) for (int j = 0; j < DIM; j++) begin
      @(negedge clk); w_we = 1; w_layer = 2'(n); w_col = CW'(j);
      for (int i = 0; i < DIM; i++) w_data[i] = W[n][i][j];
    end
    @(negedge clk); w_we = 0;
    for (int k = 0; k < NT; k++) begin
      vec_t a, b, e;
      logic rnn;
      logic [1:0] ly;
      rnn = ($urandom % 3) == 0; ly = 2'(1 + $urandom % 3);
      for (int i = 0; i < DIM; i++) begin
        a[i] = (($urandom % 4) == 0) ? '0 : elem_t'(int'($urandom % 800) - 400);
        b[i] = elem_t'(int'($urandom % 800) - 400);
      end
      for (int i = 0; i < DIM; i++) begin
        if (rnn) e[i] = fx_mul(alpha, b[i]) + fx_mul(beta, a[i]);
        else begin
          elem_t acc;
          acc = '0;
          for (int j = 0; j < DIM; j++) acc = acc + fx_mul(W[ly][i][j], a[j]);
          e[i] = (acc < 0) ? '0 : acc;
        end
      end
      exp_r[k] = e; got[k] = 0;
      @(negedge clk);
      in_valid = 1; in_vid = 7'(k); in_rnn = rnn; in_layer = ly; in_a = a; in_b = b;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0;
    end
    while (n_out < NT) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != NT) begin failures++; $display("FAIL: %0d results", n_out); end
    checks++;
    if (max_busy < 2) begin failures++; $display("FAIL: never more than one group busy"); end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL: array never full"); end
    $display("max busy %0d, full cycles %0d", max_busy, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
