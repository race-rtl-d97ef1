// tb_weight_buffer: loads random columns for three layers and reads them back
// through four independent ports in the same cycle; layer 0 reads zero.
module tb_weight_buffer;
  import race_pkg::*;
  localparam int NL = 3, NR = 4, CW = $clog2(DIM);
  logic clk = 0, we = 0;
  logic [1:0] w_layer = '0, r_layer [NR];
  logic [CW-1:0] w_col = '0, r_col [NR];
  vec_t w_data = '0, r_data [NR];
  vec_t model [NL+1][DIM];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  weight_buffer #(.NLAYER(NL), .NRD(NR)) dut (.*);

  initial begin
    for (int n = 1; n <= NL; n++)
      for (int j = 0; j < DIM; j++) begin
        @(negedge clk);
        we = 1; w_layer = 2'(n); w_col = CW'(j);
        for (int i = 0; i < DIM; i++) w_data[i] = elem_t'($urandom);
        model[n][j] = w_data;
      end
    @(negedge clk); we = 0;
    for (int j = 0; j < DIM; j++) model[0][j] = '0;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      for (int p = 0; p < NR; p++) begin r_layer[p] = 2'($urandom % (NL + 1)); r_col[p] = CW'($urandom); end
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (r_data[p] !== model[r_layer[p]][r_col[p]]) begin
          failures++; $display("FAIL: port %0d layer %0d col %0d", p, r_layer[p], r_col[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
