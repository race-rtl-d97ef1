// tb_pe: drives random operands through the processing element in both modes
// and checks the product output, accumulation of products, accumulation of
// the external input and restart with clear, against an integer model of the
// Q7.8 arithmetic.
module tb_pe;
  import race_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, clear = 0, mode_rnn = 0, add_ext = 0, out_mul = 0;
  elem_t gnn_a = '0, gnn_b = '0, rnn_a = '0, rnn_b = '0, c = '0, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pe dut (.*);

  function automatic elem_t mul_ref(elem_t a, elem_t b);
    longint p;
    p = longint'(a) * longint'(b);
    return elem_t'(p >>> FRAC);          // arithmetic shift of the full product
  endfunction

  initial begin
    elem_t acc, prod;
    acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0; clear = ($urandom % 6) == 0;
      mode_rnn = $urandom % 2; add_ext = ($urandom % 5) == 0;
      gnn_a = elem_t'($urandom); gnn_b = elem_t'($urandom);
      rnn_a = elem_t'($urandom); rnn_b = elem_t'($urandom); c = elem_t'($urandom);
      prod = mode_rnn ? mul_ref(rnn_a, rnn_b) : mul_ref(gnn_a, gnn_b);
      out_mul = 1; #1;
      checks++;
      if (y !== prod) begin failures++; $display("FAIL: product %h exp %h", y, prod); end
      out_mul = 0;
      if (en) acc = clear ? (add_ext ? c : prod) : acc + (add_ext ? c : prod);
      @(posedge clk); #1;
      checks++;
      if (y !== acc) begin failures++; $display("FAIL: partial %h exp %h", y, acc); end
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
