// tb_ipu: fills a Dependency_Queue model with random levels 0..3 and runs the
// IPU for layers 1, 2 and 3, once with a always-ready consumer and once with
// random back-pressure. Checks every decision (in vertex order, level, and
// reuse = level >= layer), the done pulse after the last one, and that with
// no back-pressure the comparator pipeline delivers one decision per cycle.
module tb_ipu;
  localparam int NV = 256, N = 200;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [1:0] layer = '0, dq_data, out_lvl;
  logic [8:0] num_vertices = 9'(N);
  logic dq_re, out_valid, out_ready = 1, out_reuse;
  logic [7:0] dq_addr, out_vid;
  logic [1:0] dq [NV];
  int checks = 0, failures = 0;
  bit bp = 0;
  always #5 clk = ~clk;

  always_ff @(posedge clk) if (dq_re) dq_data <= dq[dq_addr];

  ipu #(.NV(NV), .NLAYER(3), .DQ_W(2)) dut (.*);

  int nexp;
  longint first_t, last_t, cyc;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (bp) out_ready <= ($urandom % 3) != 0; else out_ready <= 1'b1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (int'(out_vid) != nexp || out_lvl !== dq[out_vid] || out_reuse !== (dq[out_vid] >= layer)) begin
      failures++; $display("FAIL: decision vid %0d (exp %0d) lvl %0d reuse %0d", out_vid, nexp, out_lvl, out_reuse);
    end
    if (nexp == 0) first_t = cyc;
    last_t = cyc;
    nexp++;
  end

  initial begin
    cyc = 0;
    for (int v = 0; v < NV; v++) dq[v] = 2'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      bp = (pass == 1);
      for (int l = 1; l <= 3; l++) begin
        @(negedge clk);
        nexp = 0; layer = 2'(l); start = 1;
        @(negedge clk); start = 0;
        while (!done) @(posedge clk);
        #1;
        checks++;
        if (nexp != N) begin failures++; $display("FAIL: %0d decisions before done", nexp); end
        if (!bp) begin
          checks++;
          if (last_t - first_t != N - 1) begin failures++; $display("FAIL: %0d cycles for %0d decisions", last_t - first_t + 1, N); end
        end
      end
    end
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
