// tb_sram_buffer: writes random words to random addresses of a 64 x 12 RAM,
// keeps a model array and checks every read one cycle after its address,
// including a read of an address written in the same cycle (old data), and
// that rdata holds while re is low.
module tb_sram_buffer;
  localparam int D = 64, W = 12;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sram_buffer #(.DEPTH(D), .WIDTH(W)) dut (.*);

  initial begin
    logic [W-1:0] exp;
    // fill
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      re = 1; raddr = 6'($urandom);
      we = ($urandom % 2) == 1; waddr = ($urandom % 4 == 0) ? raddr : 6'($urandom); wdata = W'($urandom);
      exp = model[raddr];
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL: read %0d got %h exp %h", raddr, rdata, exp); end
    end
    // hold while re is low
    @(negedge clk); we = 0; re = 0; exp = rdata; raddr = raddr + 1'b1;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (rdata !== exp) begin failures++; $display("FAIL: rdata changed without re"); end
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
