// hbm_model: behavioural model of the off-chip HBM for testbenches (not
// synthesizable). It stores one DIM-element vector per address in a sparse
// associative array, accepts a request when req_ready is high, applies a
// write immediately and answers reads in order after LAT cycles. With
// STALL_PCT > 0 it drops req_ready in that percentage of cycles to exercise
// back-pressure. Reads of never-written addresses return zero. Tasks poke
// and peek give the testbench direct access.
module hbm_model
  import race_pkg::*;
#(
  parameter int LAT       = 4,
  parameter int STALL_PCT = 25
) (
  input  logic     clk,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output vec_t     rsp_data
);
  vec_t mem [logic [HBM_AW-1:0]];
  typedef struct { vec_t data; longint due; } pend_t;
  pend_t  q [$];
  longint now = 0;

  task automatic poke(input logic [HBM_AW-1:0] a, input vec_t d);
    mem[a] = d;
  endtask
  function automatic vec_t peek(input logic [HBM_AW-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  initial begin
    req_ready = 1'b1;
    rsp_valid = 1'b0;
    rsp_data  = '0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    if (req_valid && req_ready) begin
      if (req.we) mem[req.addr] = req.wdata;
      else q.push_back('{data: peek(req.addr), due: now + LAT});
    end
    if (q.size() != 0 && q[0].due <= now) begin
      rsp_valid <= 1'b1;
      rsp_data  <= q[0].data;
      void'(q.pop_front());
    end else rsp_valid <= 1'b0;
    req_ready <= (STALL_PCT == 0) ? 1'b1 : (($urandom % 100) >= STALL_PCT);
  end
endmodule
