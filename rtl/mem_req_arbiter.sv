// mem_req_arbiter: the FIFO request buffer between the accelerator's units and
// the single off-chip memory (HBM) port. NREQ requesters present a request
// (valid/ready); a round-robin pointer grants one per cycle, and the granted
// request is passed to the HBM port in the same cycle. For every read sent,
// the requester's index is pushed into an order FIFO; HBM returns read data in
// order (rsp_valid, no back-pressure), and each returning word is steered to
// the requester at the head of that FIFO. Writes have no response. At most
// MAX_OUT reads are in flight; further reads wait.
// Round-robin granting and the in-order response are this design's choice; the
// document says only that requests go through a FIFO request buffer.
module mem_req_arbiter
  import race_pkg::*;
#(
  parameter int unsigned NREQ    = 4,
  parameter int unsigned MAX_OUT = 16,
  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // requesters
  input  logic [NREQ-1:0] req_valid,
  output logic [NREQ-1:0] req_ready,
  input  mem_req_t        req      [NREQ],
  output logic [NREQ-1:0] rsp_valid,
  output vec_t            rsp_data,
  // HBM port
  output logic            hbm_req_valid,
  input  logic            hbm_req_ready,
  output mem_req_t        hbm_req,
  input  logic            hbm_rsp_valid,
  input  vec_t            hbm_rsp_data
);
  localparam int unsigned FW = $clog2(MAX_OUT);

  logic [IW-1:0] ord_q [MAX_OUT];
  logic [FW-1:0] wp, rp;
  logic [FW:0]   cnt;
  logic [IW-1:0] rr, grant;
  logic          any;

  // round-robin choice starting after the last winner
  always_comb begin
    any   = 1'b0;
    grant = '0;
    for (int k = 0; k < NREQ; k++) begin
      int unsigned idx;
      idx = (int'(rr) + 1 + k) % NREQ;
      if (!any && req_valid[idx] && (req[idx].we || cnt < (FW+1)'(MAX_OUT))) begin
        any   = 1'b1;
        grant = IW'(idx);
      end
    end
  end

  assign hbm_req_valid = any;
  assign hbm_req       = req[grant];

  always_comb begin
    req_ready = '0;
    if (any && hbm_req_ready) req_ready[grant] = 1'b1;
  end

  logic push, pop;
  assign push = any && hbm_req_ready && !req[grant].we;
  assign pop  = hbm_rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      rr  <= IW'(NREQ - 1);
    end else begin
      if (any && hbm_req_ready) rr <= grant;
      if (push) begin
        ord_q[wp] <= grant;
        wp        <= wp + 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
      cnt <= cnt + (FW+1)'(push) - (FW+1)'(pop);
    end
  end

  always_comb begin
    rsp_valid = '0;
    if (hbm_rsp_valid) rsp_valid[ord_q[rp]] = 1'b1;
  end
  assign rsp_data = hbm_rsp_data;

  // a response never arrives without an outstanding read
  assert property (@(posedge clk) disable iff (!rst_n) hbm_rsp_valid |-> cnt != 0);

endmodule
