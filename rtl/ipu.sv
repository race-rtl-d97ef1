// ipu: incremental processing unit. For GNN layer `layer` it scans the
// Dependency_Queue of vertices 0 .. num_vertices-1 and emits one decision per
// vertex: reuse (the vertex's layer state from snapshot t is still valid,
// because DQ[v] >= layer) or recompute.
// The DQ value passes a chain of NLAYER pipelined comparators that hold the
// constants 1, 2, .., NLAYER; the first comparator that matches fixes the
// vertex's level L, which leaves the chain together with the vertex ID as the
// pair <ID, L>. A final comparison of L with the layer number gives the
// decision.
// Interface: start pulses with `layer`; decisions leave on out_* with a
// valid/ready handshake; the whole pipeline stalls while out_ready is low.
// done pulses after the last decision has been accepted. Latency from a DQ
// read to the output is NLAYER + 2 cycles. The document stores the triple
// <ID, L, Value> in a hash table; here the Value stays in the layer-state
// memory, where the reuse decision leaves it untouched.
module ipu
  import race_pkg::*;
#(
  parameter int unsigned NV     = 131072,
  parameter int unsigned NLAYER = 3,
  parameter int unsigned DQ_W   = 2,
  localparam int unsigned VW = $clog2(NV)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [DQ_W-1:0] layer,
  input  logic [VW:0]     num_vertices,
  output logic            done,
  // Dependency_Queue read port (one-cycle latency)
  output logic            dq_re,
  output logic [VW-1:0]   dq_addr,
  input  logic [DQ_W-1:0] dq_data,
  // decisions
  output logic            out_valid,
  input  logic            out_ready,
  output logic [VW-1:0]   out_vid,
  output logic [DQ_W-1:0] out_lvl,
  output logic            out_reuse
);
  typedef struct packed {
    logic            valid;
    logic [VW-1:0]   vid;
    logic [DQ_W-1:0] dq;
    logic            matched;
    logic [DQ_W-1:0] lvl;
  } slot_t;

  localparam int unsigned NS = NLAYER + 1;   // read stage + comparator stages

  slot_t           st [NS];
  logic            running;
  logic [VW:0]     cnt, n_out;
  logic [DQ_W-1:0] layer_q;
  logic            adv, last_sent;

  assign adv     = !out_valid || out_ready;
  assign dq_re   = running && adv && (cnt < num_vertices);
  assign dq_addr = cnt[VW-1:0];

  assign out_valid = st[NS-1].valid;
  assign out_vid   = st[NS-1].vid;
  assign out_lvl   = st[NS-1].matched ? st[NS-1].lvl : '0;
  assign out_reuse = st[NS-1].matched && (st[NS-1].lvl >= layer_q);
  assign last_sent = out_valid && out_ready && (n_out + 1'b1 == num_vertices);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; cnt <= '0; n_out <= '0; layer_q <= '0; done <= 1'b0;
      for (int k = 0; k < NS; k++) st[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        running <= (num_vertices != 0);
        done    <= (num_vertices == 0);
        cnt <= '0; n_out <= '0; layer_q <= layer;
        for (int k = 0; k < NS; k++) st[k].valid <= 1'b0;
      end else if (running && adv) begin
        // read stage: DQ value of the vertex read in the previous cycle
        st[0].valid   <= dq_re;
        st[0].vid     <= cnt[VW-1:0];
        st[0].matched <= 1'b0;
        st[0].lvl     <= '0;
        if (dq_re) cnt <= cnt + 1'b1;
        // comparator stages: stage k compares with the constant k
        for (int k = 1; k < NS; k++) begin
          st[k] <= st[k-1];
          if (k == 1) st[k].dq <= dq_data;
          if (!st[k-1].matched && ((k == 1 ? dq_data : st[k-1].dq) == DQ_W'(k))) begin
            st[k].matched <= 1'b1;
            st[k].lvl     <= DQ_W'(k);
          end
        end
        if (out_valid && out_ready) n_out <= n_out + 1'b1;
        if (last_sent) begin running <= 1'b0; done <= 1'b1; end
      end
    end
  end
endmodule
