// identification_unit (IU): finds the unaffected vertices between the previous
// snapshot t and the current snapshot t+1.
//
// A vertex is unaffected when its input feature, its neighbour list and every
// neighbour's input feature are the same in both snapshots. The unit works in
// two passes over vertices 0 .. num_vertices-1:
//   pass 1 (features): reads H_t[v] and H_t+1[v] from HBM, compares them and
//     writes the result into the Immune_Bitmap (IB_Buffer, one bit per
//     vertex). A vertex whose feature changed is also invalidated in the
//     IF_Buffer cache. With `first` set (no previous snapshot) no feature is
//     read and every vertex counts as changed.
//   pass 2 (topology): for an immune vertex, fetches its begin/end offsets in
//     both snapshots, then its neighbour IDs pair by pair, comparing the IDs
//     and checking each neighbour's immune bit. A vertex that passes every
//     test is pushed into the Unaffected_Vertex_Queue (uvq_push).
// The document runs these steps as one five-stage pipeline
// (Fetch_Vertex/Offsets/Neighbors/Features, Compare_Data) and skips a feature
// comparison whose immune bit is already known; here they are sequenced by a
// state machine, one memory access at a time, and the two passes let a
// one-bit bitmap stand for "known immune". Neighbour lists must be stored in
// the same (e.g. ascending) order in both snapshots.
//
// Timing: GS reads return data one cycle after the address; HBM reads go
// through the request arbiter and may take any number of cycles.
module identification_unit
  import race_pkg::*;
#(
  parameter int unsigned NV = 131072,
  parameter int unsigned NE = 65536,
  localparam int unsigned VW = $clog2(NV),
  localparam int unsigned EW = $clog2(NE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              first,
  input  logic [VW:0]       num_vertices,
  input  logic [2:0]        prev_region,
  input  logic [2:0]        cur_region,
  output logic              done,
  // graph structure of both snapshots (one-cycle read latency)
  output logic              offp_re,
  output logic [VW-1:0]     offp_addr,
  input  logic [2*EW-1:0]   offp_data,   // {begin, end}
  output logic              offc_re,
  output logic [VW-1:0]     offc_addr,
  input  logic [2*EW-1:0]   offc_data,
  output logic              nbrp_re,
  output logic [EW-1:0]     nbrp_addr,
  input  logic [VW-1:0]     nbrp_data,
  output logic              nbrc_re,
  output logic [EW-1:0]     nbrc_addr,
  input  logic [VW-1:0]     nbrc_data,
  // HBM (through the arbiter)
  output logic              mem_valid,
  input  logic              mem_ready,
  output mem_req_t          mem_req,
  input  logic              mem_rsp_valid,
  input  vec_t              mem_rsp_data,
  // IF_Buffer invalidation
  output logic              inv_valid,
  input  logic              inv_ready,
  output logic [VW-1:0]     inv_vid,
  // Unaffected_Vertex_Queue
  output logic              uvq_push,
  output logic [VW-1:0]     uvq_vid,
  // statistics of the last run
  output logic [VW:0]       n_immune,
  output logic [VW:0]       n_unaffected
);
  typedef enum logic [3:0] {
    S_IDLE, S1_REQP, S1_REQC, S1_WAIT, S1_INV,
    S2_RD, S2_CHK, S2_NB, S2_NBC, S2_IBC, S2_NEXT, S_DONE
  } state_e;

  state_e         st;
  logic [VW:0]    v;
  logic [EW-1:0]  bp, bc, deg, i;
  vec_t           fp;
  logic [1:0]     nrsp;
  logic           same_feat;

  // Immune_Bitmap
  logic           ib_we, ib_wd, ib_re, ib_rd;
  logic [VW-1:0]  ib_wa, ib_ra;
  sram_buffer #(.DEPTH(NV), .WIDTH(1)) u_ib (
    .clk, .we(ib_we), .waddr(ib_wa), .wdata(ib_wd),
    .re(ib_re), .raddr(ib_ra), .rdata(ib_rd)
  );

  logic [EW-1:0] degp_w, degc_w;
  assign degp_w = offp_data[EW-1:0] - offp_data[2*EW-1:EW];
  assign degc_w = offc_data[EW-1:0] - offc_data[2*EW-1:EW];

  always_comb begin
    offp_re = 1'b0; offc_re = 1'b0; nbrp_re = 1'b0; nbrc_re = 1'b0;
    offp_addr = v[VW-1:0]; offc_addr = v[VW-1:0];
    nbrp_addr = bp + i;    nbrc_addr = bc + i;
    ib_re = 1'b0; ib_ra = v[VW-1:0];
    mem_valid = 1'b0;
    mem_req   = '{we: 1'b0, addr: hbm_addr(prev_region, HBM_VW'(v[VW-1:0])), wdata: '0};
    inv_valid = (st == S1_INV);
    inv_vid   = v[VW-1:0];
    unique case (st)
      S1_REQP: mem_valid = 1'b1;
      S1_REQC: begin
        mem_valid    = 1'b1;
        mem_req.addr = hbm_addr(cur_region, HBM_VW'(v[VW-1:0]));
      end
      S2_RD: begin
        ib_re = 1'b1; offp_re = 1'b1; offc_re = 1'b1;
      end
      S2_NB: begin
        nbrp_re = 1'b1; nbrc_re = 1'b1;
      end
      S2_NBC: begin
        ib_re = 1'b1; ib_ra = nbrc_data;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; v <= '0; bp <= '0; bc <= '0; deg <= '0; i <= '0;
      fp <= '0; nrsp <= '0; same_feat <= 1'b0;
      done <= 1'b0; uvq_push <= 1'b0; uvq_vid <= '0;
      ib_we <= 1'b0; ib_wa <= '0; ib_wd <= 1'b0;
      n_immune <= '0; n_unaffected <= '0;
    end else begin
      uvq_push <= 1'b0;
      ib_we    <= 1'b0;
      done     <= 1'b0;
      if (mem_rsp_valid) begin
        nrsp <= nrsp + 1'b1;
        if (nrsp == 2'd0) fp <= mem_rsp_data;
        else              same_feat <= (mem_rsp_data == fp);
      end
      unique case (st)
        S_IDLE: if (start) begin
          v <= '0; n_immune <= '0; n_unaffected <= '0; nrsp <= '0;
          if (num_vertices == 0) st <= S_DONE;
          else if (first) begin
            same_feat <= 1'b0; st <= S1_INV;   // everything counts as changed
          end else st <= S1_REQP;
        end
        // ---------------- pass 1: feature comparison ----------------
        S1_REQP: if (mem_ready) st <= S1_REQC;
        S1_REQC: if (mem_ready) st <= S1_WAIT;
        S1_WAIT: if (nrsp == 2'd2) begin
          nrsp  <= '0;
          ib_we <= 1'b1; ib_wa <= v[VW-1:0]; ib_wd <= same_feat;
          if (same_feat) begin
            n_immune <= n_immune + 1'b1;
            if (v + 1 == num_vertices) begin v <= '0; st <= S2_RD; end
            else begin v <= v + 1'b1; st <= S1_REQP; end
          end else st <= S1_INV;
        end
        S1_INV: if (inv_ready) begin
          if (first) begin ib_we <= 1'b1; ib_wa <= v[VW-1:0]; ib_wd <= 1'b0; end
          if (v + 1 == num_vertices) begin v <= '0; st <= S2_RD; end
          else begin
            v  <= v + 1'b1;
            st <= first ? S1_INV : S1_REQP;
          end
        end
        // ---------------- pass 2: topology comparison ----------------
        S2_RD: st <= S2_CHK;
        S2_CHK: begin
          bp  <= offp_data[2*EW-1:EW];
          bc  <= offc_data[2*EW-1:EW];
          deg <= degc_w;
          i   <= '0;
          if (!ib_rd || degp_w != degc_w) st <= S2_NEXT;       // affected
          else if (degc_w == 0) begin
            uvq_push <= 1'b1; uvq_vid <= v[VW-1:0];
            n_unaffected <= n_unaffected + 1'b1;
            st <= S2_NEXT;
          end else st <= S2_NB;
        end
        S2_NB:  st <= S2_NBC;
        S2_NBC: st <= (nbrp_data != nbrc_data) ? S2_NEXT : S2_IBC;
        S2_IBC: begin
          if (!ib_rd) st <= S2_NEXT;                           // neighbour changed
          else if (i + 1'b1 == deg) begin
            uvq_push <= 1'b1; uvq_vid <= v[VW-1:0];
            n_unaffected <= n_unaffected + 1'b1;
            st <= S2_NEXT;
          end else begin
            i  <= i + 1'b1;
            st <= S2_NB;
          end
        end
        S2_NEXT: begin
          if (v + 1 == num_vertices) st <= S_DONE;
          else begin v <= v + 1'b1; st <= S2_RD; end
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
