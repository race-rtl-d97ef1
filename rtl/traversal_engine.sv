// traversal_engine (TE): computes the n-hop aggregation dependency of every
// vertex by a level-by-level, breadth-first traversal of snapshot t+1 that
// starts from all unaffected vertices at once.
//
// Definitions used here: an unaffected vertex (found by the IU) has 0-hop
// dependency; a vertex has L-hop dependency when it and all its direct
// neighbours have (L-1)-hop dependency. Its GNN state on layers 1..L is then
// the same as in snapshot t and Dependency_Queue[v] = L (0 = recompute all).
// Counting the vertex itself follows the GCN aggregation over N(v) and {v};
// it keeps the result exact when v lost an edge.
//
// Per BFS level L (1 .. NLAYER):
//   roots      : each vertex of the current level range of the
//                Unaffected_Vertex_Queue (UVQ) adds one to its own and to each
//                neighbour's Intermediate_Queue (IQ) counter
//                (Fetch_Root, Fetch_Offsets, Fetch_Neighbors).
//   calculate  : every vertex whose counter equals degree+1 gets DQ = L and is
//                appended to the UVQ as a root of the next level
//                (Identify_Vertices, Calculate_Dependency); counters are
//                cleared on the way. At L = 1 the same scan writes the
//                Frequency_Table: the number of accessors of the vertex that
//                are not unaffected (degree + 1 - counter), saturated to FT_W
//                bits, which predicts how often its input feature is fetched.
// The traversal stops after level NLAYER or when a level adds no vertex.
// A counter saturates at its maximum (vertices of larger degree then never
// match, which only loses reuse); a full UVQ drops further roots (again only
// reuse is lost). Both events are counted.
// Buffer sizes follow the document's SRAM budget; a single TE is built
// (the document uses eight in parallel).
//
// The DQ and FT read ports are handed to the outside (IPU, IF cache) while the
// TE is idle. All memory reads have one cycle of latency.
module traversal_engine
  import race_pkg::*;
#(
  parameter int unsigned NV        = 131072,
  parameter int unsigned NE        = 65536,
  parameter int unsigned NLAYER    = 3,
  parameter int unsigned UVQ_DEPTH = 8192,
  parameter int unsigned IQ_W      = 3,
  parameter int unsigned DQ_W      = 2,
  parameter int unsigned FT_W      = 2,
  localparam int unsigned VW = $clog2(NV),
  localparam int unsigned EW = $clog2(NE + 1),
  localparam int unsigned QW = $clog2(UVQ_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              uvq_clear,    // empties the UVQ (start of a snapshot)
  input  logic              uvq_push,     // from the IU
  input  logic [VW-1:0]     uvq_vid,
  input  logic              start,
  input  logic [VW:0]       num_vertices,
  output logic              done,
  output logic              busy,
  // graph structure of snapshot t+1
  output logic              off_re,
  output logic [VW-1:0]     off_addr,
  input  logic [2*EW-1:0]   off_data,
  output logic              nbr_re,
  output logic [EW-1:0]     nbr_addr,
  input  logic [VW-1:0]     nbr_data,
  // Dependency_Queue and Frequency_Table read ports (used while idle)
  input  logic              dq_re,
  input  logic [VW-1:0]     dq_addr,
  output logic [DQ_W-1:0]   dq_data,
  input  logic              ft_re,
  input  logic [VW-1:0]     ft_addr,
  output logic [FT_W-1:0]   ft_data,
  // statistics
  output logic [31:0]       n_dep,        // (vertex, level) dependencies found
  output logic [31:0]       n_uvq_overflow,
  output logic [31:0]       n_iq_sat,
  output logic [DQ_W-1:0]   max_level
);
  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_ROOT, S_ROOT_W, S_SELF_RD, S_SELF, S_NBR, S_NBR_W, S_NBR_INC,
    S_CALC_RD, S_CALC, S_LEVEL, S_DONE
  } state_e;

  state_e          st;
  logic [VW:0]     v;
  logic [QW:0]     head, lvl_end, tail;
  logic [DQ_W-1:0] lvl;
  logic [EW-1:0]   b, deg, i;
  logic [VW-1:0]   r;

  // Intermediate_Queue
  logic            iq_we, iq_re;
  logic [VW-1:0]   iq_wa, iq_ra;
  logic [IQ_W-1:0] iq_wd, iq_rd;
  sram_buffer #(.DEPTH(NV), .WIDTH(IQ_W)) u_iq (
    .clk, .we(iq_we), .waddr(iq_wa), .wdata(iq_wd), .re(iq_re), .raddr(iq_ra), .rdata(iq_rd));

  // Unaffected_Vertex_Queue
  logic            uq_we, uq_re;
  logic [QW-1:0]   uq_wa;
  logic [VW-1:0]   uq_wd, uq_rd;
  sram_buffer #(.DEPTH(UVQ_DEPTH), .WIDTH(VW)) u_uvq (
    .clk, .we(uq_we), .waddr(uq_wa), .wdata(uq_wd), .re(uq_re), .raddr(head[QW-1:0]), .rdata(uq_rd));

  // Dependency_Queue and Frequency_Table
  logic            dq_we, ft_we;
  logic [VW-1:0]   dq_wa;
  logic [DQ_W-1:0] dq_wd;
  logic [FT_W-1:0] ft_wd;
  sram_buffer #(.DEPTH(NV), .WIDTH(DQ_W)) u_dq (
    .clk, .we(dq_we), .waddr(dq_wa), .wdata(dq_wd), .re(dq_re), .raddr(dq_addr), .rdata(dq_data));
  sram_buffer #(.DEPTH(NV), .WIDTH(FT_W)) u_ft (
    .clk, .we(ft_we), .waddr(dq_wa), .wdata(ft_wd), .re(ft_re), .raddr(ft_addr), .rdata(ft_data));

  localparam logic [IQ_W-1:0] IQ_MAX = '1;
  localparam int unsigned     FT_MAX = (1 << FT_W) - 1;

  logic [EW-1:0] deg_w;
  assign deg_w = off_data[EW-1:0] - off_data[2*EW-1:EW];
  assign busy  = (st != S_IDLE);

  // combinational read requests
  always_comb begin
    off_re = 1'b0; off_addr = r;
    nbr_re = 1'b0; nbr_addr = b + i;
    iq_re  = 1'b0; iq_ra = r;
    uq_re  = 1'b0;
    unique case (st)
      S_ROOT:    uq_re = (head != lvl_end);
      S_SELF_RD: begin off_re = 1'b1; iq_re = 1'b1; end
      S_NBR:     nbr_re = (i != deg);
      S_NBR_W:   begin iq_re = 1'b1; iq_ra = nbr_data; end
      S_CALC_RD: begin
        off_re = 1'b1; off_addr = v[VW-1:0];
        iq_re  = 1'b1; iq_ra    = v[VW-1:0];
      end
      default: ;
    endcase
  end

  // UVQ write port: the IU while idle, the TE itself during calculate
  logic            te_push;
  logic [VW-1:0]   te_push_vid;
  always_comb begin
    uq_we = 1'b0; uq_wa = tail[QW-1:0]; uq_wd = uvq_vid;
    if (te_push) begin
      uq_we = (tail < (QW+1)'(UVQ_DEPTH)); uq_wd = te_push_vid;
    end else if (uvq_push && st == S_IDLE) begin
      uq_we = (tail < (QW+1)'(UVQ_DEPTH));
    end
  end

  logic [EW:0] need;   // degree + 1 (the vertex itself counts)
  always_comb need = {1'b0, deg_w} + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; v <= '0; head <= '0; lvl_end <= '0; tail <= '0; lvl <= '0;
      b <= '0; deg <= '0; i <= '0; r <= '0; done <= 1'b0;
      iq_we <= 1'b0; iq_wa <= '0; iq_wd <= '0;
      dq_we <= 1'b0; ft_we <= 1'b0; dq_wa <= '0; dq_wd <= '0; ft_wd <= '0;
      te_push <= 1'b0; te_push_vid <= '0;
      n_dep <= '0; n_uvq_overflow <= '0; n_iq_sat <= '0; max_level <= '0;
    end else begin
      done    <= 1'b0;
      iq_we   <= 1'b0;
      dq_we   <= 1'b0;
      ft_we   <= 1'b0;
      te_push <= 1'b0;
      if (uq_we) tail <= tail + 1'b1;
      else if ((te_push || (uvq_push && st == S_IDLE)) && !uq_we)
        n_uvq_overflow <= n_uvq_overflow + 1'b1;
      if (uvq_clear) begin
        tail <= '0; n_uvq_overflow <= '0;
      end
      unique case (st)
        S_IDLE: if (start) begin
          v <= '0; n_dep <= '0; n_iq_sat <= '0; max_level <= '0;
          st <= (num_vertices == 0) ? S_DONE : S_CLR;
        end
        S_CLR: begin
          iq_we <= 1'b1; iq_wa <= v[VW-1:0]; iq_wd <= '0;
          if (v + 1 == num_vertices) begin
            head <= '0; lvl_end <= tail; lvl <= DQ_W'(1); st <= S_ROOT;
          end
          v <= v + 1'b1;
        end
        // ---------------- roots of level L increment counters ----------------
        S_ROOT: if (head == lvl_end) begin
          v <= '0; st <= S_CALC_RD;
        end else st <= S_ROOT_W;
        S_ROOT_W:  begin r <= uq_rd; st <= S_SELF_RD; end
        S_SELF_RD: st <= S_SELF;
        S_SELF: begin
          b <= off_data[2*EW-1:EW]; deg <= deg_w; i <= '0;
          iq_we <= 1'b1; iq_wa <= r;
          iq_wd <= (iq_rd == IQ_MAX) ? IQ_MAX : iq_rd + 1'b1;
          if (iq_rd == IQ_MAX) n_iq_sat <= n_iq_sat + 1'b1;
          st <= S_NBR;
        end
        S_NBR: if (i == deg) begin
          head <= head + 1'b1; st <= S_ROOT;
        end else st <= S_NBR_W;
        S_NBR_W: begin iq_wa <= nbr_data; st <= S_NBR_INC; end
        S_NBR_INC: begin
          iq_we <= 1'b1;
          iq_wd <= (iq_rd == IQ_MAX) ? IQ_MAX : iq_rd + 1'b1;
          if (iq_rd == IQ_MAX) n_iq_sat <= n_iq_sat + 1'b1;
          i  <= i + 1'b1;
          st <= S_NBR;
        end
        // ---------------- calculate dependency ----------------
        S_CALC_RD: st <= (v == num_vertices) ? S_LEVEL : S_CALC;
        S_CALC: begin
          logic match;
          match = ({{(EW+1-IQ_W){1'b0}}, iq_rd} == need);
          iq_we <= 1'b1; iq_wa <= v[VW-1:0]; iq_wd <= '0;
          dq_wa <= v[VW-1:0];
          if (match) begin
            dq_we <= 1'b1; dq_wd <= lvl;
            te_push <= 1'b1; te_push_vid <= v[VW-1:0];
            n_dep <= n_dep + 1'b1;
            max_level <= lvl;
          end else if (lvl == DQ_W'(1)) begin
            dq_we <= 1'b1; dq_wd <= '0;
          end
          if (lvl == DQ_W'(1)) begin
            logic [EW:0] nf;
            nf = need - {{(EW+1-IQ_W){1'b0}}, iq_rd};
            ft_we <= 1'b1;
            ft_wd <= (nf > (EW+1)'(FT_MAX)) ? FT_W'(FT_MAX) : nf[FT_W-1:0];
          end
          v  <= v + 1'b1;
          st <= S_CALC_RD;
        end
        S_LEVEL: begin
          if (lvl == DQ_W'(NLAYER) || tail == lvl_end) st <= S_DONE;
          else begin
            head <= lvl_end; lvl_end <= tail; lvl <= lvl + 1'b1; st <= S_ROOT;
          end
        end
        S_DONE: begin done <= 1'b1; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
