// ma_pipeline: memory-access unit of the DSCU. Given a task, it gathers the
// data a PE group needs and performs the aggregation.
//   GNN task (vertex v, layer n): fetches v's begin/end offsets in the current
//     snapshot (Fetch_Offsets), then v's neighbour IDs (Fetch_Neighbors), and
//     for v itself and every neighbour the layer n-1 vector (Fetch_Features):
//     for n = 1 the input feature, through the IF_Buffer cache; for n > 1 the
//     layer n-1 state, from HBM. The vectors are summed element by element
//     (aggregation over N(v) and {v}; the sum is this design's choice where
//     GCN would use a mean, since the 1/(deg+1) scale can be folded into the
//     weights only for a fixed degree).
//   RNN task (vertex v): reads v's last-layer state X and its hidden state S
//     from HBM.
// Result: out_vid, out_a (aggregate or X) and out_b (S), valid/ready.
// Each fetch waits for its data before the next is issued; the document's
// MA overlaps its three stages, which this unit does not do.
module ma_pipeline
  import race_pkg::*;
#(
  parameter int unsigned NV     = 131072,
  parameter int unsigned NE     = 65536,
  parameter int unsigned DQ_W   = 2,
  localparam int unsigned VW = $clog2(NV),
  localparam int unsigned EW = $clog2(NE + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2:0]      hidden_region,
  // task
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [VW-1:0]   in_vid,
  input  logic [DQ_W-1:0] in_layer,    // 1..NLAYER for GNN tasks
  input  logic            in_rnn,
  // current-snapshot graph structure (one-cycle latency)
  output logic            off_re,
  output logic [VW-1:0]   off_addr,
  input  logic [2*EW-1:0] off_data,
  output logic            nbr_re,
  output logic [EW-1:0]   nbr_addr,
  input  logic [VW-1:0]   nbr_data,
  // input features through the IF_Buffer cache
  output logic            cache_valid,
  input  logic            cache_ready,
  output logic [VW-1:0]   cache_vid,
  input  logic            cache_rsp_valid,
  input  vec_t            cache_rsp_data,
  // HBM (through the arbiter)
  output logic            mem_valid,
  input  logic            mem_ready,
  output mem_req_t        mem_req,
  input  logic            mem_rsp_valid,
  input  vec_t            mem_rsp_data,
  // result
  output logic            out_valid,
  input  logic            out_ready,
  output logic [VW-1:0]   out_vid,
  output logic            out_rnn,
  output logic [DQ_W-1:0] out_layer,
  output vec_t            out_a,
  output vec_t            out_b,
  output logic [31:0]     n_fetch
);
  typedef enum logic [3:0] {
    S_IDLE, S_OFF, S_OFF_W, S_NBR, S_NBR_W, S_REQ, S_WAIT, S_RNN_X, S_RNN_XW, S_RNN_S, S_RNN_SW, S_OUT
  } state_e;

  state_e          st;
  logic [VW-1:0]   vid, cur;       // task vertex, vertex being fetched
  logic [DQ_W-1:0] layer;
  logic [EW-1:0]   b, deg, i;
  vec_t            acc, vb;

  logic [DQ_W-1:0] in_layer_last;  // layer whose output feeds the RNN
  logic src_cache;
  assign src_cache = (layer == DQ_W'(1));

  assign in_ready  = (st == S_IDLE);
  assign off_re    = (st == S_OFF);
  assign off_addr  = vid;
  assign nbr_re    = (st == S_NBR);
  assign nbr_addr  = b + i;
  assign cache_valid = (st == S_REQ) && src_cache;
  assign cache_vid   = cur;
  assign out_valid = (st == S_OUT);
  assign out_vid   = vid;
  assign out_rnn   = (layer == '0);
  assign out_layer = layer;
  assign out_a     = acc;
  assign out_b     = vb;

  always_comb begin
    mem_valid = 1'b0;
    mem_req   = '{we: 1'b0, addr: hbm_addr(3'(REG_STATE1) + 3'(layer) - 3'd2, HBM_VW'(cur)), wdata: '0};
    unique case (st)
      S_REQ:    mem_valid = !src_cache;
      S_RNN_X:  begin
        mem_valid    = 1'b1;
        mem_req.addr = hbm_addr(3'(REG_STATE1) + 3'(in_layer_last) - 3'd1, HBM_VW'(vid));
      end
      S_RNN_S:  begin
        mem_valid    = 1'b1;
        mem_req.addr = hbm_addr(hidden_region, HBM_VW'(vid));
      end
      default: ;
    endcase
  end


  logic got;
  assign got = src_cache ? cache_rsp_valid : mem_rsp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; vid <= '0; cur <= '0; layer <= '0; b <= '0; deg <= '0; i <= '0;
      acc <= '0; vb <= '0; in_layer_last <= '0; n_fetch <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (in_valid) begin
          vid <= in_vid; cur <= in_vid; acc <= '0; vb <= '0; i <= '0;
          if (in_rnn) begin
            layer <= '0; in_layer_last <= in_layer; st <= S_RNN_X;
          end else begin
            layer <= in_layer; st <= S_OFF;
          end
        end
        S_OFF:   st <= S_OFF_W;
        S_OFF_W: begin
          b   <= off_data[2*EW-1:EW];
          deg <= off_data[EW-1:0] - off_data[2*EW-1:EW];
          st  <= S_REQ;                       // the vertex itself first
        end
        S_NBR:   st <= S_NBR_W;
        S_NBR_W: begin cur <= nbr_data; i <= i + 1'b1; st <= S_REQ; end
        S_REQ: begin
          if (src_cache ? cache_ready : mem_ready) begin
            st <= S_WAIT;
            n_fetch <= n_fetch + 1'b1;
          end
        end
        S_WAIT: if (got) begin
          acc <= vec_add(acc, src_cache ? cache_rsp_data : mem_rsp_data);
          st <= (i == deg) ? S_OUT : S_NBR;
        end
        S_RNN_X:  if (mem_ready) st <= S_RNN_XW;
        S_RNN_XW: if (mem_rsp_valid) begin acc <= mem_rsp_data; st <= S_RNN_S; end
        S_RNN_S:  if (mem_ready) st <= S_RNN_SW;
        S_RNN_SW: if (mem_rsp_valid) begin vb <= mem_rsp_data; st <= S_OUT; end
        S_OUT: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
