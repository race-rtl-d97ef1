// if_cache: the IF_Buffer with its topology-aware caching scheme. It holds
// input features of the current snapshot and is consulted by the memory-access
// pipeline before it goes to HBM.
//
// Organisation: LINES direct-mapped lines of one feature vector each, indexed
// by the low vertex-ID bits. Each line keeps a tag and the access frequency
// its vertex had when it was filled (read from the Frequency_Table). A
// histogram of the frequencies of the valid lines gives the threshold TD: 0
// while a line is still free, otherwise the lowest frequency of any cached
// feature.
// Lookup: hit -> data after 2 cycles. Miss -> the feature is read from HBM and
// returned; it is then written into the buffer only if its frequency is not
// below TD and not below the frequency of the feature that occupies its line
// (which is evicted). Features rejected this way are passed through without
// being cached, so rarely used features cannot thrash frequently used ones.
// Cached features survive from one snapshot to the next; the IU invalidates
// the line of every vertex whose input feature changed.
// The document keeps TD as the minimum frequency in the buffer and replaces a
// feature of frequency TD; the direct-mapped placement and the per-line check
// are this design's choice, as it does not say how lines are placed.
// Interface: req (valid/ready, accepted only in the idle state) -> rsp_valid
// pulse with data; inv (valid/ready) has priority over a lookup.
module if_cache
  import race_pkg::*;
#(
  parameter int unsigned NV    = 131072,
  parameter int unsigned LINES = 65536,
  parameter int unsigned FT_W  = 2,
  localparam int unsigned VW = $clog2(NV),
  localparam int unsigned IW = $clog2(LINES),
  localparam int unsigned TW = (VW > IW) ? VW - IW : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2:0]      cur_region,
  // lookup
  input  logic            req_valid,
  output logic            req_ready,
  input  logic [VW-1:0]   req_vid,
  output logic            rsp_valid,
  output vec_t            rsp_data,
  // invalidation
  input  logic            inv_valid,
  output logic            inv_ready,
  input  logic [VW-1:0]   inv_vid,
  // Frequency_Table read port (one-cycle latency)
  output logic            ft_re,
  output logic [VW-1:0]   ft_addr,
  input  logic [FT_W-1:0] ft_data,
  // HBM (through the arbiter)
  output logic            mem_valid,
  input  logic            mem_ready,
  output mem_req_t        mem_req,
  input  logic            mem_rsp_valid,
  input  vec_t            mem_rsp_data,
  // statistics
  output logic [31:0]     n_hit,
  output logic [31:0]     n_miss,
  output logic [31:0]     n_bypass,
  output logic [31:0]     n_evict,
  output logic [31:0]     n_inval,
  output logic [FT_W-1:0] td
);
  localparam int unsigned NF = 1 << FT_W;

  typedef enum logic [2:0] { S_IDLE, S_INV, S_LOOK, S_MREQ, S_MWAIT } state_e;
  typedef struct packed { logic [TW-1:0] tag; logic [FT_W-1:0] freq; } meta_t;

  state_e          st;
  logic [VW-1:0]   vid;
  logic [FT_W-1:0] freq;
  logic [LINES-1:0] valid;
  logic [IW:0]     n_valid;
  logic [IW:0]     hist [NF];

  function automatic logic [IW-1:0] idx_of(logic [VW-1:0] x);
    return x[IW-1:0];
  endfunction
  function automatic logic [TW-1:0] tag_of(logic [VW-1:0] x);
    return (VW > IW) ? TW'(x >> IW) : '0;
  endfunction

  // tag/frequency and data arrays
  logic   m_we, m_re, d_we, d_re;
  logic [IW-1:0] m_ra;
  meta_t  m_wd, m_rd;
  vec_t   d_rd;
  sram_buffer #(.DEPTH(LINES), .WIDTH($bits(meta_t))) u_meta (
    .clk, .we(m_we), .waddr(idx_of(vid)), .wdata(m_wd), .re(m_re), .raddr(m_ra), .rdata(m_rd));
  sram_buffer #(.DEPTH(LINES), .WIDTH($bits(vec_t))) u_data (
    .clk, .we(d_we), .waddr(idx_of(vid)), .wdata(mem_rsp_data), .re(d_re), .raddr(m_ra), .rdata(d_rd));

  // threshold TD
  always_comb begin
    td = '0;
    if (n_valid == (IW+1)'(LINES)) begin
      td = FT_W'(NF - 1);
      for (int f = NF - 1; f >= 0; f--) if (hist[f] != 0) td = FT_W'(f);
    end
  end

  logic hit, line_valid, admit;
  assign line_valid = valid[idx_of(vid)];
  assign hit        = line_valid && (m_rd.tag == tag_of(vid));
  assign admit      = (freq >= td) && (!line_valid || m_rd.freq <= freq);

  assign req_ready = (st == S_IDLE) && !inv_valid;
  assign inv_ready = (st == S_INV);
  assign m_re  = (st == S_IDLE) && (inv_valid || req_valid);
  assign d_re  = (st == S_IDLE) && !inv_valid && req_valid;
  assign m_ra  = inv_valid ? idx_of(inv_vid) : idx_of(req_vid);
  assign ft_re = (st == S_LOOK);
  assign ft_addr = vid;
  assign mem_valid = (st == S_MREQ);
  assign mem_req   = '{we: 1'b0, addr: hbm_addr(cur_region, HBM_VW'(vid)), wdata: '0};
  assign m_we = (st == S_MWAIT) && mem_rsp_valid && admit;
  assign d_we = m_we;
  assign m_wd = '{tag: tag_of(vid), freq: freq};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; vid <= '0; freq <= '0; valid <= '0; n_valid <= '0;
      for (int f = 0; f < NF; f++) hist[f] <= '0;
      rsp_valid <= 1'b0; rsp_data <= '0;
      n_hit <= '0; n_miss <= '0; n_bypass <= '0; n_evict <= '0; n_inval <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (inv_valid) begin vid <= inv_vid; st <= S_INV; end
          else if (req_valid) begin vid <= req_vid; st <= S_LOOK; end
        end
        S_INV: begin
          if (hit) begin
            valid[idx_of(vid)] <= 1'b0;
            hist[m_rd.freq] <= hist[m_rd.freq] - 1'b1;
            n_valid <= n_valid - 1'b1;
            n_inval <= n_inval + 1'b1;
          end
          st <= S_IDLE;
        end
        S_LOOK: begin
          if (hit) begin
            rsp_valid <= 1'b1; rsp_data <= d_rd; n_hit <= n_hit + 1'b1;
            st <= S_IDLE;
          end else begin
            n_miss <= n_miss + 1'b1;
            st <= S_MREQ;
          end
        end
        S_MREQ: begin
          freq <= ft_data;
          if (mem_ready) st <= S_MWAIT;
        end
        S_MWAIT: if (mem_rsp_valid) begin
          rsp_valid <= 1'b1; rsp_data <= mem_rsp_data;
          if (admit) begin
            valid[idx_of(vid)] <= 1'b1;
            if (line_valid) begin
              n_evict <= n_evict + 1'b1;
              if (m_rd.freq != freq) begin
                hist[m_rd.freq] <= hist[m_rd.freq] - 1'b1;
                hist[freq]      <= hist[freq] + 1'b1;
              end
            end else begin
              n_valid    <= n_valid + 1'b1;
              hist[freq] <= hist[freq] + 1'b1;
            end
          end else n_bypass <= n_bypass + 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
