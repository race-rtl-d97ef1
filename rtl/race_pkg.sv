// race_pkg: types and constants shared by the redundancy-aware DGNN
// accelerator. Feature vectors, hidden states and weight columns are all
// DIM elements of DW-bit signed fixed point with FRAC fraction bits. The
// off-chip memory (HBM) is addressed per vector: a 3-bit region selects the
// kind of data and the low bits the vertex. Element width, the fixed-point
// format and the region map are this design's own choices; the document
// gives none of them.
package race_pkg;

  localparam int unsigned DW    = 16;   // element width
  localparam int unsigned FRAC  = 8;    // fraction bits (Q7.8)
  localparam int unsigned DIM   = 16;   // elements per feature vector
  localparam int unsigned HBM_VW = 21;  // vertex bits of an HBM address
  localparam int unsigned HBM_AW = 3 + HBM_VW;

  typedef logic signed [DW-1:0] elem_t;
  typedef elem_t [DIM-1:0]      vec_t;

  // HBM regions (one DIM-element vector per vertex in each)
  typedef enum logic [2:0] {
    REG_FEAT0  = 3'd0,  // input features, bank 0
    REG_FEAT1  = 3'd1,  // input features, bank 1
    REG_STATE1 = 3'd2,  // output of GNN layer 1 (REG_STATE1+n-1 for layer n)
    REG_STATE2 = 3'd3,
    REG_STATE3 = 3'd4,
    REG_HIDDEN = 3'd7   // RNN hidden state S
  } region_e;

  typedef struct packed {
    logic              we;
    logic [HBM_AW-1:0] addr;
    vec_t              wdata;
  } mem_req_t;

  function automatic logic [HBM_AW-1:0] hbm_addr(logic [2:0] region, logic [HBM_VW-1:0] vid);
    return {region, vid};
  endfunction

  // Fixed-point multiply with rounding toward minus infinity (arithmetic shift).
  function automatic elem_t fx_mul(elem_t a, elem_t b);
    logic signed [2*DW-1:0] p;
    p = a * b;
    return elem_t'(p >>> FRAC);
  endfunction

  // Element-wise sum of two vectors (wrap-around two's complement).
  function automatic vec_t vec_add(vec_t a, vec_t b);
    vec_t r;
    for (int i = 0; i < DIM; i++) r[i] = a[i] + b[i];
    return r;
  endfunction

  // Event counters brought out of the top. The RIU and scheduler counters
  // (immune .. rnn) and hbm_stall cover the last snapshot; fetch, zero_skip,
  // max_busy and the cache counters run from reset.
  typedef struct packed {
    logic [31:0] immune;        // vertices whose input feature did not change
    logic [31:0] unaffected;    // vertices in the unaffected-vertices cluster
    logic [31:0] dep;           // (vertex, level) dependencies found
    logic [31:0] max_level;     // deepest dependency level reached
    logic [31:0] uvq_overflow;  // roots dropped because the UVQ was full
    logic [31:0] iq_sat;        // saturated Intermediate_Queue counters
    logic [31:0] reused;        // (vertex, layer) states reused
    logic [31:0] recomputed;    // (vertex, layer) states recomputed
    logic [31:0] rnn;           // RNN tasks
    logic [31:0] fetch;         // vectors fetched by the memory-access unit
    logic [31:0] zero_skip;     // zero columns skipped by the PE groups
    logic [31:0] max_busy;      // most PE groups busy at once
    logic [31:0] cache_hit;
    logic [31:0] cache_miss;
    logic [31:0] cache_bypass;  // misses not admitted (frequency below TD)
    logic [31:0] cache_evict;
    logic [31:0] cache_inval;
    logic [31:0] hbm_stall;     // cycles an HBM request waited for the port
  } stats_t;

endpackage
