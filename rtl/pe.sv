// pe: the unified processing element shared by GNN and RNN work. It holds one
// fixed-point multiplier and one adder with an accumulation register
// (the partial output).
//   - an input multiplexer chooses the operand pair: GNN operands (a weight
//     and an aggregated feature element) or RNN operands (a coefficient and an
//     element of the previous hidden state or of the current GNN output);
//   - the adder adds either the product or the external input `c` to the
//     partial output (or starts a new one when `clear` is set);
//   - an output multiplexer presents either the partial output or the bare
//     product.
// One operation per cycle when `en` is high; the product is combinational and
// the partial output is registered. The document's PE alternates its two
// left-hand multiplexers every cycle to feed the adder's two ports; this PE
// folds that into the single accumulate path.
module pe
  import race_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  clear,     // start a new partial output
  input  logic  mode_rnn,  // 0: GNN operands, 1: RNN operands
  input  logic  add_ext,   // 0: add the product, 1: add c
  input  logic  out_mul,   // 0: output the partial output, 1: the product
  input  elem_t gnn_a,
  input  elem_t gnn_b,
  input  elem_t rnn_a,
  input  elem_t rnn_b,
  input  elem_t c,
  output elem_t y
);
  elem_t opa, opb, prod, add_in, acc;

  assign opa    = mode_rnn ? rnn_a : gnn_a;
  assign opb    = mode_rnn ? rnn_b : gnn_b;
  assign prod   = fx_mul(opa, opb);
  assign add_in = add_ext ? c : prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= clear ? add_in : acc + add_in;
  end

  assign y = out_mul ? prod : acc;
endmodule
