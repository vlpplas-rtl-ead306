// vlppla_preproc: preprocessing stage of the VLPPLA.
//
// Per bit i it forms the Ling bit signals
//   g_i = a_i b_i,  p_i = a_i + b_i,  d_i = a_i xor b_i
// and the intermediate signals that feed the prefix network
//   alpha_i = g_i + g_(i-1),   beta_i = p_i p_(i-1),
// with g_(-1) = p_(-1) = 0 (no carry-in). These definitions are the ones of
// the Ling adder the design is built on. Purely combinational; all outputs are
// N bits wide, bit i belonging to operand bit i.
module vlppla_preproc #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p,
  output logic [N-1:0] d,
  output logic [N-1:0] alpha,
  output logic [N-1:0] beta
);

  always_comb begin
    g     = a & b;
    p     = a | b;
    d     = a ^ b;
    alpha = g | {g[N-2:0], 1'b0};
    beta  = p & {p[N-2:0], 1'b0};
  end

endmodule
