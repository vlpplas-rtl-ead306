// vlppla_spec_prefix: speculative Brent-Kung Ling prefix network.
//
// The N Ling carries split into an even chain (H_0, H_2, ...) and an odd
// chain (H_1, H_3, ...) of N/2 elements each. Element e of the chain with
// parity q sits at bit i = 2e + q and starts as the node
//   (alpha_i, beta_(i-1)),  beta_(-1) = 0,
// so both chains share one connectivity: a node at bit i is merged with the
// node at bit i - 2*dist, where dist is the distance in chain elements.
//
// The full Brent-Kung network over a chain has log2(N/2) up-sweep rows and
// log2(N/2)-1 down-sweep rows. For a maximum carry chain length
// L = 2^(M+1) - 1 this stage keeps only the first M up-sweep rows and the
// last M down-sweep rows (N=64, L=7: rows 1, 2, 8, 9 of 9; L=15: rows 1, 2,
// 3, 7, 8, 9). Chain element k then gets a prefix over a window of at most
// L elements: exact for k < L, otherwise starting at element
//   G * floor((k - (G-1)) / G),  G = (L+1)/2.
// The 2L least significant Ling carries are therefore exact and the rest are
// speculated.
//
// Outputs: h_spec, the (speculated) Ling carries; grp_g/grp_p, the node values
// after the M kept up-sweep rows, handed to the error correction stage, which
// continues the full network from there instead of recomputing those rows.
// Purely combinational.
module vlppla_spec_prefix
  import vlppla_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned L = 7
) (
  input  logic [N-1:0] alpha,
  input  logic [N-1:0] beta,
  output logic [N-1:0] h_spec,
  output logic [N-1:0] grp_g,
  output logic [N-1:0] grp_p
);

  localparam int unsigned M = spec_levels(L);

  if ((1 << (M + 1)) != L + 1 || L < 3 || L + 1 > N) begin : g_bad_l
    $error("vlppla_spec_prefix: L must be 2^m - 1 with 3 <= L < N");
  end

  gp_t node [N];  // one row of the network, updated in place row by row

  always_comb begin
    for (int i = 0; i < N; i++) begin
      node[i].g = alpha[i];
      node[i].p = (i > 0) ? beta[(i > 0) ? i - 1 : 0] : 1'b0;
    end
    // Up-sweep rows 1..M: element e with (e+1) mod 2^l == 0 absorbs element
    // e - 2^(l-1), which this row leaves unchanged, so the update is in place.
    for (int l = 1; l <= M; l++) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (((i / 2) + 1) % (1 << l) == 0)
          node[i] = gp_combine(node[i], node[i - (1 << l)]);
      end
    end
    for (int i = 0; i < N; i++) begin
      grp_g[i] = node[i].g;
      grp_p[i] = node[i].p;
    end
    // Down-sweep rows l = M..1: element e with (e+1) mod 2^l == 2^(l-1) and
    // e+1 > 2^l absorbs element e - 2^(l-1).
    for (int l = M; l >= 1; l--) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (((i / 2) + 1) % (1 << l) == (1 << (l - 1)) && (i / 2) + 1 > (1 << l))
          node[i] = gp_combine(node[i], node[i - (1 << l)]);
      end
    end
    for (int i = 0; i < N; i++) h_spec[i] = node[i].g;
  end

endmodule
