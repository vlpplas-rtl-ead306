// vlppla_error_detect: overall and block error detection signals (OEDS, BEDS).
//
// A speculated sum bit s_i* differs from the exact s_i only when
// p_(i-1) = 1, the truncated window of H_(i-1) holds no Ling generate, and the
// part cut off would have supplied one. Within one block all bits share the
// same window start, and the condition collapses to a run of half-sums
// d = a xor b = 1 across the window start plus a set Ling carry just below it.
// With G = (L+1)/2 chain elements per group and window start ws = G*(b-1),
// block b >= 2 of N/(L+1) blocks has
//   E_b = AND(d[2ws-1 .. 2ws+L-1]) p[2ws-2] H[2ws-2]      (even chain)
//       + AND(d[2ws   .. 2ws+L  ]) p[2ws-1] H[2ws-1]      (odd chain)
// For N=64, L=7, block 2 is d_7..d_14 p_6 H_6 + d_8..d_15 p_7 H_7. Block 1 is
// computed exactly, so E_1 = 0. The OEDS is the OR of all BEDSs. It covers the
// carry-out too, so E = 1 exactly when the speculated {cout, sum} is wrong.
//
// H are the exact Ling carries from the error correction stage, as in the
// block expressions this design follows. Purely combinational.
// beds[b-1] is E_b.
module vlppla_error_detect
  import vlppla_pkg::*;
#(
  parameter int unsigned N  = 64,
  parameter int unsigned L  = 7,
  parameter int unsigned NB = num_blocks(N, L)
) (
  input  logic [N-1:0]  d,
  input  logic [N-1:0]  p,
  input  logic [N-1:0]  h_exact,
  output logic [NB-1:0] beds,
  output logic          oeds
);

  localparam int unsigned G = group_size(L);

  if (NB != num_blocks(N, L)) begin : g_bad_nb
    $error("vlppla_error_detect: NB must equal N/(L+1)");
  end

  always_comb begin
    beds = '0;
    for (int b = 2; b <= NB; b++) begin
      int unsigned ws;
      logic        run_e, run_o;
      ws    = G * (b - 1);
      run_e = &d[2*ws-1 +: L+1];
      run_o = &d[2*ws   +: L+1];
      beds[b-1] = (run_e & p[2*ws-2] & h_exact[2*ws-2])
                | (run_o & p[2*ws-1] & h_exact[2*ws-1]);
    end
    oeds = |beds;
  end

endmodule
