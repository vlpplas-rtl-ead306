// vlppla_error_correct: error correction stage of the VLPPLA.
//
// Restores the Brent-Kung rows that the speculative stage leaves out and so
// computes the exact Ling carries H_i = alpha_[i:0] (even bits) or
// alpha_[i:1] (odd bits). It starts from the node values after the M shared
// up-sweep rows (grp_g/grp_p from vlppla_spec_prefix), runs the remaining
// up-sweep rows M+1..log2(N/2), then the complete down-sweep
// log2(N/2)-1..1. The last M down-sweep rows have the same shape as the
// speculative stage's but are a second copy, because they must see exact
// rather than truncated inputs. Connectivity is identical for the even and
// odd chain; a node at bit i is merged with the node at bit i - 2*dist.
//
// The exact carries are meant to settle within two clock cycles (the
// correction cycle of an erroneous addition); in RTL the block is simply
// combinational.
module vlppla_error_correct
  import vlppla_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned L = 7
) (
  input  logic [N-1:0] grp_g,
  input  logic [N-1:0] grp_p,
  output logic [N-1:0] h_exact
);

  localparam int unsigned M    = spec_levels(L);
  localparam int unsigned LOGC = $clog2(N / 2);

  if ((1 << (M + 1)) != L + 1 || L < 3 || L + 1 > N) begin : g_bad_l
    $error("vlppla_error_correct: L must be 2^m - 1 with 3 <= L < N");
  end

  gp_t node [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      node[i].g = grp_g[i];
      node[i].p = grp_p[i];
    end
    // Restored up-sweep rows M+1..LOGC.
    for (int l = M + 1; l <= LOGC; l++) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (((i / 2) + 1) % (1 << l) == 0)
          node[i] = gp_combine(node[i], node[i - (1 << l)]);
      end
    end
    // Down-sweep rows LOGC-1..1 (restored rows, then the copy of the last M).
    for (int l = LOGC - 1; l >= 1; l--) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (((i / 2) + 1) % (1 << l) == (1 << (l - 1)) && (i / 2) + 1 > (1 << l))
          node[i] = gp_combine(node[i], node[i - (1 << l)]);
      end
    end
    for (int i = 0; i < N; i++) h_exact[i] = node[i].g;
  end

endmodule
