// vlppla_top: N-bit variable latency parallel prefix Ling adder (VLPPLA),
// Brent-Kung topology, maximum carry chain length L (defaults: N=64, L=7).
//
// Datapath, all from the operand registers:
//   preprocessing  -> g, p, d, alpha, beta
//   speculative Brent-Kung Ling prefix (2L exact + N-2L speculated carries)
//   error correction (the removed rows: exact Ling carries)
//   error detection (BEDSs per block, OEDS = their OR)
//   two postprocessing copies (speculated and exact sums)
//   result registers and MUX tree.
// An addition whose OEDS is 0 completes in one cycle; otherwise the operands
// are held one more cycle and the exact sum is delivered. The exact path is
// a two-cycle path by design and must be timed as a multicycle path.
//
// Interface: in_valid/in_ready with a, b (unsigned, no carry-in); the result
// {cout, sum} appears with out_valid one cycle after acceptance, or two
// cycles if corrected (out_corrected = 1). out_beds are the block error
// signals of that addition; oeds is the live OEDS of the addition currently
// in the operand registers. Synchronous active-low reset.
module vlppla_top
  import vlppla_pkg::*;
#(
  parameter int unsigned N  = 64,
  parameter int unsigned L  = 7,
  parameter int unsigned NB = num_blocks(N, L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic          out_valid,
  output logic [N-1:0]  sum,
  output logic          cout,
  output logic          out_corrected,
  output logic [NB-1:0] out_beds,
  output logic          oeds
);

  logic [N-1:0]  a_q, b_q;
  logic          op_valid, corr, op_done;
  logic [N-1:0]  g, p, d, alpha, beta;
  logic [N-1:0]  h_spec, h_exact, grp_g, grp_p;
  logic [N-1:0]  s_spec, s_exact;
  logic          cout_spec, cout_exact;
  logic [NB-1:0] beds;

  vlppla_operand_stage #(.N(N)) u_operands (
    .clk, .rst_n, .in_valid, .in_ready,
    .a_in(a), .b_in(b), .oeds,
    .a_q, .b_q, .op_valid, .corr, .op_done
  );

  vlppla_preproc #(.N(N)) u_pre (
    .a(a_q), .b(b_q), .g, .p, .d, .alpha, .beta
  );

  vlppla_spec_prefix #(.N(N), .L(L)) u_spec (
    .alpha, .beta, .h_spec, .grp_g, .grp_p
  );

  vlppla_error_correct #(.N(N), .L(L)) u_corr (
    .grp_g, .grp_p, .h_exact
  );

  vlppla_error_detect #(.N(N), .L(L), .NB(NB)) u_det (
    .d, .p, .h_exact, .beds, .oeds
  );

  vlppla_postproc #(.N(N)) u_post_spec (
    .d, .p, .h(h_spec), .s(s_spec), .cout(cout_spec)
  );

  vlppla_postproc #(.N(N)) u_post_exact (
    .d, .p, .h(h_exact), .s(s_exact), .cout(cout_exact)
  );

  vlppla_result_stage #(.N(N), .L(L), .NB(NB)) u_result (
    .clk, .rst_n, .op_valid, .corr, .op_done,
    .s_lo(s_spec[2*L-1:0]),
    .s_spec_hi(s_spec[N-1:2*L]), .cout_spec,
    .s_exact_hi(s_exact[N-1:2*L]), .cout_exact,
    .beds, .out_valid, .sum, .cout, .out_corrected, .out_beds
  );

endmodule
