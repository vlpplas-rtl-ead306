// vlppla_postproc: postprocessing stage of the VLPPLA.
//
// Turns Ling carries H into the sum and the carry-out:
//   s_0 = d_0                       (the adder has no carry-in)
//   s_i = d_i xor (p_(i-1) H_(i-1)) for i >= 1
//   cout = p_(N-1) H_(N-1)
// since the ordinary carry c_i equals p_i H_i. The same module turns
// speculated Ling carries into speculated sums and exact Ling carries into
// exact sums. Purely combinational.
module vlppla_postproc #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] d,
  input  logic [N-1:0] p,
  input  logic [N-1:0] h,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N-1:0] c;  // ordinary carries c_i = p_i H_i

  always_comb begin
    c    = p & h;
    s    = d ^ {c[N-2:0], 1'b0};
    cout = c[N-1];
  end

endmodule
