// tb_vlppla_spec_prefix: checks the speculative Brent-Kung Ling network
// against window-truncated Ling carries computed term by term, for the
// default N=64, L=7 and also N=64, L=15 and N=32, L=7. It also checks that
// the 2L least significant carries are exact, that the longest window holds L
// chain elements, and the node values handed to the correction stage.
module tb_vlppla_spec_prefix;
  import vlppla_ref_pkg::*;
  vec_t a, b;
  int checks = 0, failures = 0;

  logic [63:0] alpha, beta;
  always_comb begin
    for (int i = 0; i < 64; i++) begin
      alpha[i] = alpha_of(a, b, i);
      beta[i]  = (i == 0) ? 1'b0 : beta_of(a, b, i);
    end
  end

  logic [63:0] hs7, gg7, gp7, hs15, gg15, gp15;
  logic [31:0] hs32, gg32, gp32;

  vlppla_spec_prefix dut7 (.alpha, .beta, .h_spec(hs7), .grp_g(gg7), .grp_p(gp7));
  vlppla_spec_prefix #(.N(64), .L(15)) dut15 (.alpha, .beta, .h_spec(hs15), .grp_g(gg15), .grp_p(gp15));
  vlppla_spec_prefix #(.N(32), .L(7)) dut32 (.alpha(alpha[31:0]), .beta(beta[31:0]),
                                             .h_spec(hs32), .grp_g(gg32), .grp_p(gp32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Node after M up-sweep rows: span of the largest power of two <= 2^M that
  // divides e+1.
  function automatic int grp_lo(int e, int m);
    int span = 1;
    while (span < (1 << m) && ((e + 1) % (span * 2)) == 0) span *= 2;
    return e - span + 1;
  endfunction

  task automatic check_cfg(int n, int l, vec_t hs, vec_t gg, vec_t gp);
    vec_t want = h_spec(a, b, n, l);
    vec_t he = h_exact(a, b, n);
    int m = $clog2((l + 1) / 2);
    checks++;
    if ((hs & mask(n)) !== want) begin
      failures++;
      if (failures < 10) $display("N=%0d L=%0d h_spec %h want %h", n, l, hs, want);
    end
    checks++;
    if (((hs ^ he) & mask(2*l)) != 0) failures++;
    for (int i = 0; i < n; i++) begin
      int lo = grp_lo(i / 2, m);
      checks++;
      if (gg[i] !== span_g(a, b, i, lo) || gp[i] !== span_p(a, b, i, lo)) begin
        failures++;
        if (failures < 10) $display("N=%0d L=%0d group node bit %0d", n, l, i);
      end
    end
  endtask

  initial begin
    // Window length: element 10 (H_20, H_21) spans 7 elements, 4..10.
    checks++;
    if (win_start(10, 7) != 4 || win_start(6, 7) != 0 || win_start(11, 7) != 8) failures++;
    for (int t = 0; t < 600; t++) begin
      if (t % 2 == 0) random_ops(64, a, b); else long_chain(64, a, b);
      #1;
      check_cfg(64, 7, hs7, gg7, gp7);
      check_cfg(64, 15, hs15, gg15, gp15);
      a &= mask(32);
      b &= mask(32);
      #1;
      check_cfg(32, 7, {32'd0, hs32}, {32'd0, gg32}, {32'd0, gp32});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
