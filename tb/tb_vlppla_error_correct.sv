// tb_vlppla_error_correct: drives the correction stage with reference node
// values after the shared up-sweep rows and checks that it returns the exact
// Ling carries H_i = c_i + c_(i-1) for N=64 with L=7 and L=15 and N=32, L=7.
module tb_vlppla_error_correct;
  import vlppla_ref_pkg::*;
  vec_t a, b;
  int checks = 0, failures = 0;
  logic [63:0] gg7, gp7, gg15, gp15, he7, he15;
  logic [31:0] gg32, gp32, he32;

  vlppla_error_correct dut7 (.grp_g(gg7), .grp_p(gp7), .h_exact(he7));
  vlppla_error_correct #(.N(64), .L(15)) dut15 (.grp_g(gg15), .grp_p(gp15), .h_exact(he15));
  vlppla_error_correct #(.N(32), .L(7)) dut32 (.grp_g(gg32), .grp_p(gp32), .h_exact(he32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int grp_lo(int e, int m);
    int span = 1;
    while (span < (1 << m) && ((e + 1) % (span * 2)) == 0) span *= 2;
    return e - span + 1;
  endfunction

  task automatic set_nodes(int n, int l, output vec_t gg, output vec_t gp);
    int m = $clog2((l + 1) / 2);
    gg = '0;
    gp = '0;
    for (int i = 0; i < n; i++) begin
      gg[i] = span_g(a, b, i, grp_lo(i / 2, m));
      gp[i] = span_p(a, b, i, grp_lo(i / 2, m));
    end
  endtask

  task automatic check(int n, vec_t got);
    vec_t want = h_exact(a, b, n);
    checks++;
    if ((got & mask(n)) !== want) begin
      failures++;
      if (failures < 10) $display("N=%0d h_exact %h want %h (a=%h b=%h)", n, got, want, a, b);
    end
  endtask

  initial begin
    vec_t x, y;
    for (int t = 0; t < 600; t++) begin
      if (t % 2 == 0) random_ops(64, a, b); else long_chain(64, a, b);
      set_nodes(64, 7, x, y);  gg7 = x;  gp7 = y;
      set_nodes(64, 15, x, y); gg15 = x; gp15 = y;
      #1;
      check(64, he7);
      check(64, he15);
      a &= mask(32);
      b &= mask(32);
      set_nodes(32, 7, x, y); gg32 = x[31:0]; gp32 = y[31:0];
      #1;
      check(32, {32'd0, he32});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
