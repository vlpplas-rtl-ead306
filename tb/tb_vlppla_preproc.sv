// tb_vlppla_preproc: checks the preprocessing stage bit by bit against the
// Ling definitions g = ab, p = a+b, d = a xor b, alpha_i = g_i + g_(i-1),
// beta_i = p_i p_(i-1), for random and corner-case operands.
module tb_vlppla_preproc;
  localparam int N = 64;
  logic [N-1:0] a, b, g, p, d, alpha, beta;
  int checks = 0, failures = 0;

  vlppla_preproc #(.N(N)) dut (.a, .b, .g, .p, .d, .alpha, .beta);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    for (int i = 0; i < N; i++) begin
      logic eg, ep, ed, ea, eb;
      eg = a[i] && b[i];
      ep = a[i] || b[i];
      ed = a[i] != b[i];
      ea = eg || (i > 0 && a[i-1] && b[i-1]);
      eb = ep && (i > 0 && (a[i-1] || b[i-1]));
      checks++;
      if (g[i] !== eg || p[i] !== ep || d[i] !== ed || alpha[i] !== ea || beta[i] !== eb) begin
        failures++;
        if (failures < 10) $display("bit %0d mismatch a=%h b=%h", i, a, b);
      end
    end
  endtask

  initial begin
    a = '0; b = '0; check_one();
    a = '1; b = '1; check_one();
    a = '1; b = '0; check_one();
    for (int t = 0; t < 500; t++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
