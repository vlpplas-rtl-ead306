// tb_vlppla_postproc: feeds the postprocessing stage with reference Ling
// carries (exact ones from rippled carries, and window-truncated ones) and
// checks the sums against a + b and against the reference speculated sum.
module tb_vlppla_postproc;
  import vlppla_ref_pkg::*;
  localparam int N = 64;
  logic [N-1:0] d, p, h, s;
  logic cout;
  vec_t a, b;
  int checks = 0, failures = 0;

  vlppla_postproc #(.N(N)) dut (.d, .p, .h, .s, .cout);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic spec);
    logic [64:0] want;
    d = a ^ b;
    p = a | b;
    h = spec ? h_spec(a, b, N, 7) : h_exact(a, b, N);
    want = spec ? sum_from_h(a, b, h, N) : exact_sum(a, b, N);
    #1;
    checks++;
    if ({cout, s} !== want) begin
      failures++;
      if (failures < 10) $display("mismatch a=%h b=%h got %h want %h", a, b, {cout, s}, want);
    end
  endtask

  initial begin
    a = '1; b = 64'd1; run(0);
    a = '1; b = '1; run(0);
    for (int t = 0; t < 400; t++) begin
      random_ops(N, a, b); run(0); run(1);
      long_chain(N, a, b); run(0); run(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
