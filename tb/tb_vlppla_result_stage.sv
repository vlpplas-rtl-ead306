// tb_vlppla_result_stage: drives the result registers with random low,
// speculated and exact sum parts in the cycle pattern the operand registers
// produce (one-cycle additions, and two-cycle additions whose second cycle is
// a correction cycle, with idle cycles in between), and checks one cycle
// later that the MUX tree shows the speculated part after a first cycle and
// the exact part after a correction cycle, with out_valid only when done.
module tb_vlppla_result_stage;
  localparam int N = 64, L = 7, NB = 8;
  logic clk = 0, rst_n = 0;
  logic op_valid = 0, corr = 0, op_done = 0;
  logic [2*L-1:0] s_lo = '0;
  logic [N-1:2*L] s_spec_hi = '0, s_exact_hi = '0;
  logic cout_spec = 0, cout_exact = 0;
  logic [NB-1:0] beds = '0;
  logic out_valid, cout, out_corrected;
  logic [N-1:0] sum;
  logic [NB-1:0] out_beds;
  int checks = 0, failures = 0, n_spec = 0, n_corr = 0;

  vlppla_result_stage #(.N(N), .L(L), .NB(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0] want;
    logic [NB-1:0] want_beds;
    logic want_valid, want_corr;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 3000; t++) begin
      int kind, ncyc;
      logic [NB-1:0] bd;
      kind = $urandom % 3;  // 0 idle, 1 one-cycle addition, 2 two-cycle
      ncyc = (kind == 2) ? 2 : 1;
      bd   = (kind == 2) ? NB'($urandom | 2) : '0;
      for (int c = 0; c < ncyc; c++) begin
        s_lo       <= (2*L)'($urandom);
        s_spec_hi  <= (N-2*L)'({$urandom, $urandom});
        s_exact_hi <= (N-2*L)'({$urandom, $urandom});
        cout_spec  <= 1'($urandom);
        cout_exact <= 1'($urandom);
        beds       <= (c == 0) ? bd : NB'($urandom);
        op_valid   <= (kind != 0);
        corr       <= (c == 1);
        op_done    <= (kind != 0) && (c == ncyc - 1);
        @(negedge clk);
        want_valid = op_done;
        want_corr  = corr;
        want = corr ? {cout_exact, s_exact_hi, s_lo} : {cout_spec, s_spec_hi, s_lo};
        if (c == 0 && kind != 0) want_beds = beds;
        @(posedge clk);
        #1;
        checks++;
        if (out_valid !== want_valid) failures++;
        if (kind != 0) begin
          checks++;
          if ({cout, sum} !== want || out_corrected !== want_corr || out_beds !== want_beds) begin
            failures++;
            if (failures < 10) $display("result %h want %h corr %b", {cout, sum}, want, out_corrected);
          end
          if (want_valid && want_corr) n_corr++;
          if (want_valid && !want_corr) n_spec++;
        end
      end
    end
    checks++;
    if (n_spec == 0 || n_corr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
