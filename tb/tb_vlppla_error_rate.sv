// tb_vlppla_error_rate: error-rate and average-latency workload.
//
// Runs one million random additions (uniform, independent unsigned operands)
// through each of three adders: 32-bit with L = 7, 64-bit with L = 7 (the
// default) and 64-bit with L = 15. For every adder it checks that all sums
// are exact, that the stream took exactly (additions + corrections) cycles
// plus one cycle of pipeline fill, i.e. an average of (1 + P_E) clock cycles
// per addition, and that the fraction of
// corrected additions P_E lies where it should: about 0.0087 for the 32-bit,
// L = 7 adder, about 0.02 for the 64-bit, L = 7 adder and below 1e-3 for
// L = 15.
module tb_vlppla_error_rate;
  localparam int TRIALS = 1000000;
  logic clk = 0, rst_n = 0;
  logic done32, done64, done64l;
  int r32, c32, w32, y32, r64, c64, w64, y64, r64l, c64l, w64l, y64l;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vlppla_mc_driver #(.N(32), .L(7),  .TRIALS(TRIALS)) u32  (.clk, .rst_n, .done(done32),
    .n_results(r32), .n_corrected(c32), .n_wrong(w32), .n_cycles(y32));
  vlppla_mc_driver #(.N(64), .L(7),  .TRIALS(TRIALS)) u64  (.clk, .rst_n, .done(done64),
    .n_results(r64), .n_corrected(c64), .n_wrong(w64), .n_cycles(y64));
  vlppla_mc_driver #(.N(64), .L(15), .TRIALS(TRIALS)) u64l (.clk, .rst_n, .done(done64l),
    .n_results(r64l), .n_corrected(c64l), .n_wrong(w64l), .n_cycles(y64l));

  initial begin : watchdog
    repeat (3 * TRIALS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic report(string name, int r, int c, int w, int y, real lo, real hi);
    real pe = real'(c) / real'(r);
    $display("%s: %0d additions, %0d corrected (P_E = %f), %0d wrong, %0d cycles, T_avg = %f T_clk",
             name, r, c, pe, w, y, real'(y - 1) / real'(r));
    checks++;
    if (r != TRIALS || w != 0) failures++;
    checks++;
    if (y != r + c + 1) failures++;  // plus the one-cycle fill of the result register
    checks++;
    if (pe < lo || pe > hi) begin
      failures++;
      $display("%s: P_E outside [%f, %f]", name, lo, hi);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done32 && done64 && done64l);
    @(posedge clk);
    report("N=32 L=7 ", r32, c32, w32, y32, 0.0080, 0.0094);
    report("N=64 L=7 ", r64, c64, w64, y64, 0.0150, 0.0300);
    report("N=64 L=15", r64l, c64l, w64l, y64l, 0.0, 0.001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
