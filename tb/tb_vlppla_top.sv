// tb_vlppla_top: end-to-end test of the VLPPLA at its default size (64 bits,
// L = 7), with no parameter overrides.
//
// A stream of additions with random gaps goes in through in_valid/in_ready:
// uniformly random operands (almost always speculated correctly) mixed with
// operands that carry a long run of half-sums across a block boundary (often
// speculated wrongly). A scoreboard checks every result against a + b, the
// latency against the rule "one cycle after acceptance, two if the OEDS is
// set", out_corrected against the reference OEDS, out_beds against the
// reference block errors, and, for corrected additions, that the cycle in
// between showed the speculated (wrong) value without out_valid.
// Mechanisms counted, each required at least once: one-cycle additions,
// corrected additions, input stalls, idle cycles, back-to-back additions and
// each block error signal E_2..E_8.
module tb_vlppla_top;
  import vlppla_ref_pkg::*;
  localparam int N = 64, L = 7, NB = N / (L + 1);
  localparam int NOPS = 4000;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic [N-1:0] a = '0, b = '0, sum;
  logic out_valid, cout, out_corrected, oeds;
  logic [NB-1:0] out_beds;

  vlppla_top dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    vec_t a, b;
    int   t_acc;
  } op_t;
  op_t sb [$];

  int checks = 0, failures = 0, cycle = 0;
  int n_fast = 0, n_corr = 0, n_stall = 0, n_idle = 0, n_b2b = 0, n_out = 0;
  int blk_fired [NB];
  logic acc_prev = 0;

  initial begin : watchdog
    repeat (NOPS * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor, sampled in the middle of the cycle.
  always @(negedge clk) if (rst_n) begin
    cycle++;
    if (in_valid && !in_ready) n_stall++;
    if (!in_valid) n_idle++;
    if (out_valid) begin
      op_t o;
      logic [64:0] want;
      logic        e;
      n_out++;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("result without an addition");
      end else begin
        o = sb.pop_front();
        want = exact_sum(o.a, o.b, N);
        e = (sum_from_h(o.a, o.b, h_spec(o.a, o.b, N, L), N) != want);
        if ({cout, sum} !== want[N:0]) begin
          failures++;
          if (failures < 10) $display("a=%h b=%h got %h want %h", o.a, o.b, {cout, sum}, want);
        end
        checks++;
        if (cycle - o.t_acc != (e ? 2 : 1) || out_corrected !== e) begin
          failures++;
          if (failures < 10)
            $display("latency %0d corrected %b, OEDS %b", cycle - o.t_acc, out_corrected, e);
        end
        for (int k = 1; k <= NB; k++) begin
          logic be;
          be = beds_of(o.a, o.b, N, L, k);
          checks++;
          if (out_beds[k-1] !== be) failures++;
          if (be) blk_fired[k-1]++;
        end
        if (e) n_corr++; else n_fast++;
      end
    end else if (sb.size() != 0 && cycle - sb[0].t_acc == 1) begin
      // First cycle of an addition being corrected: speculated value shown.
      op_t o;
      o = sb[0];
      checks++;
      if ({cout, sum} !== sum_from_h(o.a, o.b, h_spec(o.a, o.b, N, L), N)) failures++;
    end
  end

  // Accepted operands enter the scoreboard; their result is due one cycle
  // after the edge that takes them.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      sb.push_back('{a: a, b: b, t_acc: cycle + 1});
      if (acc_prev) n_b2b++;
    end
    acc_prev <= in_valid && in_ready;
  end

  initial begin
    vec_t x, y;
    int sent = 0;
    foreach (blk_fired[i]) blk_fired[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (sent < NOPS) begin
      if ($urandom % 5 == 0) begin
        in_valid <= 1'b0;
      end else begin
        if ($urandom % 2 == 0) random_ops(N, x, y); else long_chain(N, x, y);
        in_valid <= 1'b1;
        a <= x;
        b <= y;
        sent++;
        // hold until accepted
        do @(posedge clk); while (!in_ready);
        continue;
      end
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (n_out != NOPS || sb.size() != 0) begin
      failures++;
      $display("sent %0d, results %0d", NOPS, n_out);
    end
    $display("one-cycle %0d, corrected %0d, stalls %0d, idle %0d, back-to-back %0d",
             n_fast, n_corr, n_stall, n_idle, n_b2b);
    for (int k = 2; k <= NB; k++) begin
      $display("E_%0d fired %0d times", k, blk_fired[k-1]);
      checks++;
      if (blk_fired[k-1] == 0) failures++;
    end
    checks++;
    if (n_fast == 0 || n_corr == 0 || n_stall == 0 || n_idle == 0 || n_b2b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
