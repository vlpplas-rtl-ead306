// tb_vlppla_error_detect: checks each block error signal against its meaning
// (some carry of that block is speculated wrongly, found by comparing
// window-truncated and exact Ling carries term by term) and the OEDS against
// "speculated {cout, sum} differs from a + b". Runs N=64 with L=7 and L=15
// and N=32, L=7, and requires every block of the default adder to fire.
module tb_vlppla_error_detect;
  import vlppla_ref_pkg::*;
  vec_t a, b, d, p, he;
  int checks = 0, failures = 0;
  int fired [8];
  logic [7:0] beds7;
  logic [3:0] beds15, beds32;
  logic oeds7, oeds15, oeds32;

  vlppla_error_detect dut7 (.d, .p, .h_exact(he), .beds(beds7), .oeds(oeds7));
  vlppla_error_detect #(.N(64), .L(15)) dut15 (.d, .p, .h_exact(he), .beds(beds15), .oeds(oeds15));
  vlppla_error_detect #(.N(32), .L(7)) dut32 (.d(d[31:0]), .p(p[31:0]), .h_exact(he[31:0]),
                                              .beds(beds32), .oeds(oeds32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, int l, logic [7:0] beds, logic oeds);
    logic want_e = (sum_from_h(a, b, h_spec(a, b, n, l), n) != exact_sum(a, b, n));
    for (int blk = 1; blk <= n / (l + 1); blk++) begin
      checks++;
      if (beds[blk-1] !== beds_of(a, b, n, l, blk)) begin
        failures++;
        if (failures < 10) $display("N=%0d L=%0d E_%0d wrong a=%h b=%h", n, l, blk, a, b);
      end
      if (n == 64 && l == 7 && beds[blk-1]) fired[blk-1]++;
    end
    checks++;
    if (oeds !== want_e) begin
      failures++;
      if (failures < 10) $display("N=%0d L=%0d OEDS %b want %b a=%h b=%h", n, l, oeds, want_e, a, b);
    end
  endtask

  task automatic apply();
    d = a ^ b;
    p = a | b;
    he = h_exact(a, b, 64);
    #1;
  endtask

  initial begin
    foreach (fired[i]) fired[i] = 0;
    for (int t = 0; t < 3000; t++) begin
      if (t % 3 == 0) random_ops(64, a, b); else long_chain(64, a, b);
      apply();
      check(64, 7, beds7, oeds7);
      check(64, 15, {4'd0, beds15}, oeds15);
      a &= mask(32);
      b &= mask(32);
      apply();
      check(32, 7, {4'd0, beds32}, oeds32);
    end
    // E_1 can never fire; every other block must have been exercised.
    for (int blk = 2; blk <= 8; blk++) begin
      checks++;
      if (fired[blk-1] == 0) begin
        failures++;
        $display("block %0d never flagged an error", blk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
