// tb_vlppla_operand_stage: drives the operand registers with random valid
// operands and an error signal derived from the held operand (bit 0 of a),
// and checks that each accepted operand pair is held for one cycle when its
// OEDS is 0 and for exactly two when it is 1, that in_ready drops only in the
// first cycle of an erroneous addition, and that nothing is lost or repeated.
module tb_vlppla_operand_stage;
  localparam int N = 64;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, oeds;
  logic [N-1:0] a_in = '0, b_in = '0, a_q, b_q;
  logic op_valid, corr, op_done;
  int checks = 0, failures = 0, cycles = 0;
  int n_sent = 0, n_done = 0, n_stall = 0, n_fast = 0, n_slow = 0;
  int held;  // cycles the current operand has been in the registers
  logic [N-1:0] sent_a [$];

  vlppla_operand_stage #(.N(N)) dut (.*);

  assign oeds = a_q[0];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker, sampled just before each rising edge.
  always @(negedge clk) if (rst_n) begin
    cycles++;
    checks++;
    if (in_ready !== !(op_valid && a_q[0] && !corr)) failures++;
    if (op_valid) begin
      held++;
      if (held == 1) begin
        checks++;
        if (sent_a.size() == 0 || a_q !== sent_a[0] || b_q !== ~sent_a[0]) begin
          failures++;
          $display("wrong operand in registers");
        end
      end
      if (op_done) begin
        checks++;
        if (held != (a_q[0] ? 2 : 1)) begin
          failures++;
          $display("operand held %0d cycles, OEDS %b", held, a_q[0]);
        end
        if (held == 2) n_slow++; else n_fast++;
        void'(sent_a.pop_front());
        n_done++;
        held = 0;
      end
      if (!in_ready && in_valid) n_stall++;
    end
  end

  initial begin
    held = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 2000; t++) begin
      if (!in_valid || in_ready) begin
        in_valid <= ($urandom % 4 != 0);
        a_in     <= {$urandom, $urandom};
      end
      @(negedge clk);
      b_in = ~a_in;
      if (in_valid && in_ready) begin
        sent_a.push_back(a_in);
        n_sent++;
      end
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_done != n_sent) failures++;
    checks++;
    if (n_fast == 0 || n_slow == 0 || n_stall == 0) begin
      failures++;
      $display("mechanism not exercised fast=%0d slow=%0d stall=%0d", n_fast, n_slow, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
