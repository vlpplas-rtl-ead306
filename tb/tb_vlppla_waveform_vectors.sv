// tb_vlppla_waveform_vectors: replays three reference 64-bit operand pairs
// through the default adder back to back and checks the printed results
// cycle by cycle. The first two are speculated correctly and appear one cycle
// after acceptance. The third sets the OEDS: the cycle after acceptance shows
// the speculated, wrong value 0x0_89e5c00d_80176996 without out_valid, and
// the cycle after that the corrected 0x0_89e5c00e_00176996 with out_valid and
// out_corrected.
module tb_vlppla_waveform_vectors;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready;
  logic [63:0] a = '0, b = '0, sum;
  logic out_valid, cout, out_corrected, oeds;
  logic [7:0] out_beds;
  int checks = 0, failures = 0;

  vlppla_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(logic v, logic [64:0] val, logic corrected, logic rdy);
    @(negedge clk);
    checks++;
    if (out_valid !== v || {cout, sum} !== val || (v && out_corrected !== corrected)
        || in_ready !== rdy) begin
      failures++;
      $display("got valid=%b %h corr=%b ready=%b, want valid=%b %h corr=%b ready=%b",
               out_valid, {cout, sum}, out_corrected, in_ready, v, val, corrected, rdy);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    in_valid <= 1; a <= 64'ha0601be6872dc47f; b <= 64'h453b0ce3e1e159eb;
    @(posedge clk);  // pair 1 accepted
    a <= 64'h7e54fc969f283ea5; b <= 64'hd6899414046aacfe;
    @(posedge clk);  // pair 2 accepted
    a <= 64'h31c09d5ce926c10f; b <= 64'h582522b116f0a887;
    // pair 1 result visible, pair 2 being added
    expect_out(1, 65'h0e59b28ca690f1e6a, 0, 1);
    @(posedge clk);  // pair 3 accepted
    in_valid <= 0;
    expect_out(1, 65'h154de90aaa392eba3, 0, 0);  // pair 2 result; pair 3 has E = 1
    checks++;
    if (oeds !== 1'b1) failures++;
    expect_out(0, 65'h089e5c00d80176996, 0, 1);  // speculated, not valid
    expect_out(1, 65'h089e5c00e00176996, 1, 1);  // corrected
    checks++;
    if (out_beds == '0) failures++;
    expect_out(0, 65'h089e5c00e00176996, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
