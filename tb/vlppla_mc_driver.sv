// vlppla_mc_driver: Monte Carlo harness around one vlppla_top instance.
//
// Streams TRIALS uniformly random, independent unsigned operand pairs through
// the adder with in_valid held high, checks every result against a + b, and
// counts how many additions needed the correction cycle (OEDS = 1) and how
// many clock cycles the whole stream took from the first acceptance to the
// last result. Raises done when the stream has drained.
module vlppla_mc_driver #(
  parameter int unsigned N      = 64,
  parameter int unsigned L      = 7,
  parameter int unsigned TRIALS = 1000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   n_results,
  output int   n_corrected,
  output int   n_wrong,
  output int   n_cycles
);
  localparam int unsigned NB = N / (L + 1);

  logic          in_valid, in_ready, out_valid, cout, out_corrected, oeds;
  logic [N-1:0]  a, b, sum;
  logic [NB-1:0] out_beds;
  logic [N:0]    expect_q [$];
  int            sent;
  logic          counting;

  vlppla_top #(.N(N), .L(L)) dut (.*);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_valid    <= 1'b0;
      a           <= '0;
      b           <= '0;
      sent        <= 0;
      done        <= 1'b0;
      n_results   <= 0;
      n_corrected <= 0;
      n_wrong     <= 0;
      n_cycles    <= 0;
      counting    <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        expect_q.push_back({1'b0, a} + {1'b0, b});
        counting <= 1'b1;
      end
      if (!in_valid || in_ready) begin
        if (sent < TRIALS) begin
          in_valid <= 1'b1;
          a        <= N'({$urandom, $urandom});
          b        <= N'({$urandom, $urandom});
          sent     <= sent + 1;
        end else begin
          in_valid <= 1'b0;
        end
      end
      if (counting && !done) n_cycles <= n_cycles + 1;
      if (out_valid) begin
        logic [N:0] want;
        want = expect_q.pop_front();
        n_results <= n_results + 1;
        if (out_corrected) n_corrected <= n_corrected + 1;
        if ({cout, sum} !== want) n_wrong <= n_wrong + 1;
        if (n_results + 1 == TRIALS) done <= 1'b1;
      end
    end
  end
endmodule
