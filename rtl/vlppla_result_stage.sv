// vlppla_result_stage: result registers and MUX tree of the VLPPLA.
//
// Three registers capture, at the end of every cycle in which an addition is
// present: the 2L low sum bits (always exact), the speculated high part
// {cout*, S*[N-1:2L]} and the exact high part {cout, S[N-1:2L]}. The MUX tree
// after them picks the speculated high part for an addition finished in its
// first cycle (OEDS = 0) and the exact part for one finished in its correction
// cycle. The select is registered with the data (corr at capture time), so the
// output is consistent within a cycle.
//
// Timing: an addition whose operands sit in the operand registers in cycle t
// shows its result with out_valid in cycle t+1 if its OEDS is 0, and in
// cycle t+2 otherwise. In that case the cycle t+1 output shows the speculated
// value with out_valid low. out_corrected marks a corrected result, out_beds
// holds the BEDSs of the addition taken in its first cycle.
module vlppla_result_stage #(
  parameter int unsigned N  = 64,
  parameter int unsigned L  = 7,
  parameter int unsigned NB = N / (L + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            op_valid,
  input  logic            corr,
  input  logic            op_done,
  input  logic [2*L-1:0]  s_lo,
  input  logic [N-1:2*L]  s_spec_hi,
  input  logic            cout_spec,
  input  logic [N-1:2*L]  s_exact_hi,
  input  logic            cout_exact,
  input  logic [NB-1:0]   beds,
  output logic            out_valid,
  output logic [N-1:0]    sum,
  output logic            cout,
  output logic            out_corrected,
  output logic [NB-1:0]   out_beds
);

  localparam int unsigned HI = N - 2 * L + 1;  // high sum bits plus carry-out

  logic [2*L-1:0] lo_q;
  logic [HI-1:0]  spec_q, exact_q, hi_mux;
  logic           sel_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lo_q      <= '0;
      spec_q    <= '0;
      exact_q   <= '0;
      sel_q     <= 1'b0;
      out_valid <= 1'b0;
      out_beds  <= '0;
    end else begin
      out_valid <= op_done;
      if (op_valid) begin
        lo_q    <= s_lo;
        spec_q  <= {cout_spec, s_spec_hi};
        exact_q <= {cout_exact, s_exact_hi};
        sel_q   <= corr;
        if (!corr) out_beds <= beds;
      end
    end
  end

  // MUX tree: 0 selects the speculated part, 1 the exact part.
  assign hi_mux        = sel_q ? exact_q : spec_q;
  assign sum           = {hi_mux[HI-2:0], lo_q};
  assign cout          = hi_mux[HI-1];
  assign out_corrected = sel_q;

endmodule
