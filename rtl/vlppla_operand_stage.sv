// vlppla_operand_stage: operand registers and the one-cycle correction control.
//
// Holds the operands A and B for the adder. Every addition first gets one
// cycle in which its speculated result is produced. If the OEDS of that
// addition is 0 the registers accept the next operands at the end of the
// cycle. If it is 1 the register enable is withheld for one cycle, so the
// exact Ling carries, given two cycles, can be taken in the following
// correction cycle; after that cycle new operands are accepted whatever the
// OEDS says. The enable is therefore "not E", as in the block diagram this
// design follows, qualified by the correction state, which is this design's
// own addition so that an erroneous addition cannot stall forever.
//
// Interface: valid/ready on the input side (in_ready low exactly in the
// first cycle of an erroneous addition). op_valid says a_q/b_q hold an
// addition; corr says the current cycle is its correction cycle; op_done says
// the addition finishes at the end of this cycle. Synchronous active-low reset
// clears the registers.
module vlppla_operand_stage #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  input  logic         oeds,
  output logic [N-1:0] a_q,
  output logic [N-1:0] b_q,
  output logic         op_valid,
  output logic         corr,
  output logic         op_done
);

  logic hold;

  assign hold     = op_valid & oeds & ~corr;
  assign in_ready = ~hold;
  assign op_done  = op_valid & ~hold;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q      <= '0;
      b_q      <= '0;
      op_valid <= 1'b0;
      corr     <= 1'b0;
    end else if (hold) begin
      corr <= 1'b1;
    end else begin
      corr     <= 1'b0;
      op_valid <= in_valid;
      if (in_valid) begin
        a_q <= a_in;
        b_q <= b_in;
      end
    end
  end

  // A correction cycle always belongs to a held addition.
  a_corr_valid : assert property (@(posedge clk) disable iff (!rst_n) corr |-> op_valid);
  // An addition never takes more than two cycles.
  a_two_cycles : assert property (@(posedge clk) disable iff (!rst_n) hold |=> !hold);

endmodule
