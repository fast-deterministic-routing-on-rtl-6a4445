// serial_adder: bit-serial adder, one bit per clock, least significant bit first.
//
// The carry is kept in a flip-flop between bits. The first bit of every operand pair is
// flagged with `first`, which makes the adder ignore the stored carry, so back-to-back words
// need no idle cycle. Sum bits are registered: the sum bit of the operands presented in cycle
// c appears on `s_o` in cycle c+1, with `v_o` and `first_o` delayed alongside.
// The hypercube routing scheme counts on serial adders at every node for its enumeration;
// the carry-flop structure and one-cycle latency are this design's choice.
module serial_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic v_i,      // operand bits valid
  input  logic first_i,  // this is bit 0 of a new word
  input  logic a_i,
  input  logic b_i,
  output logic v_o,
  output logic first_o,
  output logic s_o
);
  logic carry_q;
  logic cin;

  assign cin = first_i ? 1'b0 : carry_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry_q <= 1'b0;
      v_o     <= 1'b0;
      first_o <= 1'b0;
      s_o     <= 1'b0;
    end else begin
      v_o     <= v_i;
      first_o <= v_i & first_i;
      if (v_i) begin
        s_o     <= a_i ^ b_i ^ cin;
        carry_q <= (a_i & b_i) | (a_i & cin) | (b_i & cin);
      end else begin
        s_o     <= 1'b0;
      end
    end
  end
endmodule
