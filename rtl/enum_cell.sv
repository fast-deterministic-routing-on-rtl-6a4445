// enum_cell: one vertex of the complete butterfly that computes an enumeration.
//
// At rank j the vertex of node i holds two bit-serial numbers: t, the number of flagged nodes
// in the group of nodes merged so far, and o, the number of flagged nodes in that group whose
// address is below i. Rank j merges the group with its twin across dimension j:
//   t' = t + t_partner
//   o' = o + t_partner   if node i is the upper twin (address bit j is 1)
//   o' = o               otherwise.
// These are the recursion relations of the enumeration; two serial adders evaluate them one
// bit per clock, so a rank forwards bit l of t' and o' one clock after it receives bit l of
// t and o. When `en_i` is low the rank passes t and o on unchanged (same one-clock delay):
// that is how the enumeration is restricted to the subcubes above a given dimension, which is
// this design's own mechanism. Ports: serial t/o in from the same node's previous rank, serial
// t in from the partner's previous rank, `first_i` marking bit 0 of each number.
module enum_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic en_i,       // rank merges this cycle's dimension
  input  logic upper_i,    // this node's address bit for the rank's dimension
  input  logic v_i,
  input  logic first_i,
  input  logic t_i,        // own t bit
  input  logic o_i,        // own o bit
  input  logic tp_i,       // partner's t bit
  output logic v_o,
  output logic first_o,
  output logic t_o,
  output logic o_o
);
  logic tp_t, tp_o;
  logic o_v_unused, o_first_unused;

  assign tp_t = en_i & tp_i;
  assign tp_o = en_i & upper_i & tp_i;

  serial_adder u_add_t (
    .clk, .rst_n, .v_i, .first_i, .a_i(t_i), .b_i(tp_t),
    .v_o, .first_o, .s_o(t_o)
  );

  serial_adder u_add_o (
    .clk, .rst_n, .v_i, .first_i, .a_i(o_i), .b_i(tp_o),
    .v_o(o_v_unused), .first_o(o_first_unused), .s_o(o_o)
  );
endmodule
