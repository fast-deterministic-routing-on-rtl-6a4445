// switch_cell: one level of the bit-serial pipelined hypercube router, at one node.
//
// Level d of node n decides whether a passing message crosses dimension d. Messages arrive as
// serial frames whose first bit is bit d of the relative address (source XOR destination) still
// to be resolved. The cell consumes that bit: 1 sends the rest of the frame out on `crs_o`
// (the wire across dimension d, to node n ^ 2^d), 0 sends it on `stay_o` (the same node's next
// level). Every remaining bit passes with one clock of delay, so a level costs one clock and
// strips one bit, and k levels form a pipeline of depth k as in the scheme this design follows.
//
// The decision of the last frame is kept (`used`, `dir`) until `clr_i`, so that traffic can
// later be sent back along the exact reverse path: `rout_o` repeats, one clock later, the
// reverse stream of whichever next-level position the forward frame went to (`rin_crs_i` if
// it crossed, `rin_stay_i` if not). This is how the rendezvous step runs a packing backwards.
// Frames must be separated by at least one idle cycle.
module switch_cell
  import hc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr_i,        // forget the recorded path
  input  ser_t in_i,         // forward input
  output ser_t stay_o,       // forward output, same node next level
  output ser_t crs_o,      // forward output, across dimension d
  input  ser_t rin_stay_i,   // reverse input from this node's next-level position
  input  ser_t rin_crs_i,  // reverse input from the neighbour's next-level position
  output ser_t rout_o        // reverse output, towards this level's input position
);
  logic busy_q, dir_q, used_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      dir_q   <= 1'b0;
      used_q  <= 1'b0;
      stay_o  <= SER_IDLE;
      crs_o <= SER_IDLE;
      rout_o  <= SER_IDLE;
    end else begin
      stay_o  <= SER_IDLE;
      crs_o <= SER_IDLE;
      if (in_i.v && !busy_q) begin
        // header bit for this dimension: consume it
        busy_q <= 1'b1;
        dir_q  <= in_i.b;
        used_q <= 1'b1;
      end else if (in_i.v) begin
        if (dir_q) crs_o <= '{v: 1'b1, b: in_i.b};
        else       stay_o  <= '{v: 1'b1, b: in_i.b};
      end else begin
        busy_q <= 1'b0;
        if (clr_i) begin
          used_q <= 1'b0;
          dir_q  <= 1'b0;
        end
      end

      if (used_q) rout_o <= dir_q ? rin_crs_i : rin_stay_i;
      else        rout_o <= SER_IDLE;
    end
  end
endmodule
