// pack_router: bit-serial pipelined hypercube router for semi-contractions, with a reverse path.
//
// Forward: every node may inject one frame on inj_i[n]: K relative-address bits (source XOR
// destination, bit 0 first) followed by the payload. Level d (d = 0..K-1) of every node is a
// switch_cell that resolves dimension d, so the dimensions are crossed in the order 0,1,..,K-1
// (one dimension per step, as in the dimension-order algorithm for semi-contractions). The
// payload comes out on dlv_o[dest] with the address bits stripped. For any semi-contraction
// (packings included) no two frames ever meet at the same level of the same node; an assertion
// checks that the two inputs of a level are never valid together.
//
// Reverse: after a forward pass each switch remembers its setting until clr_i. A frame injected
// on rinj_i[m] at a node that received a forward frame travels the same path backwards and
// comes out on rdlv_o[source]. No address bits are consumed on the way back.
//
// Timing: a forward frame of L bits whose first bit is on inj_i in cycle c is delivered in
// cycles c+2K .. c+L+K-1: each level adds one clock and strips one bit, so every payload bit is
// delayed by K clocks. A reverse frame is likewise delayed by K clocks. Frames from one node
// must be separated by an idle cycle. Pulse clr_i while the router is idle before a forward
// pass whose path is to be reversed.
module pack_router
  import hc_pkg::*;
#(
  parameter int unsigned K = 6,
  localparam int unsigned N = 1 << K
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr_i,
  input  ser_t inj_i  [N],
  output ser_t dlv_o  [N],
  input  ser_t rinj_i [N],
  output ser_t rdlv_o [N]
);
  ser_t pos   [K+1][N];   // forward stream at the input of level d (d = K: delivery)
  ser_t stay  [K][N];
  ser_t crs [K][N];
  ser_t rpos  [K+1][N];   // reverse stream at the input position of level d

  for (genvar n = 0; n < N; n++) begin : g_io
    assign pos[0][n]  = inj_i[n];
    assign dlv_o[n]   = pos[K][n];
    assign rpos[K][n] = rinj_i[n];
    assign rdlv_o[n]  = rpos[0][n];
  end

  for (genvar d = 0; d < K; d++) begin : g_lvl
    for (genvar n = 0; n < N; n++) begin : g_node
      localparam int unsigned P = n ^ (1 << d);   // neighbour across dimension d
      switch_cell u_sw (
        .clk, .rst_n, .clr_i,
        .in_i        (pos[d][n]),
        .stay_o      (stay[d][n]),
        .crs_o     (crs[d][n]),
        .rin_stay_i  (rpos[d+1][n]),
        .rin_crs_i (rpos[d+1][P]),
        .rout_o      (rpos[d][n])
      );
      // a node's next-level position is fed by its own stay output or the neighbour's cross
      assign pos[d+1][n] = '{v: stay[d][n].v | crs[d][P].v,
                             b: (stay[d][n].v & stay[d][n].b) | (crs[d][P].v & crs[d][P].b)};

      a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
                                        !(stay[d][n].v && crs[d][P].v))
        else $error("pack_router: two frames met at level %0d of node %0d", d + 1, n);
    end
  end
endmodule
