// hc_router_top: deterministic router for a K-dimensional hypercube with O(K)-bit node buffers.
//
// 2^K nodes each start with at most one message (destination address + payload), no two with
// the same destination. After one routing run every message sits at its destination. The run
// goes through the dimensions i = 0..K-1 in order. In iteration i every message whose
// destination differs from its node in bit i crosses dimension i; that can leave two messages
// at one node and none at another, but within each subcube of nodes agreeing in bits 0..i
// there are at least as many empty nodes as doubly loaded ones. So the doubly loaded nodes are
// enumerated and pack their second message into the first subcube positions, the empty nodes
// are enumerated and pack their own addresses into the same positions, and each packed
// message is sent back along the reversed path of the address packing, which lands it on an
// empty node. Every node again holds at most one message, now correct in bits 0..i.
// Enumerations and packings are O(K) clocks each (bit-serial and pipelined), so a run takes
// O(K^2) clocks; exactly K*(3M+8K+2W+14)+1 clocks from start_i to done_o, M = K+P, W = K+1.
//
// Blocks: hc_sequencer (global step control), 2^K hc_node (buffers and step logic),
// enum_butterfly (enumeration), pack_router (packing router and its reverse path), and the
// dimension-i exchange wires, modelled here as a multiplexer selecting each node's neighbour
// across the current dimension.
// Beside it, with its own pipe_* ports, sits hc_pipe_router: the high-throughput form of the
// same scheme for a cube with d+1 wires across dimension d, which runs the K iterations as K
// concurrent stages and accepts a new batch every slot (see that module). The two share only
// clock and reset.
// Interface: while idle, pulse load_i with load_v_i/load_msg_i per node (message bits K-1:0 are
// the destination), then pulse start_i. busy_o is high during the run, done_o pulses at its
// end, after which hold_v_o/hold_msg_o show the delivered messages. err_o reports a broken
// invariant at any node (it cannot rise for an injective routing).
module hc_router_top
  import hc_pkg::*;
#(
  parameter int unsigned K = 6,   // cube dimension
  parameter int unsigned P = 8,   // payload bits per message
  localparam int unsigned N = 1 << K,
  localparam int unsigned M = K + P,
  localparam int unsigned W = K + 1,
  localparam int unsigned DW = $clog2(K + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,
  input  logic         load_v_i   [N],
  input  logic [M-1:0] load_msg_i [N],
  input  logic         start_i,
  output logic         busy_o,
  output logic         done_o,
  output logic         hold_v_o   [N],
  output logic [M-1:0] hold_msg_o [N],
  output logic         err_o,
  // pipelined (quadratic-cube) router
  input  logic         pipe_run_i,
  output logic         pipe_slot_o,
  input  logic         pipe_in_batch_i,
  input  logic         pipe_in_v_i      [N],
  input  logic [M-1:0] pipe_in_msg_i    [N],
  output logic         pipe_out_valid_o,
  output logic         pipe_out_v_o     [N],
  output logic [M-1:0] pipe_out_msg_o   [N],
  output logic         pipe_err_o
);
  phase_e        phase;
  logic          first;
  logic [DW-1:0] iter;
  logic          enum_start, router_clr, enum_done;

  ser_t          xout [N];
  ser_t          xin  [N];
  ser_t          inj  [N];
  ser_t          dlv  [N];
  ser_t          rinj [N];
  ser_t          rdlv [N];
  logic [N-1:0]  s;
  logic [W-1:0]  offset [N];
  logic [W-1:0]  total  [N];
  logic [N-1:0]  err;

  hc_sequencer #(.K(K), .P(P)) u_seq (
    .clk, .rst_n, .start_i,
    .phase_o      (phase),
    .first_o      (first),
    .iter_o       (iter),
    .enum_start_o (enum_start),
    .router_clr_o (router_clr),
    .busy_o, .done_o
  );

  for (genvar n = 0; n < N; n++) begin : g_node
    hc_node #(.K(K), .P(P), .ID(n)) u_node (
      .clk, .rst_n,
      .phase_i       (phase),
      .first_i       (first),
      .iter_i        (iter),
      .load_i,
      .load_v_i      (load_v_i[n]),
      .load_msg_i    (load_msg_i[n]),
      .hold_v_o      (hold_v_o[n]),
      .hold_msg_o    (hold_msg_o[n]),
      .xout_o        (xout[n]),
      .xin_i         (xin[n]),
      .s_o           (s[n]),
      .enum_done_i   (enum_done),
      .enum_offset_i (offset[n]),
      .inj_o         (inj[n]),
      .dlv_i         (dlv[n]),
      .rinj_o        (rinj[n]),
      .rdlv_i        (rdlv[n]),
      .err_o         (err[n])
    );

    // dimension-i link: node n hears its neighbour n ^ 2^i
    always_comb begin
      xin[n] = SER_IDLE;
      for (int d = 0; d < K; d++)
        if (iter == DW'(d)) xin[n] = xout[n ^ (1 << d)];
    end
  end

  // enumeration within the subcubes of nodes agreeing in bits 0..i
  enum_butterfly #(.K(K), .W(W)) u_enum (
    .clk, .rst_n,
    .start_i  (enum_start),
    .lo_dim_i (iter + 1'b1),
    .s_i      (s),
    .offset_o (offset),
    .total_o  (total),
    .done_o   (enum_done)
  );

  pack_router #(.K(K)) u_router (
    .clk, .rst_n,
    .clr_i  (router_clr),
    .inj_i  (inj),
    .dlv_o  (dlv),
    .rinj_i (rinj),
    .rdlv_o (rdlv)
  );

  assign err_o = |err;

  hc_pipe_router #(.K(K), .P(P)) u_pipe (
    .clk, .rst_n,
    .run_i       (pipe_run_i),
    .slot_o      (pipe_slot_o),
    .in_batch_i  (pipe_in_batch_i),
    .in_v_i      (pipe_in_v_i),
    .in_msg_i    (pipe_in_msg_i),
    .out_valid_o (pipe_out_valid_o),
    .out_v_o     (pipe_out_v_o),
    .out_msg_o   (pipe_out_msg_o),
    .err_o       (pipe_err_o)
  );
endmodule
