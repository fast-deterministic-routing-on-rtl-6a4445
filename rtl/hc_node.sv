// hc_node: message buffers and per-step logic of one hypercube node.
//
// A message is M = K+P bits: destination address in bits K-1:0, payload above. The node holds
//   a  the message it owns (at most one between iterations),
//   b  a second message that arrived across dimension i in step 1,
//   t  a message received from the packing of step 3, in transit,
//   r  the address received in the packing of step 5 (the rendezvous partner),
// i.e. a constant number of O(K)-bit registers, plus one serializer and one deserializer.
// In iteration i (all nodes together, driven by hc_sequencer):
//   step 1  if a must cross dimension i (its destination bit i differs from the node's) it is
//           sent over the dimension-i wire; a message arriving that way goes to b.
//           Afterwards the node holds 0, 1 or 2 messages; it records two_f / zero_f and moves
//           b into a if a is empty.
//   step 2  s_o = two_f: the enumeration returns this node's rank among two-message nodes of
//           its subcube (nodes agreeing with it in bits 0..i).
//   step 3  a two-message node packs b to subcube position = rank: destination
//           (rank << (i+1)) | ID[i:0]. Whatever the router delivers here goes to t.
//   step 4  s_o = zero_f: rank among the empty nodes of the subcube.
//   step 5  an empty node sends its own address to position rank the same way; the
//           delivered address goes to r.
//   step 6  a node holding t sends it back along the step-5 path (reverse port of the
//           router); it arrives at the empty node whose address is in r, which stores it in a.
// Frames on every serial port are sent bit 0 first. err_o latches any broken invariant (a
// frame into an occupied register, a message in t without a partner, a message left in the
// wrong place at the end); hc_router_top ORs them.
// The steps follow the routing algorithm being implemented. The register set, the subcube
// numbering used for packing positions and the choice of which of two messages to pack (b,
// the one that arrived) are this design's choices.
module hc_node
  import hc_pkg::*;
#(
  parameter int unsigned K  = 6,
  parameter int unsigned P  = 8,
  parameter int unsigned ID = 0,
  localparam int unsigned W  = K + 1,
  localparam int unsigned M  = K + P,
  localparam int unsigned DW = $clog2(K + 1),
  localparam int unsigned LMAX = K + M
) (
  input  logic          clk,
  input  logic          rst_n,
  // control, from hc_sequencer
  input  phase_e        phase_i,
  input  logic          first_i,
  input  logic [DW-1:0] iter_i,
  // message loading and result
  input  logic          load_i,
  input  logic          load_v_i,
  input  logic [M-1:0]  load_msg_i,
  output logic          hold_v_o,
  output logic [M-1:0]  hold_msg_o,
  // step 1: wire across dimension i
  output ser_t          xout_o,
  input  ser_t          xin_i,
  // steps 2 and 4: enumeration
  output logic          s_o,
  input  logic          enum_done_i,
  input  logic [W-1:0]  enum_offset_i,
  // steps 3, 5 and 6: packing router
  output ser_t          inj_o,
  input  ser_t          dlv_i,
  output ser_t          rinj_o,
  input  ser_t          rdlv_i,
  output logic          err_o
);
  localparam logic [K-1:0] MY_ID = K'(ID);

  logic         a_v, b_v, t_v, r_v;
  logic [M-1:0] a_m, b_m, t_m;
  logic [K-1:0] r_a;
  logic         two_f, zero_f;
  logic [W-1:0] off_q;

  // serializer
  logic [LMAX-1:0]            tx_sh;
  logic [$clog2(LMAX+1)-1:0]  tx_cnt;
  ser_t                       tx;
  // deserializer
  logic [M-1:0]               rx_sh;
  logic [$clog2(M+1)-1:0]     rx_cnt;
  ser_t                       rx;

  // packing destination: subcube position `off_q` among the nodes agreeing in bits 0..i
  logic [K-1:0] low_mask, pack_dst, pack_rel;
  always_comb begin
    low_mask = K'((2 * (1 << iter_i)) - 1);
    pack_dst = K'((2 * K)'(off_q) << (int'(iter_i) + 1));
    pack_dst = (pack_dst & ~low_mask) | (MY_ID & low_mask);
    pack_rel = pack_dst ^ MY_ID;
  end

  logic a_leaves;
  assign a_leaves = a_v && (a_m[K-1:0] & K'(1 << iter_i)) != (MY_ID & K'(1 << iter_i));

  assign tx     = '{v: (tx_cnt != 0), b: tx_sh[0]};
  assign xout_o = (phase_i == PH_XCHG) ? tx : SER_IDLE;
  assign inj_o  = (phase_i == PH_PACK3 || phase_i == PH_PACK5) ? tx : SER_IDLE;
  assign rinj_o = (phase_i == PH_RDV) ? tx : SER_IDLE;

  always_comb begin
    unique case (phase_i)
      PH_XCHG:           rx = xin_i;
      PH_PACK3, PH_PACK5: rx = dlv_i;
      PH_RDV:            rx = rdlv_i;
      default:           rx = SER_IDLE;
    endcase
  end

  assign s_o        = (phase_i == PH_ENUM0) ? zero_f : two_f;
  assign hold_v_o   = a_v;
  assign hold_msg_o = a_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_v <= 1'b0; b_v <= 1'b0; t_v <= 1'b0; r_v <= 1'b0;
      a_m <= '0;   b_m <= '0;   t_m <= '0;   r_a <= '0;
      two_f <= 1'b0; zero_f <= 1'b0; off_q <= '0;
      tx_sh <= '0; tx_cnt <= '0;
      rx_sh <= '0; rx_cnt <= '0;
      err_o <= 1'b0;
    end else begin
      // ---- serializer shift
      if (tx_cnt != 0) begin
        tx_sh  <= tx_sh >> 1;
        tx_cnt <= tx_cnt - 1'b1;
      end

      // ---- deserializer: a frame ends at its first idle cycle
      if (rx.v) begin
        rx_sh[rx_cnt] <= rx.b;
        rx_cnt        <= rx_cnt + 1'b1;
      end else if (rx_cnt != 0) begin
        rx_cnt <= '0;
        unique case (phase_i)
          PH_XCHG: begin
            if (b_v) err_o <= 1'b1;
            b_v <= 1'b1; b_m <= rx_sh;
          end
          PH_PACK3: begin
            if (t_v) err_o <= 1'b1;
            t_v <= 1'b1; t_m <= rx_sh;
          end
          PH_PACK5: begin
            if (r_v) err_o <= 1'b1;
            r_v <= 1'b1; r_a <= rx_sh[K-1:0];
          end
          PH_RDV: begin
            if (a_v) err_o <= 1'b1;
            a_v <= 1'b1; a_m <= rx_sh;
          end
          default: err_o <= 1'b1;
        endcase
      end

      if (enum_done_i) off_q <= enum_offset_i;

      // ---- step actions on the first clock of each step
      if (phase_i == PH_IDLE && load_i) begin
        a_v <= load_v_i; a_m <= load_msg_i;
        b_v <= 1'b0; t_v <= 1'b0; r_v <= 1'b0;
        err_o <= 1'b0;
      end else if (first_i) begin
        unique case (phase_i)
          PH_XCHG: begin
            r_v <= 1'b0;
            if (a_leaves) begin
              tx_sh  <= LMAX'(a_m);
              tx_cnt <= ($bits(tx_cnt))'(M);
              a_v    <= 1'b0;
            end
          end
          PH_ENUM2: begin
            two_f  <= a_v & b_v;
            zero_f <= ~a_v & ~b_v;
            if (!a_v && b_v) begin
              a_v <= 1'b1; a_m <= b_m; b_v <= 1'b0;
            end
          end
          PH_PACK3: begin
            if (two_f) begin
              tx_sh  <= {b_m, pack_rel};
              tx_cnt <= ($bits(tx_cnt))'(K + M);
              b_v    <= 1'b0;
            end
          end
          PH_PACK5: begin
            if (zero_f) begin
              tx_sh  <= LMAX'({MY_ID, pack_rel});
              tx_cnt <= ($bits(tx_cnt))'(2 * K);
            end
          end
          PH_RDV: begin
            if (t_v) begin
              // a packed message must have a rendezvous partner in its own subcube
              if (!r_v || ((r_a ^ MY_ID) & low_mask) != '0) err_o <= 1'b1;
              tx_sh  <= LMAX'(t_m);
              tx_cnt <= ($bits(tx_cnt))'(M);
              t_v    <= 1'b0;
            end
          end
          default: ;
        endcase
      end

      // ---- final check: every remaining message must sit at its destination
      if (phase_i == PH_DONE && ((a_v && a_m[K-1:0] != MY_ID) || b_v || t_v)) err_o <= 1'b1;
    end
  end
endmodule
