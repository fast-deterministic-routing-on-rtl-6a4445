// hc_sequencer: global controller of the hypercube routing loop.
//
// All nodes run the routing algorithm in lockstep, so one controller broadcasts the current
// step (phase_o), the loop index i (iter_o) and a pulse on the first clock of every step
// (first_o). The loop visits dimensions i = 0..K-1; each iteration runs six steps:
// exchange across dimension i, enumerate two-message nodes, pack the second messages,
// enumerate empty nodes, pack their addresses, and send the packed messages back along the
// reversed packing paths. Every step has a fixed length in clocks, all O(K) (below, M = K+P is
// the message length and W = K+1 the count width):
//   exchange     M + 2         enumerations  W + K + 3 each
//   pack (msgs)  2K + M + 2    pack (addrs)  3K + 2      rendezvous  K + M + 2
// so one iteration takes 3M + 8K + 2W + 14 clocks and a whole routing K times that, O(K^2).
// The lengths follow from the pipeline latencies of hc_node, enum_butterfly and pack_router;
// the global lockstep control and the exact lengths are this design's choices.
// Interface: pulse start_i in PH_IDLE; phase PH_XCHG starts on the next clock; done_o pulses
// (phase PH_DONE) K*(3M+8K+2W+14)+1 clocks after start_i. enum_start_o pulses on clock 1 of each
// enumeration step, router_clr_o on clock 0 of each packing step.
module hc_sequencer
  import hc_pkg::*;
#(
  parameter int unsigned K = 6,
  parameter int unsigned P = 8,
  localparam int unsigned W = K + 1,
  localparam int unsigned M = K + P,
  localparam int unsigned DW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  output phase_e        phase_o,
  output logic          first_o,
  output logic [DW-1:0] iter_o,
  output logic          enum_start_o,
  output logic          router_clr_o,
  output logic          busy_o,
  output logic          done_o
);
  localparam int unsigned LEN_XCHG  = M + 2;
  localparam int unsigned LEN_ENUM  = W + K + 3;
  localparam int unsigned LEN_PACK3 = 2 * K + M + 2;
  localparam int unsigned LEN_PACK5 = 3 * K + 2;
  localparam int unsigned LEN_RDV   = K + M + 2;
  localparam int unsigned CW = $clog2(LEN_PACK3 + LEN_ENUM + 1);

  logic [CW-1:0] cnt_q;
  logic [CW-1:0] len;

  always_comb begin
    unique case (phase_o)
      PH_XCHG:           len = CW'(LEN_XCHG);
      PH_ENUM2, PH_ENUM0: len = CW'(LEN_ENUM);
      PH_PACK3:          len = CW'(LEN_PACK3);
      PH_PACK5:          len = CW'(LEN_PACK5);
      PH_RDV:            len = CW'(LEN_RDV);
      default:           len = CW'(1);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_o <= PH_IDLE;
      cnt_q   <= '0;
      iter_o  <= '0;
    end else if (phase_o == PH_IDLE) begin
      cnt_q <= '0;
      if (start_i) begin
        phase_o <= PH_XCHG;
        iter_o  <= '0;
      end
    end else if (phase_o == PH_DONE) begin
      phase_o <= PH_IDLE;
    end else if (cnt_q == len - 1'b1) begin
      cnt_q <= '0;
      unique case (phase_o)
        PH_XCHG:  phase_o <= PH_ENUM2;
        PH_ENUM2: phase_o <= PH_PACK3;
        PH_PACK3: phase_o <= PH_ENUM0;
        PH_ENUM0: phase_o <= PH_PACK5;
        PH_PACK5: phase_o <= PH_RDV;
        default: begin   // end of the rendezvous step: next dimension or finish
          if (iter_o == DW'(K - 1)) phase_o <= PH_DONE;
          else begin
            phase_o <= PH_XCHG;
            iter_o  <= iter_o + 1'b1;
          end
        end
      endcase
    end else begin
      cnt_q <= cnt_q + 1'b1;
    end
  end

  assign first_o      = (phase_o != PH_IDLE) && (phase_o != PH_DONE) && (cnt_q == '0);
  assign enum_start_o = ((phase_o == PH_ENUM2) || (phase_o == PH_ENUM0)) && (cnt_q == CW'(1));
  assign router_clr_o = ((phase_o == PH_PACK3) || (phase_o == PH_PACK5)) && (cnt_q == '0);
  assign busy_o       = (phase_o != PH_IDLE);
  assign done_o       = (phase_o == PH_DONE);
endmodule
