// hc_pipe_router: high-throughput form of the hypercube router, one batch per O(K) clocks.
//
// The basic router runs its K loop iterations one after another on one set of messages.
// Iteration i only uses dimension i (its exchange) and the dimensions above i (its packings
// stay inside subcubes of nodes agreeing in bits 0..i), so dimension d is used by iterations
// 0..d. Giving dimension d its own d+1 wires (a "quadratic hypercube") and every node one set
// of iteration buffers per loop index lets all K iterations run at once, each on a different
// batch: stage s is a full iteration-s datapath (2^K hc_node with a fixed loop index s, an
// enum_butterfly enumerating above dimension s, a pack_router and the dimension-s exchange
// wires). All stages run the same six steps in lockstep under the controller below; after
// every slot each node hands its message from stage s to stage s+1 (a local register move),
// stage 0 takes a new batch and stage K-1 delivers a routed batch.
//
// Timing: a slot is 1 + 3M + 8K + 2W + 14 clocks (one hand-off clock plus one iteration,
// M = K+P, W = K+1). slot_o pulses on the hand-off clock: in that clock in_batch_i/in_v_i/
// in_msg_i are taken as a new batch (each node at most one message, no two to the same
// destination), and out_valid_o/out_v_o/out_msg_o show the batch that entered K slots earlier,
// now at its destinations. So latency is K slots, O(K^2) clocks, and throughput one batch per
// slot, O(K) clocks. The slot keeps running while run_i is high. err_o is sticky until reset.
// The stage-per-iteration organisation, the lockstep slot and the hand-off are this design's
// reading of the idea of running successive iterations in parallel on different batches.
module hc_pipe_router
  import hc_pkg::*;
#(
  parameter int unsigned K = 6,
  parameter int unsigned P = 8,
  localparam int unsigned N = 1 << K,
  localparam int unsigned M = K + P,
  localparam int unsigned W = K + 1,
  localparam int unsigned DW = $clog2(K + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run_i,
  output logic         slot_o,
  input  logic         in_batch_i,
  input  logic         in_v_i    [N],
  input  logic [M-1:0] in_msg_i  [N],
  output logic         out_valid_o,
  output logic         out_v_o   [N],
  output logic [M-1:0] out_msg_o [N],
  output logic         err_o
);
  localparam int unsigned LEN_XCHG  = M + 2;
  localparam int unsigned LEN_ENUM  = W + K + 3;
  localparam int unsigned LEN_PACK3 = 2 * K + M + 2;
  localparam int unsigned LEN_PACK5 = 3 * K + 2;
  localparam int unsigned LEN_RDV   = K + M + 2;
  localparam int unsigned CW = $clog2(LEN_PACK3 + LEN_ENUM + 1);

  // ---------------- slot controller: hand-off clock (PH_IDLE), then the six steps
  phase_e        phase;
  logic [CW-1:0] cnt_q;
  logic [CW-1:0] len;
  logic          first, enum_start, router_clr;

  always_comb begin
    unique case (phase)
      PH_XCHG:            len = CW'(LEN_XCHG);
      PH_ENUM2, PH_ENUM0: len = CW'(LEN_ENUM);
      PH_PACK3:           len = CW'(LEN_PACK3);
      PH_PACK5:           len = CW'(LEN_PACK5);
      PH_RDV:             len = CW'(LEN_RDV);
      default:            len = CW'(1);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      cnt_q <= '0;
    end else if (phase == PH_IDLE) begin
      cnt_q <= '0;
      if (run_i) phase <= PH_XCHG;
    end else if (cnt_q == len - 1'b1) begin
      cnt_q <= '0;
      unique case (phase)
        PH_XCHG:  phase <= PH_ENUM2;
        PH_ENUM2: phase <= PH_PACK3;
        PH_PACK3: phase <= PH_ENUM0;
        PH_ENUM0: phase <= PH_PACK5;
        PH_PACK5: phase <= PH_RDV;
        default:  phase <= PH_IDLE;
      endcase
    end else begin
      cnt_q <= cnt_q + 1'b1;
    end
  end

  assign slot_o     = (phase == PH_IDLE) && run_i;
  assign first      = (phase != PH_IDLE) && (cnt_q == '0);
  assign enum_start = ((phase == PH_ENUM2) || (phase == PH_ENUM0)) && (cnt_q == CW'(1));
  assign router_clr = ((phase == PH_PACK3) || (phase == PH_PACK5)) && (cnt_q == '0);

  // ---------------- stages
  logic         hold_v   [K+1][N];   // index s: input of stage s; index K: pipeline output
  logic [M-1:0] hold_msg [K+1][N];
  logic [K-1:0] batch_q;             // stage s holds a real batch
  logic [N-1:0] err_s [K];

  for (genvar n = 0; n < N; n++) begin : g_in
    assign hold_v[0][n]   = in_batch_i & in_v_i[n];
    assign hold_msg[0][n] = in_msg_i[n];
  end

  for (genvar s = 0; s < K; s++) begin : g_stage
    ser_t         xout [N];
    ser_t         xin  [N];
    ser_t         inj  [N];
    ser_t         dlv  [N];
    ser_t         rinj [N];
    ser_t         rdlv [N];
    logic [N-1:0] sflag;
    logic [W-1:0] offset [N];
    logic [W-1:0] total  [N];
    logic         enum_done;

    for (genvar n = 0; n < N; n++) begin : g_node
      hc_node #(.K(K), .P(P), .ID(n)) u_node (
        .clk, .rst_n,
        .phase_i       (phase),
        .first_i       (first),
        .iter_i        (DW'(s)),
        .load_i        (slot_o),
        .load_v_i      (hold_v[s][n]),
        .load_msg_i    (hold_msg[s][n]),
        .hold_v_o      (hold_v[s+1][n]),
        .hold_msg_o    (hold_msg[s+1][n]),
        .xout_o        (xout[n]),
        .xin_i         (xin[n]),
        .s_o           (sflag[n]),
        .enum_done_i   (enum_done),
        .enum_offset_i (offset[n]),
        .inj_o         (inj[n]),
        .dlv_i         (dlv[n]),
        .rinj_o        (rinj[n]),
        .rdlv_i        (rdlv[n]),
        .err_o         (err_s[s][n])
      );
      // stage s owns a wire across dimension s at every node
      assign xin[n] = xout[n ^ (1 << s)];
    end

    enum_butterfly #(.K(K), .W(W)) u_enum (
      .clk, .rst_n,
      .start_i  (enum_start),
      .lo_dim_i (DW'(s + 1)),
      .s_i      (sflag),
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
  end

  // ---------------- batch bookkeeping, output register, sticky error
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      batch_q     <= '0;
      out_valid_o <= 1'b0;
      err_o       <= 1'b0;
      for (int n = 0; n < N; n++) begin
        out_v_o[n]   <= 1'b0;
        out_msg_o[n] <= '0;
      end
    end else begin
      out_valid_o <= 1'b0;
      if (slot_o) begin
        batch_q     <= {batch_q[K-2:0], in_batch_i};
        out_valid_o <= batch_q[K-1];
        for (int n = 0; n < N; n++) begin
          out_v_o[n]   <= hold_v[K][n];
          out_msg_o[n] <= hold_msg[K][n];
          // a message leaving the last stage must be at its destination
          if (batch_q[K-1] && hold_v[K][n] && hold_msg[K][n][K-1:0] != K'(n)) err_o <= 1'b1;
        end
      end
      for (int s = 0; s < K; s++)
        if (|err_s[s]) err_o <= 1'b1;
    end
  end
endmodule
