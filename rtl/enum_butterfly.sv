// enum_butterfly: pipelined enumeration of flagged nodes on a complete butterfly.
//
// Every node n raises s[n] if it wants to be counted. The block returns, to every node, its
// offset: how many flagged nodes share its subcube and have a smaller address, together with
// the total number of flagged nodes in that subcube. A subcube here is the set of nodes that
// agree in address bits 0..lo_dim-1, so lo_dim = 0 enumerates the whole cube and lo_dim = K
// leaves every node on its own.
//
// Structure: K ranks of enum_cell per node (K*2^K vertices in all, a constant amount of logic
// each). Rank d merges across dimension d, lowest dimension first, which orders the flagged
// nodes by address. The numbers travel bit-serially, least significant bit first, W bits long,
// and each rank adds one clock, so the enumeration is pipelined as in the scheme this design
// follows: a rank starts on bit l as soon as it has bit l from the rank before.
// Ranks below lo_dim pass their numbers through (this design's way of enumerating within
// subcubes).
//
// Timing: pulse start_i for one clock with s_i and lo_dim_i valid (s_i is sampled only in that
// clock, lo_dim_i must hold until done). done_o pulses W+K+1 clocks after start_i, and
// offset_o / total_o hold the results from then until the next start.
module enum_butterfly #(
  parameter int unsigned K = 6,            // cube dimension
  parameter int unsigned W = K + 1,        // width of the serial counts
  localparam int unsigned N = 1 << K,
  localparam int unsigned DW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [DW-1:0] lo_dim_i,
  input  logic [N-1:0]  s_i,
  output logic [W-1:0]  offset_o [N],
  output logic [W-1:0]  total_o  [N],
  output logic          done_o
);
  // serial streams between ranks: index 0 is the input stage, index d+1 the output of rank d
  logic         v_q     [K+1];
  logic         first_q [K+1];
  logic [N-1:0] t_q     [K+1];
  logic [N-1:0] o_q     [K+1];

  logic [$clog2(W+1)-1:0] in_cnt;
  logic [$clog2(W+1)-1:0] out_cnt;

  // input stage: bit 0 of t is the flag, higher bits zero; o starts at zero
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt     <= '0;
      v_q[0]     <= 1'b0;
      first_q[0] <= 1'b0;
      t_q[0]     <= '0;
      o_q[0]     <= '0;
    end else if (start_i) begin
      in_cnt     <= 1;
      v_q[0]     <= 1'b1;
      first_q[0] <= 1'b1;
      t_q[0]     <= s_i;
      o_q[0]     <= '0;
    end else if (in_cnt != 0 && int'(in_cnt) < int'(W)) begin
      in_cnt     <= in_cnt + 1'b1;
      v_q[0]     <= 1'b1;
      first_q[0] <= 1'b0;
      t_q[0]     <= '0;
      o_q[0]     <= '0;
    end else begin
      in_cnt     <= '0;
      v_q[0]     <= 1'b0;
      first_q[0] <= 1'b0;
      t_q[0]     <= '0;
      o_q[0]     <= '0;
    end
  end

  for (genvar d = 0; d < K; d++) begin : g_rank
    logic en;
    assign en = (DW'(d) >= lo_dim_i);
    for (genvar n = 0; n < N; n++) begin : g_node
      logic v_n, first_n;
      enum_cell u_cell (
        .clk, .rst_n,
        .en_i    (en),
        .upper_i (1'(n >> d)),
        .v_i     (v_q[d]),
        .first_i (first_q[d]),
        .t_i     (t_q[d][n]),
        .o_i     (o_q[d][n]),
        .tp_i    (t_q[d][n ^ (1 << d)]),
        .v_o     (v_n),
        .first_o (first_n),
        .t_o     (t_q[d+1][n]),
        .o_o     (o_q[d+1][n])
      );
      if (n == 0) begin : g_ctl
        assign v_q[d+1]     = v_n;
        assign first_q[d+1] = first_n;
      end
    end
  end

  // collect the serial results at the last rank
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_cnt <= '0;
      done_o  <= 1'b0;
      for (int n = 0; n < N; n++) begin
        offset_o[n] <= '0;
        total_o[n]  <= '0;
      end
    end else begin
      done_o <= 1'b0;
      if (v_q[K]) begin
        for (int n = 0; n < N; n++) begin
          offset_o[n] <= {o_q[K][n], offset_o[n][W-1:1]};
          total_o[n]  <= {t_q[K][n], total_o[n][W-1:1]};
        end
        if (first_q[K]) out_cnt <= 1;
        else            out_cnt <= out_cnt + 1'b1;
        if ((first_q[K] ? 1 : int'(out_cnt) + 1) == W) done_o <= 1'b1;
      end
    end
  end
endmodule
