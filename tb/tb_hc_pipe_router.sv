// tb_hc_pipe_router: streams batches through the pipelined (one stage per loop index) router.
//
// Offers a new batch on every slot: random full and partial permutations, the complement and
// bit reversal, with some slots left empty. Each batch must come out K slots later with every
// message at its destination and its payload intact and no other node loaded; slots must be
// exactly 1 + 3M + 8K + 2W + 14 clocks apart, so the throughput is one batch per slot while
// the latency is K slots. err_o must stay low.
module tb_hc_pipe_router;
  localparam int unsigned K = 6;
  localparam int unsigned P = 8;
  localparam int unsigned N = 1 << K;
  localparam int unsigned M = K + P;
  localparam int unsigned W = K + 1;
  localparam int unsigned SLOT = 1 + 3 * M + 8 * K + 2 * W + 14;
  localparam int unsigned NB = 14;   // batches offered

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic slot, in_batch, out_valid, err;
  logic         in_v    [N];
  logic [M-1:0] in_msg  [N];
  logic         out_v   [N];
  logic [M-1:0] out_msg [N];
  int checks = 0, failures = 0;

  hc_pipe_router dut (
    .clk, .rst_n, .run_i(run), .slot_o(slot), .in_batch_i(in_batch), .in_v_i(in_v),
    .in_msg_i(in_msg), .out_valid_o(out_valid), .out_v_o(out_v), .out_msg_o(out_msg),
    .err_o(err)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (int'(SLOT) * (NB + K + 4)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected contents of each offered batch
  logic         exp_v   [NB][N];
  logic [M-1:0] exp_msg [NB][N];
  logic         offered [NB];

  function automatic int unsigned bitrev(int unsigned x);
    int unsigned r = 0;
    for (int b = 0; b < K; b++) if (x & (1 << b)) r |= 1 << (K - 1 - b);
    return r;
  endfunction

  initial begin
    int perm[N];
    for (int b = 0; b < int'(NB); b++) begin
      for (int n = 0; n < N; n++) perm[n] = n;
      for (int n = N - 1; n > 0; n--) begin
        int j, tmp;
        j = int'($urandom_range(n, 0));
        tmp = perm[n]; perm[n] = perm[j]; perm[j] = tmp;
      end
      if (b == 1) for (int n = 0; n < N; n++) perm[n] = (N - 1) ^ n;
      if (b == 2) for (int n = 0; n < N; n++) perm[n] = int'(bitrev(n));
      offered[b] = (b % 5 != 4);
      for (int d = 0; d < N; d++) exp_v[b][d] = 1'b0;
      for (int n = 0; n < N; n++)
        if (offered[b] && !(b >= 6 && $urandom_range(3, 0) == 0)) begin
          exp_v[b][perm[n]]   = 1'b1;
          exp_msg[b][perm[n]] = {P'($urandom), K'(perm[n])};
        end
    end
  end

  // drive: batch b is offered on slot b
  int slot_no = 0;
  int last_slot_t = -1, t = 0;
  int outs = 0;
  always @(negedge clk) begin
    t++;
    in_batch = 1'b0;
    for (int n = 0; n < N; n++) begin in_v[n] = 1'b0; in_msg[n] = '0; end
    if (slot_no < int'(NB) && offered[slot_no]) begin
      in_batch = 1'b1;
      for (int d = 0; d < N; d++)
        if (exp_v[slot_no][d]) begin
          // the message for destination d starts at a scrambled source node
          in_v[(d * 37 + slot_no) % N]   = 1'b1;
          in_msg[(d * 37 + slot_no) % N] = exp_msg[slot_no][d];
        end
    end
  end

  always @(posedge clk) begin
    if (slot) begin
      if (last_slot_t >= 0) begin
        checks++;
        if (t - last_slot_t != int'(SLOT)) begin
          failures++;
          $display("slots %0d clocks apart, expected %0d", t - last_slot_t, SLOT);
        end
      end
      last_slot_t = t;
      slot_no++;
    end
  end

  // outputs: the batch offered on slot b appears right after slot b+K
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int b;
      b = slot_no - 1 - int'(K);
      checks++;
      if (b < 0 || b >= int'(NB) || !offered[b]) begin
        failures++;
        $display("unexpected output batch (slot %0d)", slot_no);
      end else begin
        outs++;
        for (int d = 0; d < N; d++) begin
          checks++;
          if (out_v[d] != exp_v[b][d] || (exp_v[b][d] && out_msg[d] != exp_msg[b][d])) begin
            failures++;
            $display("batch %0d node %0d: got %0b %h expected %0b %h", b, d, out_v[d],
                     out_msg[d], exp_v[b][d], exp_msg[b][d]);
          end
        end
      end
    end
  end

  initial begin
    int n_off;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run = 1'b1;
    wait (slot_no == int'(NB + K + 1));
    repeat (5) @(negedge clk);
    n_off = 0;
    for (int b = 0; b < int'(NB); b++) if (offered[b]) n_off++;
    checks += 2;
    if (outs != n_off) begin failures++; $display("%0d batches delivered, %0d offered", outs, n_off); end
    if (err) begin failures++; $display("err_o raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
