// tb_hc_router_top: end-to-end test of the hypercube router at its default size.
//
// Routes a series of injective routings through the whole design: the identity, the complement
// permutation (every message crosses every dimension), bit reversal, a cyclic shift, and random
// full and partial permutations built with a Fisher-Yates shuffle. For each run it checks that
// every message reaches its destination with its payload, that no other node holds a message,
// that no node reports an error, and that the run takes exactly K*(3M+8K+2W+14)+1 clocks.
// It also counts the design's mechanisms over all runs (crossings of the current dimension,
// doubly loaded and empty nodes found by the enumerations, packed messages, rendezvous
// messages sent back along reversed paths) and fails if any of them never happened.
// Then it streams random permutation batches through the pipelined router beside it, one per
// slot, and checks that each comes out routed K slots later, that slots are
// 1+3M+8K+2W+14 clocks apart, and that several batches really were in flight at once.
module tb_hc_router_top;
  import hc_pkg::*;
  localparam int unsigned K = 6;
  localparam int unsigned P = 8;
  localparam int unsigned N = 1 << K;
  localparam int unsigned M = K + P;
  localparam int unsigned W = K + 1;
  localparam int unsigned RUN_CLOCKS = K * (3 * M + 8 * K + 2 * W + 14) + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load, start, busy, done, err;
  logic         load_v   [N];
  logic [M-1:0] load_msg [N];
  logic         hold_v   [N];
  logic [M-1:0] hold_msg [N];

  int checks = 0, failures = 0;
  int n_cross = 0, n_two = 0, n_zero = 0, n_pack_bits = 0, n_rdv_bits = 0;
  int max_in_flight = 0, n_pipe_out = 0;

  localparam int unsigned SLOT = 1 + 3 * M + 8 * K + 2 * W + 14;
  localparam int unsigned NB = 9;
  logic pipe_run = 1'b0, pipe_slot, pipe_in_batch = 1'b0, pipe_out_valid, pipe_err;
  logic         pipe_in_v    [N];
  logic [M-1:0] pipe_in_msg  [N];
  logic         pipe_out_v   [N];
  logic [M-1:0] pipe_out_msg [N];

  hc_router_top dut (
    .clk, .rst_n, .load_i(load), .load_v_i(load_v), .load_msg_i(load_msg),
    .start_i(start), .busy_o(busy), .done_o(done),
    .hold_v_o(hold_v), .hold_msg_o(hold_msg), .err_o(err),
    .pipe_run_i(pipe_run), .pipe_slot_o(pipe_slot), .pipe_in_batch_i(pipe_in_batch),
    .pipe_in_v_i(pipe_in_v), .pipe_in_msg_i(pipe_in_msg), .pipe_out_valid_o(pipe_out_valid),
    .pipe_out_v_o(pipe_out_v), .pipe_out_msg_o(pipe_out_msg), .pipe_err_o(pipe_err)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (dut.xout[n].v) n_cross++;
      if (dut.phase == PH_PACK3 && dut.inj[n].v) n_pack_bits++;
      if (dut.rinj[n].v) n_rdv_bits++;
    end
    if (dut.enum_start && dut.phase == PH_ENUM2) n_two  += $countones(dut.s);
    if (dut.enum_start && dut.phase == PH_ENUM0) n_zero += $countones(dut.s);
    if ($countones(dut.u_pipe.batch_q) > max_in_flight) max_in_flight = $countones(dut.u_pipe.batch_q);
  end

  task automatic random_perm(output int perm[N]);
    for (int n = 0; n < N; n++) perm[n] = n;
    for (int n = N - 1; n > 0; n--) begin
      int j, tmp;
      j = int'($urandom_range(n, 0));
      tmp = perm[n]; perm[n] = perm[j]; perm[j] = tmp;
    end
  endtask

  task automatic pipe_test();
    logic [P-1:0] pay [NB][N];   // payload of the message for destination d in batch b
    int src [NB][N];             // source node of that message
    int perm[N];
    int last_t, t;
    for (int b = 0; b < int'(NB); b++) begin
      random_perm(perm);
      for (int n = 0; n < N; n++) begin
        src[b][perm[n]] = n;
        pay[b][perm[n]] = P'($urandom);
      end
    end
    pipe_run = 1'b1;
    last_t = -1;
    t = 0;
    for (int j = 0; j < int'(NB + K + 1); j++) begin
      while (!pipe_slot) begin @(negedge clk); t++; end
      checks++;
      if (last_t >= 0 && t - last_t != int'(SLOT)) begin
        failures++;
        $display("pipe: slots %0d clocks apart, expected %0d", t - last_t, SLOT);
      end
      last_t = t;
      pipe_in_batch = (j < int'(NB));
      for (int n = 0; n < N; n++) begin pipe_in_v[n] = 1'b0; pipe_in_msg[n] = '0; end
      if (j < int'(NB))
        for (int d = 0; d < N; d++) begin
          pipe_in_v[src[j][d]]   = 1'b1;
          pipe_in_msg[src[j][d]] = {pay[j][d], K'(d)};
        end
      @(negedge clk);
      t++;
      pipe_in_batch = 1'b0;
      checks++;
      if (j >= int'(K) && j - int'(K) < int'(NB)) begin
        if (!pipe_out_valid) begin
          failures++;
          $display("pipe: batch %0d missing", j - int'(K));
        end else begin
          n_pipe_out++;
          for (int d = 0; d < N; d++) begin
            checks++;
            if (!pipe_out_v[d] || pipe_out_msg[d] != {pay[j-K][d], K'(d)}) begin
              failures++;
              $display("pipe: batch %0d node %0d got %0b %h", j - int'(K), d, pipe_out_v[d],
                       pipe_out_msg[d]);
            end
          end
        end
      end else if (pipe_out_valid) begin
        failures++;
        $display("pipe: unexpected output at slot %0d", j);
      end
    end
    pipe_run = 1'b0;
    checks++;
    if (pipe_err) begin failures++; $display("pipe: err_o raised"); end
  endtask

  function automatic int unsigned bitrev(int unsigned x);
    int unsigned r = 0;
    for (int b = 0; b < K; b++) if (x & (1 << b)) r |= 1 << (K - 1 - b);
    return r;
  endfunction

  // dest[n] = destination of node n's message, or -1 for none
  task automatic run(input int dest[N], input string name);
    int cyc;
    int src_of[N];
    logic [P-1:0] pay[N];
    for (int n = 0; n < N; n++) src_of[n] = -1;
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      pay[n]      = P'($urandom);
      load_v[n]   = (dest[n] >= 0);
      load_msg[n] = {pay[n], K'(dest[n] < 0 ? 0 : dest[n])};
      if (dest[n] >= 0) src_of[dest[n]] = n;
    end
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != int'(RUN_CLOCKS)) begin
      failures++;
      $display("%s: run took %0d clocks, expected %0d", name, cyc, RUN_CLOCKS);
    end
    @(negedge clk);
    checks++;
    if (err) begin
      failures++;
      $display("%s: a node reported an error", name);
    end
    for (int d = 0; d < N; d++) begin
      checks++;
      if (src_of[d] < 0) begin
        if (hold_v[d]) begin
          failures++;
          $display("%s: node %0d holds an unexpected message", name, d);
        end
      end else if (!hold_v[d] || hold_msg[d] != {pay[src_of[d]], K'(d)}) begin
        failures++;
        $display("%s: node %0d: got v=%0b msg=%h, expected message from %0d (%h)", name, d,
                 hold_v[d], hold_msg[d], src_of[d], {pay[src_of[d]], K'(d)});
      end
    end
  endtask

  initial begin
    int dest[N];
    int perm[N];
    load = 1'b0;
    start = 1'b0;
    for (int n = 0; n < N; n++) begin
      load_v[n] = 1'b0;
      load_msg[n] = '0;
      pipe_in_v[n] = 1'b0;
      pipe_in_msg[n] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < N; n++) dest[n] = n;
    run(dest, "identity");
    for (int n = 0; n < N; n++) dest[n] = (N - 1) ^ n;
    run(dest, "complement");
    for (int n = 0; n < N; n++) dest[n] = int'(bitrev(n));
    run(dest, "bit reversal");
    for (int n = 0; n < N; n++) dest[n] = (n + 1) % N;
    run(dest, "shift");
    for (int t = 0; t < 12; t++) begin
      for (int n = 0; n < N; n++) perm[n] = n;
      for (int n = N - 1; n > 0; n--) begin
        int j, tmp;
        j = int'($urandom_range(n, 0));
        tmp = perm[n]; perm[n] = perm[j]; perm[j] = tmp;
      end
      for (int n = 0; n < N; n++)
        dest[n] = (t >= 6 && $urandom_range(3, 0) == 0) ? -1 : perm[n];
      run(dest, t >= 6 ? "random partial" : "random full");
    end

    pipe_test();

    $display("mechanisms: crossing bits=%0d two-message nodes=%0d empty nodes=%0d packed bits=%0d rendezvous bits=%0d",
             n_cross, n_two, n_zero, n_pack_bits, n_rdv_bits);
    $display("pipeline: %0d batches delivered, up to %0d in flight", n_pipe_out, max_in_flight);
    checks += 7;
    if (n_pipe_out == 0)    begin failures++; $display("no batch left the pipeline"); end
    if (max_in_flight < 2)  begin failures++; $display("batches never overlapped in the pipeline"); end
    if (n_cross == 0)     begin failures++; $display("no dimension crossing happened"); end
    if (n_two == 0)       begin failures++; $display("no doubly loaded node was enumerated"); end
    if (n_zero == 0)      begin failures++; $display("no empty node was enumerated"); end
    if (n_pack_bits == 0) begin failures++; $display("no message was packed"); end
    if (n_rdv_bits == 0)  begin failures++; $display("no rendezvous transfer happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
