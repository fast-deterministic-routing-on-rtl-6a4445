// tb_pack_router: checks the pipelined router on packings, and its reverse path.
//
// Each test picks a subcube level lo (subcubes = nodes agreeing in address bits 0..lo-1), a
// random set of senders in every subcube, and packs each subcube's senders, in address order,
// into its first positions (position p of the subcube containing c is node (p << lo) | c).
// All senders inject at once: relative address (K bits) then a random payload. Every receiver
// must get exactly its sender's payload, the first payload bit 2K clocks after the first
// injected bit, and nobody else may receive anything. Then every receiver sends a random frame
// backwards; it must arrive unchanged at its sender K clocks later, and nowhere else.
module tb_pack_router;
  import hc_pkg::*;
  localparam int unsigned K = 6;
  localparam int unsigned N = 1 << K;
  localparam int unsigned PL = 10;   // payload length used by the test

  logic clk = 1'b0, rst_n = 1'b0, clr_i = 1'b0;
  ser_t inj_i [N], dlv_o [N], rinj_i [N], rdlv_o [N];
  int checks = 0, failures = 0;

  pack_router #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic test(input int lo, input int density);
    int dst[N];            // destination of node n, -1 if not sending
    int src_of[N];
    logic [PL-1:0] pay [N], rpay [N], got [N];
    int cnt[N], first_t[N];
    int npos[N];
    int t;
    for (int n = 0; n < N; n++) begin
      src_of[n] = -1; npos[n] = 0; dst[n] = -1;
    end
    // build the packing, in address order within each subcube
    for (int n = 0; n < N; n++) begin
      int c;
      c = n & ((1 << lo) - 1);
      if (int'($urandom_range(99, 0)) < density) begin
        dst[n] = (npos[c] << lo) | c;
        npos[c]++;
        src_of[dst[n]] = n;
      end
      pay[n] = PL'($urandom);
      rpay[n] = PL'($urandom);
    end
    // clear recorded paths
    @(negedge clk);
    clr_i = 1'b1;
    @(negedge clk);
    clr_i = 1'b0;
    // forward pass
    for (int n = 0; n < N; n++) begin cnt[n] = 0; first_t[n] = -1; got[n] = '0; end
    for (t = 0; t < int'(K + PL + 2 * K + 3); t++) begin
      for (int n = 0; n < N; n++) begin
        if (dst[n] >= 0 && t < int'(K + PL)) begin
          logic [K+PL-1:0] fr;
          fr = {pay[n], K'(n ^ dst[n])};
          inj_i[n] = '{v: 1'b1, b: fr[t]};
        end else inj_i[n] = SER_IDLE;
      end
      @(posedge clk);
      #1;
      for (int n = 0; n < N; n++)
        if (dlv_o[n].v) begin
          if (first_t[n] < 0) first_t[n] = t + 1;
          if (cnt[n] < int'(PL)) got[n][cnt[n]] = dlv_o[n].b;
          cnt[n]++;
        end
      @(negedge clk);
    end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (src_of[n] < 0) begin
        if (cnt[n] != 0) begin failures++; $display("lo=%0d: node %0d received a stray frame", lo, n); end
      end else if (cnt[n] != int'(PL) || got[n] != pay[src_of[n]] || first_t[n] != int'(2 * K) + 1 - 1) begin
        failures++;
        $display("lo=%0d: node %0d got %0d bits %h at t=%0d, expected %h from %0d at t=%0d", lo, n,
                 cnt[n], got[n], first_t[n], pay[src_of[n]], src_of[n], 2 * K);
      end
    end
    // reverse pass
    for (int n = 0; n < N; n++) begin cnt[n] = 0; first_t[n] = -1; got[n] = '0; end
    for (t = 0; t < int'(PL + K + 3); t++) begin
      for (int n = 0; n < N; n++)
        rinj_i[n] = (src_of[n] >= 0 && t < int'(PL)) ? '{v: 1'b1, b: rpay[n][t]} : SER_IDLE;
      @(posedge clk);
      #1;
      for (int n = 0; n < N; n++)
        if (rdlv_o[n].v) begin
          if (first_t[n] < 0) first_t[n] = t + 1;
          if (cnt[n] < int'(PL)) got[n][cnt[n]] = rdlv_o[n].b;
          cnt[n]++;
        end
      @(negedge clk);
    end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (dst[n] < 0) begin
        if (cnt[n] != 0) begin failures++; $display("lo=%0d: node %0d got a stray reverse frame", lo, n); end
      end else if (cnt[n] != int'(PL) || got[n] != rpay[dst[n]] || first_t[n] != int'(K)) begin
        failures++;
        $display("lo=%0d: reverse to node %0d: %0d bits %h at t=%0d, expected %h at t=%0d", lo, n,
                 cnt[n], got[n], first_t[n], rpay[dst[n]], K);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin inj_i[n] = SER_IDLE; rinj_i[n] = SER_IDLE; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int lo = 0; lo < int'(K); lo++)
      for (int r = 0; r < 6; r++) test(lo, r == 0 ? 100 : int'($urandom_range(90, 10)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
