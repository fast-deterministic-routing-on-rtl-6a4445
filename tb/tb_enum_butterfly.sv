// tb_enum_butterfly: checks the pipelined enumeration against a direct count.
//
// For random flag sets and every subcube level lo_dim = 0..K (plus all-flags and no-flags
// cases), node n must receive offset = number of flagged nodes m < n with the same address
// bits 0..lo_dim-1, and total = number of flagged nodes with those bits. done_o must pulse
// exactly W+K+1 clocks after start_i. Enumerations are started back to back with one idle
// clock between them.
module tb_enum_butterfly;
  localparam int unsigned K = 6;
  localparam int unsigned N = 1 << K;
  localparam int unsigned W = K + 1;
  localparam int unsigned DW = $clog2(K + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_i = 1'b0;
  logic [DW-1:0] lo_dim_i = '0;
  logic [N-1:0] s_i = '0;
  logic [W-1:0] offset_o [N];
  logic [W-1:0] total_o [N];
  logic done_o;
  int checks = 0, failures = 0;

  enum_butterfly #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [N-1:0] s, input int lo);
    int cyc;
    logic [N-1:0] mask;
    @(negedge clk);
    s_i = s; lo_dim_i = DW'(lo); start_i = 1'b1;
    @(negedge clk);
    start_i = 1'b0; s_i = $urandom;   // s_i is only sampled with start_i
    cyc = 1;
    while (!done_o && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != int'(W + K + 1)) begin
      failures++;
      $display("done after %0d clocks, expected %0d", cyc, W + K + 1);
    end
    mask = N'((1 << lo) - 1);
    for (int n = 0; n < N; n++) begin
      int eo = 0, et = 0;
      for (int m = 0; m < N; m++)
        if (s[m] && ((m & mask) == (n & mask))) begin
          et++;
          if (m < n) eo++;
        end
      checks += 2;
      if (offset_o[n] != W'(eo) || total_o[n] != W'(et)) begin
        failures += 1 + int'(offset_o[n] != W'(eo) && total_o[n] != W'(et));
        $display("lo=%0d node %0d: offset %0d total %0d, expected %0d %0d", lo, n,
                 offset_o[n], total_o[n], eo, et);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int lo = 0; lo <= int'(K); lo++) begin
      one('1, lo);
      one('0, lo);
      for (int r = 0; r < 6; r++) one({$urandom, $urandom}, lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
