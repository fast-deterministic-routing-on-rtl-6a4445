// tb_hc_sequencer: checks the step order and step lengths of the routing controller.
//
// Runs the controller twice at K=6, P=8 and records, clock by clock, the phase and loop index.
// Expected, per loop index i = 0..K-1: exchange (M+2 clocks), enumerate two-message nodes
// (W+K+3), pack messages (2K+M+2), enumerate empty nodes (W+K+3), pack addresses (3K+2),
// rendezvous (K+M+2), then one PH_DONE clock with done_o. first_o must mark the first clock of
// every step, enum_start_o clock 1 of each enumeration, router_clr_o clock 0 of each packing.
module tb_hc_sequencer;
  import hc_pkg::*;
  localparam int unsigned K = 6;
  localparam int unsigned P = 8;
  localparam int unsigned M = K + P;
  localparam int unsigned W = K + 1;
  localparam int unsigned DW = $clog2(K + 1);

  logic clk = 1'b0, rst_n = 1'b0, start_i = 1'b0;
  phase_e phase_o;
  logic first_o, enum_start_o, router_clr_o, busy_o, done_o;
  logic [DW-1:0] iter_o;
  int checks = 0, failures = 0;

  hc_sequencer #(.K(K), .P(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_step(input phase_e ph, input int len, input int i);
    for (int c = 0; c < len; c++) begin
      checks++;
      if (phase_o != ph || iter_o != DW'(i) || first_o != (c == 0) || !busy_o || done_o ||
          enum_start_o != ((ph == PH_ENUM2 || ph == PH_ENUM0) && c == 1) ||
          router_clr_o != ((ph == PH_PACK3 || ph == PH_PACK5) && c == 0)) begin
        failures++;
        $display("i=%0d step %s clock %0d: phase=%s iter=%0d first=%0b es=%0b clr=%0b", i,
                 ph.name(), c, phase_o.name(), iter_o, first_o, enum_start_o, router_clr_o);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int run = 0; run < 2; run++) begin
      checks++;
      if (phase_o != PH_IDLE || busy_o) begin failures++; $display("not idle before start"); end
      start_i = 1'b1;
      @(negedge clk);
      start_i = 1'b0;
      for (int i = 0; i < int'(K); i++) begin
        expect_step(PH_XCHG,  M + 2, i);
        expect_step(PH_ENUM2, W + K + 3, i);
        expect_step(PH_PACK3, 2 * K + M + 2, i);
        expect_step(PH_ENUM0, W + K + 3, i);
        expect_step(PH_PACK5, 3 * K + 2, i);
        expect_step(PH_RDV,   K + M + 2, i);
      end
      checks++;
      if (phase_o != PH_DONE || !done_o) begin failures++; $display("no done pulse"); end
      @(negedge clk);
      checks++;
      if (phase_o != PH_IDLE || done_o) begin failures++; $display("did not return to idle"); end
      repeat (3) @(negedge clk);
      checks++;
      if (phase_o != PH_IDLE) begin failures++; $display("left idle without start"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
