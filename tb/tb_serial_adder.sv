// tb_serial_adder: checks the bit-serial adder against integer addition.
//
// Streams random pairs of 12-bit words through the adder, least significant bit first, back
// to back (the first bit of each word flagged), collects the registered sum bits one clock
// later and compares each collected word with (a + b) mod 2^12. Also checks the one-clock
// latency by requiring the sum's first bit to appear exactly one clock after the operands'.
module tb_serial_adder;
  localparam int WL = 12;
  localparam int NW = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic v_i = 1'b0, first_i = 1'b0, a_i = 1'b0, b_i = 1'b0;
  logic v_o, first_o, s_o;
  int checks = 0, failures = 0;

  serial_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NW * WL + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WL-1:0] av [NW], bv [NW];
  logic [WL-1:0] got;
  int widx = 0, bitn = 0;

  // collector: sample outputs each clock
  always @(negedge clk) begin
    if (rst_n && v_o) begin
      if (first_o) bitn = 0;
      got[bitn] = s_o;
      bitn++;
      if (bitn == WL) begin
        checks++;
        if (got != WL'(av[widx] + bv[widx])) begin
          failures++;
          $display("word %0d: %h + %h gave %h", widx, av[widx], bv[widx], got);
        end
        widx++;
      end
    end
  end

  initial begin
    for (int w = 0; w < NW; w++) begin
      av[w] = WL'($urandom);
      bv[w] = WL'($urandom);
    end
    av[0] = '1; bv[0] = 12'h001;   // carry through every bit
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      for (int b = 0; b < WL; b++) begin
        v_i = 1'b1; first_i = (b == 0); a_i = av[w][b]; b_i = bv[w][b];
        @(negedge clk);
        if (b == 0) begin
          checks++;
          if (!(v_o && first_o)) begin
            failures++;
            $display("first sum bit of word %0d not one clock after its operands", w);
          end
        end
      end
      if (w % 7 == 3) begin   // occasional idle gap
        v_i = 1'b0; first_i = 1'b0;
        @(negedge clk);
      end
    end
    v_i = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (widx != NW) begin
      failures++;
      $display("collected %0d words, expected %0d", widx, NW);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
