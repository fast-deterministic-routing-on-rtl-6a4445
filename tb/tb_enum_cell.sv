// tb_enum_cell: checks one butterfly vertex against the enumeration recursion.
//
// For random t, o and partner t values (8-bit, serial, LSB first) and every combination of
// rank enable and upper/lower position, the collected outputs must be
//   t' = t + tp (enabled) or t,   o' = o + tp (enabled and upper) or o,
// modulo 2^8, each word emerging one clock after its input.
module tb_enum_cell;
  localparam int WL = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en_i, upper_i, v_i, first_i, t_i, o_i, tp_i;
  logic v_o, first_o, t_o, o_o;
  int checks = 0, failures = 0;

  enum_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WL-1:0] t, o, tp, et, eo, gt, go;
    en_i = 0; upper_i = 0; v_i = 0; first_i = 0; t_i = 0; o_i = 0; tp_i = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      t = WL'($urandom); o = WL'($urandom); tp = WL'($urandom);
      en_i = k[0]; upper_i = k[1];
      et = en_i ? WL'(t + tp) : t;
      eo = (en_i && upper_i) ? WL'(o + tp) : o;
      for (int b = 0; b < WL; b++) begin
        v_i = 1; first_i = (b == 0); t_i = t[b]; o_i = o[b]; tp_i = tp[b];
        @(negedge clk);
        if (!v_o || first_o != (b == 0)) begin
          failures++;
          $display("output framing wrong at bit %0d", b);
        end
        gt[b] = t_o; go[b] = o_o;
      end
      checks += 2;
      if (gt != et) begin failures++; $display("t: got %h expected %h", gt, et); end
      if (go != eo) begin failures++; $display("o: got %h expected %h", go, eo); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
