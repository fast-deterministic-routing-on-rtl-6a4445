// tb_switch_cell: checks one router level in isolation.
//
// Sends frames of random length and content. The first bit of each frame must be consumed;
// the remaining bits must appear one clock later on crs_o when that first bit was 1, on stay_o
// when it was 0, with nothing on the other output. After each frame a random reverse stream is
// presented on both reverse inputs; rout_o must repeat, one clock later, the input on the side
// the forward frame took. After clr_i the cell must forward nothing backwards.
module tb_switch_cell;
  import hc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr_i = 1'b0;
  ser_t in_i = SER_IDLE, stay_o, crs_o, rin_stay_i = SER_IDLE, rin_crs_i = SER_IDLE, rout_o;
  int checks = 0, failures = 0;

  switch_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 300; f++) begin
      int len;
      logic [31:0] bits;
      logic dir;
      len = int'($urandom_range(12, 1));
      bits = $urandom;
      dir = bits[0];
      // forward frame
      for (int b = 0; b <= len; b++) begin
        if (b < len) in_i = '{v: 1'b1, b: bits[b]};
        else         in_i = SER_IDLE;
        @(negedge clk);
        // output now shows input bit b (registered one clock)
        checks++;
        if (b == len) begin
          if (stay_o.v || crs_o.v) begin
            failures++;
            $display("frame %0d: output after the frame ended", f);
          end
        end else if (b >= 1) begin
          ser_t exp_on, other;
          exp_on = dir ? crs_o : stay_o;
          other  = dir ? stay_o : crs_o;
          if (!exp_on.v || exp_on.b != bits[b] || other.v) begin
            failures++;
            $display("frame %0d bit %0d: stay=%p crs=%p dir=%0b", f, b, stay_o, crs_o, dir);
          end
        end else if (stay_o.v || crs_o.v) begin
          failures++;
          $display("frame %0d: header bit was not consumed", f);
        end
      end
      // reverse traffic
      for (int b = 0; b < 8; b++) begin
        logic rs, rc;
        rs = 1'($urandom); rc = 1'($urandom);
        rin_stay_i = '{v: 1'b1, b: rs};
        rin_crs_i  = '{v: 1'b1, b: rc};
        @(negedge clk);
        checks++;
        if (!rout_o.v || rout_o.b != (dir ? rc : rs)) begin
          failures++;
          $display("frame %0d reverse bit %0d wrong", f, b);
        end
      end
      rin_stay_i = SER_IDLE; rin_crs_i = SER_IDLE;
      if (f % 5 == 4) begin
        clr_i = 1'b1;
        @(negedge clk);
        clr_i = 1'b0;
        rin_stay_i = '{v: 1'b1, b: 1'b1};
        rin_crs_i  = '{v: 1'b1, b: 1'b1};
        @(negedge clk);
        @(negedge clk);
        checks++;
        if (rout_o.v) begin
          failures++;
          $display("reverse path survived clr_i");
        end
        rin_stay_i = SER_IDLE; rin_crs_i = SER_IDLE;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
