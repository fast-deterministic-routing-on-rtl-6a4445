// tb_hc_node: drives one node (K=3, P=4, address 5) through the steps of the routing loop by
// hand, playing the controller, the neighbours, the enumeration and the router.
//
// Scenarios: (A) the node's message must cross dimension 0 and leaves on the exchange wire
// while a message arrives, which becomes the node's own; (B) at i=1 the node keeps its message
// and receives a second one, so it flags itself doubly loaded, packs the second message to
// the subcube position given by the enumeration (checked frame: relative address, then the
// message), receives a packed message and a partner address, and sends the packed message
// back on the reverse port; (C) an empty node flags itself empty, packs its own address and
// takes the message coming back on the reverse port; (D) a second frame arriving in step 1
// into an occupied register raises err_o; (E) the final check flags a message that is not at
// its destination. Every emitted frame is compared bit for bit with the expected one.
module tb_hc_node;
  import hc_pkg::*;
  localparam int unsigned K = 3;
  localparam int unsigned P = 4;
  localparam int unsigned M = K + P;
  localparam int unsigned W = K + 1;
  localparam int unsigned DW = $clog2(K + 1);
  localparam int unsigned ID = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  phase_e phase_i = PH_IDLE;
  logic first_i = 1'b0;
  logic [DW-1:0] iter_i = '0;
  logic load_i = 1'b0, load_v_i = 1'b0;
  logic [M-1:0] load_msg_i = '0;
  logic hold_v_o;
  logic [M-1:0] hold_msg_o;
  ser_t xout_o, xin_i = SER_IDLE, inj_o, dlv_i = SER_IDLE, rinj_o, rdlv_i = SER_IDLE;
  logic s_o, enum_done_i = 1'b0, err_o;
  logic [W-1:0] enum_offset_i = '0;
  int checks = 0, failures = 0;

  hc_node #(.K(K), .P(P), .ID(ID)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame monitors on the three serial outputs: port 0 xout, 1 inj, 2 rinj
  logic [31:0] fr  [3];
  int          len [3];
  always @(posedge clk) begin
    if (xout_o.v) begin fr[0][len[0]] <= xout_o.b; len[0] <= len[0] + 1; end
    if (inj_o.v)  begin fr[1][len[1]] <= inj_o.b;  len[1] <= len[1] + 1; end
    if (rinj_o.v) begin fr[2][len[2]] <= rinj_o.b; len[2] <= len[2] + 1; end
  end

  task automatic clear_mon();
    for (int p = 0; p < 3; p++) begin len[p] = 0; fr[p] = '0; end
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_frame(input int p, input logic [31:0] val, input int n, input string what);
    logic [31:0] mask;
    mask = (32'd1 << n) - 1;
    check(len[p] == n && (fr[p] & mask) == (val & mask), what);
    if (!(len[p] == n && (fr[p] & mask) == (val & mask)))
      $display("      port %0d: %0d bits %h, expected %0d bits %h", p, len[p], fr[p], n, val);
  endtask

  // step with optional incoming frame on port sel (0 xin, 1 dlv, 2 rdlv) starting at clock 2
  task automatic step(input phase_e ph, input int clocks, input int sel, input logic [31:0] val,
                      input int n);
    @(negedge clk);
    clear_mon();
    phase_i = ph; first_i = 1'b1;
    for (int c = 0; c < clocks; c++) begin
      ser_t s;
      s = (c >= 2 && c < 2 + n) ? '{v: 1'b1, b: val[c-2]} : SER_IDLE;
      xin_i  = (sel == 0) ? s : SER_IDLE;
      dlv_i  = (sel == 1) ? s : SER_IDLE;
      rdlv_i = (sel == 2) ? s : SER_IDLE;
      @(negedge clk);
      first_i = 1'b0;
    end
  endtask

  task automatic enum_step(input phase_e ph, input logic exp_s, input int offset);
    @(negedge clk);
    phase_i = ph; first_i = 1'b1;
    @(negedge clk);
    first_i = 1'b0;
    check(s_o == exp_s, $sformatf("%s flag", ph.name()));
    enum_offset_i = W'(offset); enum_done_i = 1'b1;
    @(negedge clk);
    enum_done_i = 1'b0; enum_offset_i = '0;
  endtask

  task automatic load(input logic v, input logic [M-1:0] m);
    @(negedge clk);
    phase_i = PH_IDLE; load_i = 1'b1; load_v_i = v; load_msg_i = m;
    @(negedge clk);
    load_i = 1'b0;
  endtask

  localparam int LONG = 2 * M + 6;
  logic [M-1:0] msg_a, msg_x, msg_y, msg_z;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- (A) i = 0: message to node 4 crosses dimension 0; message from 4 arrives
    msg_a = {4'hA, 3'd4};
    msg_x = {4'h3, 3'd1};
    iter_i = 0;
    load(1'b1, msg_a);
    step(PH_XCHG, LONG, 0, 32'(msg_x), M);
    expect_frame(0, 32'(msg_a), M, "A: leaving message on the dimension-0 wire");
    enum_step(PH_ENUM2, 1'b0, 0);
    check(hold_v_o && hold_msg_o == msg_x, "A: arrived message becomes the node's own");
    enum_step(PH_ENUM0, 1'b0, 0);
    check(!err_o, "A: no error");

    // ---- (B) i = 1: keep own message (dest 1, bit 1 equal), receive a second one
    msg_a = {4'h6, 3'd1};
    msg_x = {4'h9, 3'd3};
    msg_y = {4'h5, 3'd7};
    iter_i = 1;
    load(1'b1, msg_a);
    step(PH_XCHG, LONG, 0, 32'(msg_x), M);
    check(len[0] == 0, "B: own message stays");
    enum_step(PH_ENUM2, 1'b1, 0);
    // position 0 of the subcube {1,5}: node 1, relative address 5^1 = 4
    step(PH_PACK3, LONG, 1, 32'(msg_y), M);
    expect_frame(1, 32'({msg_x, 3'd4}), K + M, "B: packed frame = relative address, message");
    enum_step(PH_ENUM0, 1'b0, 0);
    step(PH_PACK5, LONG, 1, 32'd1, K);
    check(len[1] == 0, "B: a loaded node does not pack its address");
    step(PH_RDV, LONG, 3, 0, 0);
    expect_frame(2, 32'(msg_y), M, "B: packed message goes back on the reverse port");
    check(hold_v_o && hold_msg_o == msg_a, "B: node keeps its own message");
    check(!err_o, "B: no error");

    // ---- (C) i = 1: empty node, enumeration rank 1 -> position 1 of {1,5} = node 5 itself
    msg_z = {4'hC, 3'd2};
    load(1'b0, '0);
    step(PH_XCHG, LONG, 3, 0, 0);
    enum_step(PH_ENUM2, 1'b0, 0);
    step(PH_PACK3, LONG, 3, 0, 0);
    enum_step(PH_ENUM0, 1'b1, 1);
    step(PH_PACK5, LONG, 1, 32'(ID), K);
    expect_frame(1, 32'({3'(ID), 3'd0}), 2 * K, "C: empty node packs its own address");
    step(PH_RDV, LONG, 2, 32'(msg_z), M);
    check(len[2] == 0, "C: nothing sent back without a packed message");
    check(hold_v_o && hold_msg_o == msg_z, "C: message from the reverse port is kept");
    check(!err_o, "C: no error");

    // ---- (D) two arrivals in one exchange
    load(1'b1, {4'h1, 3'd5});
    @(negedge clk);
    phase_i = PH_XCHG; first_i = 1'b1;
    @(negedge clk);
    first_i = 1'b0;
    for (int f = 0; f < 2; f++) begin
      for (int b = 0; b < int'(M); b++) begin xin_i = '{v: 1'b1, b: 1'b1}; @(negedge clk); end
      xin_i = SER_IDLE;
      @(negedge clk);
    end
    check(err_o, "D: second arrival into a full register is flagged");

    // ---- (E) final placement check
    load(1'b1, {4'h2, 3'(ID)});
    @(negedge clk); phase_i = PH_DONE; @(negedge clk); @(negedge clk);
    check(!err_o, "E: message at its destination accepted");
    load(1'b1, {4'h2, 3'd6});
    @(negedge clk); phase_i = PH_DONE; @(negedge clk); @(negedge clk);
    check(err_o, "E: misplaced message flagged");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
