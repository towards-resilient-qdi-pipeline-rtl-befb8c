// tb_qdi_multiplier: self-checking testbench of the pipelined dual-rail
// multiplier.
//
// A four-phase source sends all 256 operand pairs (in random order) and a
// sink acknowledges the 8-bit products, each with its own per-phase delay.
// Three load settings are run: slow source / fast sink (token limited),
// balanced, and fast source / slow sink (bubble limited). Every product is
// compared with a * b computed here, no product bit may ever be (1,1), and
// the run must show source backpressure and a sink waiting for data.
`timescale 1ns/1ps
module tb_qdi_multiplier;
  import qdi_pkg::*;
  localparam int unsigned W = 4;
  localparam int unsigned N_OP = 256;

  logic rst, in_ack, out_ack;
  dr_t [W-1:0] a, b;
  dr_t [2*W-1:0] p;
  int checks = 0, failures = 0;
  int src_delay, snk_delay;
  logic [2*W-1:0] exp_q[$];
  int src_waits = 0, snk_waits = 0;
  logic [7:0] ops[N_OP];

  qdi_multiplier #(.W(W)) dut (.rst(rst), .a(a), .b(b), .in_ack(in_ack), .p(p), .out_ack(out_ack));

  function automatic dr_t [W-1:0] enc(input logic [W-1:0] v);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_token(v[i]);
    return r;
  endfunction

  function automatic logic p_valid(input dr_t [2*W-1:0] d);
    for (int i = 0; i < 2*W; i++) if (!dr_is_valid(d[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic p_spacer(input dr_t [2*W-1:0] d);
    for (int i = 0; i < 2*W; i++) if (!dr_is_spacer(d[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [2*W-1:0] dec(input dr_t [2*W-1:0] d);
    logic [2*W-1:0] v;
    for (int i = 0; i < 2*W; i++) v[i] = d[i].t;
    return v;
  endfunction

  always @(p) begin
    for (int i = 0; i < 2*W; i++)
      if (!rst && dr_is_illegal(p[i])) begin
        failures++; $display("FAIL: illegal code word on p[%0d]", i);
      end
  end

  task automatic run_source(input int first, input int n);
    logic [W-1:0] x, y;
    for (int k = first; k < first + n; k++) begin
      x = ops[k][3:0]; y = ops[k][7:4];
      #(src_delay);
      if (in_ack) src_waits++;
      wait (!in_ack);
      a = enc(x); b = enc(y);
      exp_q.push_back(8'(x * y));
      #(src_delay);
      if (!in_ack) src_waits++;
      wait (in_ack);
      a = '0; b = '0;
    end
  endtask

  task automatic run_sink(input int n);
    logic [2*W-1:0] e;
    for (int k = 0; k < n; k++) begin
      if (!p_valid(p)) snk_waits++;
      while (!p_valid(p)) @(p);
      #0.1;
      checks++;
      e = exp_q.pop_front();
      if (dec(p) !== e) begin
        failures++; $display("FAIL: product %0d expected %0d", dec(p), e);
      end
      #(snk_delay);
      out_ack = 1'b1;
      while (!p_spacer(p)) @(p);
      #(snk_delay);
      out_ack = 1'b0;
    end
  endtask

  initial begin
    int part;
    for (int i = 0; i < N_OP; i++) ops[i] = 8'(i);
    ops.shuffle();
    rst = 1'b1; a = '0; b = '0; out_ack = 1'b0;
    #5 rst = 1'b0;
    #5;
    checks++;
    if (in_ack !== 1'b0 || !p_spacer(p)) begin failures++; $display("FAIL: reset"); end
    part = N_OP / 4;
    src_delay = 10; snk_delay = 1;
    fork run_source(0, part); run_sink(part); join
    src_delay = 3; snk_delay = 3;
    fork run_source(part, part); run_sink(part); join
    src_delay = 1; snk_delay = 10;
    fork run_source(2*part, 2*part); run_sink(2*part); join
    $display("source waits %0d, sink waits %0d", src_waits, snk_waits);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: products lost"); end
    checks++;
    if (src_waits == 0 || snk_waits == 0) begin failures++; $display("FAIL: load modes not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
