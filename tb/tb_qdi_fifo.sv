// tb_qdi_fifo: self-checking testbench of the theta-buffer FIFO.
//
// A four-phase dual-rail source sends random 4-bit tokens and a sink
// acknowledges them, each with its own delay per handshake phase. Three
// load settings are run: a slow source with a fast sink (token limited),
// balanced delays, and a fast source with a slow sink (bubble limited). The
// sink checks every token against a copy of what the source sent, checks
// that no received bit is ever (1,1), and the testbench counts how often the
// source had to wait for the FIFO (backpressure) and the sink for data.
// A last phase stalls the sink and checks that the FIFO holds STAGES/2
// tokens before it applies backpressure.
// A watchdog ends the run with a failure if the handshakes stop.
`timescale 1ns/1ps
module tb_qdi_fifo;
  import qdi_pkg::*;

  localparam int unsigned W = 4;
  localparam int unsigned STAGES = 4;
  localparam int unsigned N_TOK = 60;

  logic rst;
  dr_t [W-1:0] in, out;
  logic in_ack, out_ack;

  int checks = 0, failures = 0;
  int src_delay, snk_delay;
  logic [W-1:0] sent_q[$];
  int n_recv;
  int src_waits, snk_waits;

  qdi_fifo #(.WIDTH(W), .STAGES(STAGES)) dut (
    .rst(rst), .in(in), .in_ack(in_ack), .out(out), .out_ack(out_ack)
  );

  function automatic dr_t [W-1:0] enc(input logic [W-1:0] v);
    dr_t [W-1:0] r;
    for (int i = 0; i < W; i++) r[i] = dr_token(v[i]);
    return r;
  endfunction

  function automatic logic all_valid(input dr_t [W-1:0] d);
    for (int i = 0; i < W; i++) if (!dr_is_valid(d[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic all_spacer(input dr_t [W-1:0] d);
    for (int i = 0; i < W; i++) if (!dr_is_spacer(d[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [W-1:0] dec(input dr_t [W-1:0] d);
    logic [W-1:0] v;
    for (int i = 0; i < W; i++) v[i] = d[i].t;
    return v;
  endfunction

  // Coding check on every change of the output rails.
  always @(out) begin
    for (int i = 0; i < W; i++)
      if (dr_is_illegal(out[i]) && !rst) begin
        failures++;
        $display("FAIL: illegal code word on out[%0d] at %0t", i, $time);
      end
  end

  task automatic run_source(input int n);
    logic [W-1:0] v;
    for (int k = 0; k < n; k++) begin
      v = W'($urandom);
      #(src_delay);
      if (in_ack) src_waits++;
      wait (!in_ack);
      in = enc(v);
      sent_q.push_back(v);
      #(src_delay);
      if (!in_ack) src_waits++;
      wait (in_ack);
      in = '0;
    end
  endtask

  task automatic run_sink(input int n);
    logic [W-1:0] exp_v;
    for (int k = 0; k < n; k++) begin
      if (!all_valid(out)) snk_waits++;
      while (!all_valid(out)) @(out);
      #0.1;
      checks++;
      exp_v = sent_q.pop_front();
      if (dec(out) !== exp_v) begin
        failures++;
        $display("FAIL: token %0d got %h expected %h", n_recv, dec(out), exp_v);
      end
      n_recv++;
      #(snk_delay);
      out_ack = 1'b1;
      while (!all_spacer(out)) @(out);
      #(snk_delay);
      out_ack = 1'b0;
    end
  endtask

  // With the sink stalled, a pipeline of half buffers takes STAGES/2 tokens
  // (alternating with spacers) and then refuses the next one. Afterwards all
  // of them, and the refused one, must come out in order.
  task automatic check_capacity();
    int acc;
    logic [W-1:0] v;
    acc = 0;
    for (int k = 0; k <= STAGES/2; k++) begin
      v = W'($urandom);
      in = enc(v);
      sent_q.push_back(v);
      #20;
      if (!in_ack) break;
      acc++;
      in = '0;
      #20;
    end
    checks++;
    if (acc != STAGES/2 || in_ack) begin
      failures++;
      $display("FAIL: stalled FIFO took %0d tokens, expected %0d", acc, STAGES/2);
    end
    src_delay = 1; snk_delay = 1;
    fork
      begin
        wait (in_ack);
        #1 in = '0;
      end
      run_sink(acc + 1);
    join
  endtask

  task automatic run_phase(input int sd, input int kd, input string name);
    int sw0, kw0;
    src_delay = sd; snk_delay = kd;
    sw0 = src_waits; kw0 = snk_waits;
    fork
      run_source(N_TOK);
      run_sink(N_TOK);
    join
    $display("%s: source waits %0d, sink waits %0d", name, src_waits - sw0, snk_waits - kw0);
  endtask

  initial begin
    in = '0; out_ack = 1'b0; rst = 1'b1;
    n_recv = 0; src_waits = 0; snk_waits = 0;
    #5 rst = 1'b0;
    #5;
    checks++;
    if (in_ack !== 1'b0 || !all_spacer(out)) begin
      failures++; $display("FAIL: not empty after reset");
    end
    run_phase(10, 1, "token limited");
    run_phase(3, 3, "balanced");
    run_phase(1, 10, "bubble limited");
    check_capacity();
    checks++;
    if (sent_q.size() != 0) begin failures++; $display("FAIL: tokens lost"); end
    checks++;
    if (src_waits == 0) begin failures++; $display("FAIL: backpressure never seen"); end
    checks++;
    if (snk_waits == 0) begin failures++; $display("FAIL: sink never waited"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
