// tb_qdi_resilient_top: end-to-end and transient-fault testbench of both
// target circuits at their default sizes.
//
// The testbench plays the environment of a fault-injection experiment: a
// dual-rail source and sink per circuit, with programmable per-phase delays,
// run as small state machines on a 1 ns polling tick, and a monitor per
// output that compares every token with the golden value (FIFO: the token
// sent; multiplier: a * b) and classifies deviations as
//   value error   a valid token with a wrong value,
//   coding error  both rails of an output bit high,
//   glitch        an output token that changes before the sink acknowledged
//                 it, or an input acknowledge that moves when the source has
//                 not offered the matching token or spacer,
//   deadlock      the run does not complete in time.
// Part 1 runs both circuits together without faults in token-limited
// (slow source), balanced and bubble-limited (slow sink) settings; every
// deviation is a failure, and backpressure and sink waiting must occur.
// Part 2 injects one transient per run (a state flip of an internal
// C-element or latch, or a short inversion of an enable or of a NOR arming
// output) at a random place and
// time, with input and output rails excluded, and resets between runs. A
// coding error at an output is a failure, since the interlocked buffers must
// never pass an illegal code word; the other classes are counted and
// printed. Each mechanism (backpressure, sink waiting, an illegal (1,1)
// pair blocked at a buffer input, a transient turned into a value error,
// and a fault that is masked) must occur at least once. Hits on a buffer's
// NOR arming output or input-interlock latch must never give a value error.
`timescale 1ns/1ps
module tb_qdi_resilient_top;
  import qdi_pkg::*;

  localparam int unsigned W = qdi_pkg::DATA_W;
  localparam int unsigned FS = 4;           // FIFO stages (top default)
  localparam int unsigned N_RUNS = 200;     // fault-injection runs per load setting
  localparam int unsigned W2 = 2*W;

  logic rst;
  dr_t [W-1:0]   fifo_in, fifo_out, mul_a, mul_b;
  dr_t [2*W-1:0] mul_p;
  logic fifo_in_ack, fifo_out_ack, mul_in_ack, mul_out_ack;

  qdi_resilient_top dut (
    .rst(rst),
    .fifo_in(fifo_in), .fifo_in_ack(fifo_in_ack), .fifo_out(fifo_out), .fifo_out_ack(fifo_out_ack),
    .mul_a(mul_a), .mul_b(mul_b), .mul_in_ack(mul_in_ack), .mul_p(mul_p), .mul_out_ack(mul_out_ack)
  );

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- helpers
  function automatic dr_t [2*W-1:0] enc(input logic [2*W-1:0] v);
    dr_t [2*W-1:0] r;
    for (int i = 0; i < 2*W; i++) r[i] = dr_token(v[i]);
    return r;
  endfunction

  function automatic logic [2*W-1:0] dec(input dr_t [2*W-1:0] d);
    logic [2*W-1:0] v;
    for (int i = 0; i < 2*W; i++) v[i] = d[i].t;
    return v;
  endfunction

  // n = number of bits that are checked
  function automatic logic all_valid(input dr_t [2*W-1:0] d, input int n);
    for (int i = 0; i < n; i++) if (!dr_is_valid(d[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic all_spacer(input dr_t [2*W-1:0] d, input int n);
    for (int i = 0; i < n; i++) if (!dr_is_spacer(d[i])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic any_illegal(input dr_t [2*W-1:0] d, input int n);
    for (int i = 0; i < n; i++) if (dr_is_illegal(d[i])) return 1'b1;
    return 1'b0;
  endfunction

  // ------------------------------------------------ environment per circuit
  // Index 0: FIFO, index 1: multiplier.
  logic tick = 1'b0;
  always #0.5 tick = ~tick;

  int  n_tok;                    // tokens per run and circuit
  int  src_delay, snk_delay;     // per-phase delays in ticks
  logic run_en [2];
  int  src_st [2], src_cnt [2], sent [2];
  int  snk_st [2], snk_cnt [2], recvd [2];
  logic [2*W-1:0] exp_q0[$], exp_q1[$];
  dr_t [2*W-1:0] held [2];

  // per-run observations
  int value_err [2], coding_err [2], glitch [2];
  // totals over the whole test
  int src_waits = 0, snk_waits = 0;

  dr_t [2*W-1:0] in_bus [2];
  dr_t [2*W-1:0] out_bus [2];
  logic in_ack [2];
  logic out_ack_r [2];
  int  out_bits [2];

  assign fifo_in      = in_bus[0][W-1:0];
  assign mul_a        = in_bus[1][W-1:0];
  assign mul_b        = in_bus[1][2*W-1:W];
  assign in_ack[0]    = fifo_in_ack;
  assign in_ack[1]    = mul_in_ack;
  assign out_bus[0]   = {{W{DR_SPACER}}, fifo_out};
  assign out_bus[1]   = mul_p;
  assign fifo_out_ack = out_ack_r[0];
  assign mul_out_ack  = out_ack_r[1];
  initial begin out_bits[0] = W; out_bits[1] = 2*W; end

  for (genvar c = 0; c < 2; c++) begin : g_env
    // source
    always @(posedge tick) begin
      if (rst || !run_en[c]) begin
        src_st[c] = 0; src_cnt[c] = 0; in_bus[c] = '0;
      end else begin
        src_cnt[c]++;
        if (src_st[c] == 0) begin
          if (sent[c] < n_tok && src_cnt[c] >= src_delay) begin
            if (in_ack[c]) src_waits++;
            else begin
              logic [2*W-1:0] v;
              v = W2'($urandom);
              if (c == 0) begin v[2*W-1:W] = '0; exp_q0.push_back(v); end
              else exp_q1.push_back(W2'(v[W-1:0] * v[2*W-1:W]));
              sent[c]++;
              src_st[c] = 1; src_cnt[c] = 0;
              in_bus[c] = enc(v);
            end
          end
        end else if (in_ack[c] && src_cnt[c] >= src_delay) begin
          src_st[c] = 0; src_cnt[c] = 0;
          in_bus[c] = '0;
        end
      end
    end

    // acknowledge must only move in answer to the source
    always @(in_ack[c]) begin
      if (!rst && run_en[c]) begin
        if (in_ack[c] && src_st[c] != 1) glitch[c]++;
        if (!in_ack[c] && src_st[c] != 0) glitch[c]++;
      end
    end

    // sink and monitor
    always @(posedge tick) begin
      if (rst || !run_en[c]) begin
        snk_st[c] = 0; snk_cnt[c] = 0; out_ack_r[c] = 1'b0;
      end else begin
        snk_cnt[c]++;
        case (snk_st[c])
          0: if (all_valid(out_bus[c], out_bits[c])) begin
               logic [2*W-1:0] e;
               held[c] = out_bus[c];
               e = (c == 0) ? exp_q0.pop_front() : exp_q1.pop_front();
               if (dec(out_bus[c]) != e) value_err[c]++;
               recvd[c]++;
               snk_st[c] = 1; snk_cnt[c] = 0;
             end else if (snk_cnt[c] == 1) snk_waits++;
          1: begin
               if (out_bus[c] != held[c]) glitch[c]++;
               if (snk_cnt[c] >= snk_delay) begin
                 out_ack_r[c] = 1'b1; snk_st[c] = 2; snk_cnt[c] = 0;
               end
             end
          default: if (all_spacer(out_bus[c], out_bits[c]) && snk_cnt[c] >= snk_delay) begin
               out_ack_r[c] = 1'b0; snk_st[c] = 0; snk_cnt[c] = 0;
             end
        endcase
      end
    end

    always @(out_bus[c]) if (!rst && run_en[c] && any_illegal(out_bus[c], out_bits[c])) coding_err[c]++;
  end

  // Illegal (1,1) pairs seen at the inputs of internal FIFO stages; the
  // input interlock of the receiving stage has to block the late rail.
  int n_ilock = 0;
  for (genvar s = 1; s < FS; s++) begin : g_ilock_mon
    always @(dut.u_fifo.data[s]) if (!rst && any_illegal({{W{DR_SPACER}}, dut.u_fifo.data[s]}, W)) n_ilock++;
  end

  // ------------------------------------------------------- fault injection
  // Targets: 0 .. 2*W*(FS-1)-1   output C-elements of FIFO stages 0..FS-2
  //          next FS             enables of the FIFO stages
  //          next 2*3*W          output C-elements of multiplier stage 1
  //          next 4*W            DIMS minterms of partial product 1
  //          next 2*W*(FS-1)     NOR arming outputs of FIFO stages 0..FS-2
  //          next 2*W*(FS-1)     input-interlock latch states, same stages
  localparam int T_FIFO_C = 2*W*(FS-1);
  localparam int T_FIFO_E = FS;
  localparam int T_MUL_C  = 2*3*W;
  localparam int T_MUL_M  = 4*W;
  localparam int T_FIFO_N = 2*W*(FS-1);   // NOR arming outputs (int_in)
  localparam int T_FIFO_L = 2*W*(FS-1);   // input-interlock latch states
  localparam int B_N = T_FIFO_C + T_FIFO_E + T_MUL_C + T_MUL_M;
  localparam int B_L = B_N + T_FIFO_N;
  localparam int N_TGT = B_L + T_FIFO_L;

  // target class: 0 output C-element, 1 enable, 2 DIMS minterm,
  // 3 NOR arming output, 4 input-interlock latch
  function automatic int tgt_class(input int t);
    if (t < T_FIFO_C) return 0;
    if (t < T_FIFO_C + T_FIFO_E) return 1;
    if (t < T_FIFO_C + T_FIFO_E + T_MUL_C) return 0;
    if (t < B_N) return 2;
    if (t < B_L) return 3;
    return 4;
  endfunction

  function automatic int tgt_circuit(input int t);
    if (t < T_FIFO_C + T_FIFO_E || t >= B_N) return 0;
    return 1;
  endfunction
  localparam realtime PULSE = 0.2;

  int inj_sel;
  int inj_go = 0;

  for (genvar s = 0; s < FS - 1; s++) begin : g_fc
    for (genvar i = 0; i < W; i++) begin : g_b
      logic fv;
      always @(inj_go) begin
        if (inj_sel == 2*(s*W + i)) begin
          fv = ~dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_c_t.out;
          force dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_c_t.out = fv;
          #PULSE release dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_c_t.out;
        end
        if (inj_sel == 2*(s*W + i) + 1) begin
          fv = ~dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_c_f.out;
          force dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_c_f.out = fv;
          #PULSE release dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_c_f.out;
        end
      end
    end
  end
  for (genvar s = 0; s < FS - 1; s++) begin : g_fn
    for (genvar i = 0; i < W; i++) begin : g_b
      logic fv;
      always @(inj_go) begin
        if (inj_sel == B_N + 2*(s*W + i)) begin
          fv = ~dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.int_in_t;
          force dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.int_in_t = fv;
          #PULSE release dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.int_in_t;
        end
        if (inj_sel == B_N + 2*(s*W + i) + 1) begin
          fv = ~dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.int_in_f;
          force dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.int_in_f = fv;
          #PULSE release dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.int_in_f;
        end
        if (inj_sel == B_L + 2*(s*W + i)) begin
          fv = ~dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_ilock.own_t;
          force dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_ilock.own_t = fv;
          #PULSE release dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_ilock.own_t;
        end
        if (inj_sel == B_L + 2*(s*W + i) + 1) begin
          fv = ~dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_ilock.own_f;
          force dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_ilock.own_f = fv;
          #PULSE release dut.u_fifo.g_stage[s].u_reg.g_bit[i].u_bit.u_ilock.own_f;
        end
      end
    end
  end
  for (genvar s = 0; s < FS; s++) begin : g_fe
    logic fv;
    always @(inj_go) begin
      if (inj_sel == T_FIFO_C + s) begin
        fv = ~dut.u_fifo.g_stage[s].u_reg.en;
          force dut.u_fifo.g_stage[s].u_reg.en = fv;
        #PULSE release dut.u_fifo.g_stage[s].u_reg.en;
      end
    end
  end
  for (genvar i = 0; i < 3*W; i++) begin : g_mc
    logic fv;
    always @(inj_go) begin
      if (inj_sel == T_FIFO_C + T_FIFO_E + 2*i) begin
        fv = ~dut.u_mul.g_step[0].g_mid.u_stage.g_bit[i].u_bit.u_c_t.out;
          force dut.u_mul.g_step[0].g_mid.u_stage.g_bit[i].u_bit.u_c_t.out = fv;
        #PULSE release dut.u_mul.g_step[0].g_mid.u_stage.g_bit[i].u_bit.u_c_t.out;
      end
      if (inj_sel == T_FIFO_C + T_FIFO_E + 2*i + 1) begin
        fv = ~dut.u_mul.g_step[0].g_mid.u_stage.g_bit[i].u_bit.u_c_f.out;
          force dut.u_mul.g_step[0].g_mid.u_stage.g_bit[i].u_bit.u_c_f.out = fv;
        #PULSE release dut.u_mul.g_step[0].g_mid.u_stage.g_bit[i].u_bit.u_c_f.out;
      end
    end
  end
  for (genvar i = 0; i < W; i++) begin : g_mm
    for (genvar m = 0; m < 4; m++) begin : g_m
      logic fv;
      always @(inj_go) begin
        if (inj_sel == T_FIFO_C + T_FIFO_E + T_MUL_C + 4*i + m) begin
          fv = ~dut.u_mul.g_step[1].g_and[i].u_and.g_min[m].u_c.out;
          force dut.u_mul.g_step[1].g_and[i].u_and.g_min[m].u_c.out = fv;
          #PULSE release dut.u_mul.g_step[1].g_and[i].u_and.g_min[m].u_c.out;
        end
      end
    end
  end

  // ------------------------------------------------------------- run control
  task automatic start_run(input int ntok, input int sd, input int kd);
    rst = 1'b1;
    run_en[0] = 1'b0; run_en[1] = 1'b0;
    exp_q0.delete(); exp_q1.delete();
    for (int c = 0; c < 2; c++) begin
      sent[c] = 0; recvd[c] = 0; value_err[c] = 0; coding_err[c] = 0; glitch[c] = 0;
    end
    n_tok = ntok; src_delay = sd; snk_delay = kd;
    #3 rst = 1'b0;
    #2 run_en[0] = 1'b1; run_en[1] = 1'b1;
  endtask

  // Waits until both circuits have delivered all tokens or the limit passes;
  // returns a bit per circuit that completed.
  task automatic wait_done(input int limit, output logic [1:0] ok);
    for (int t = 0; t < limit; t++) begin
      #1;
      if (recvd[0] == n_tok && recvd[1] == n_tok) break;
    end
    #(4*snk_delay + 4);
    ok[0] = (recvd[0] == n_tok);
    ok[1] = (recvd[1] == n_tok);
  endtask

  int n_value = 0, n_coding = 0, n_glitch = 0, n_dead = 0, n_masked = 0, n_le_glitch = 0;
  localparam int N_LOAD = 6;
  int ld_src[N_LOAD] = '{10, 8, 6, 4, 3, 2};
  int ld_snk[N_LOAD] = '{1, 2, 3, 4, 6, 8};
  int st_masked[N_LOAD], st_value[N_LOAD], st_coding[N_LOAD], st_glitch[N_LOAD];
  int st_glitch_nle[N_LOAD], st_dead[N_LOAD];
  int cl_runs[5] = '{0, 0, 0, 0, 0};
  int cl_err[5] = '{0, 0, 0, 0, 0};
  int cl_value[5] = '{0, 0, 0, 0, 0};
  string cl_name[5] = '{"output C-element", "stage enable", "DIMS minterm", "NOR arming output", "interlock latch"};

  initial begin
    logic [1:0] ok;
    int sd[3], kd[3];
    rst = 1'b1; run_en[0] = 1'b0; run_en[1] = 1'b0; inj_sel = -1;
    in_bus[0] = '0; in_bus[1] = '0;
    sd = '{8, 3, 1}; kd = '{1, 3, 8};
    for (int m = 0; m < N_LOAD; m++) begin
      st_masked[m] = 0; st_value[m] = 0; st_coding[m] = 0; st_glitch[m] = 0;
      st_glitch_nle[m] = 0; st_dead[m] = 0;
    end

    // Part 1: fault-free operation in three load settings.
    for (int m = 0; m < 3; m++) begin
      start_run(50, sd[m], kd[m]);
      wait_done(20000, ok);
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (!ok[c] || value_err[c] != 0 || coding_err[c] != 0 || glitch[c] != 0) begin
          failures++;
          $display("FAIL: fault-free circuit %0d setting %0d: done=%b value=%0d coding=%0d glitch=%0d",
                   c, m, ok[c], value_err[c], coding_err[c], glitch[c]);
        end
        checks += recvd[c];   // every received token was compared
      end
    end
    $display("fault-free: source waits %0d, sink waits %0d", src_waits, snk_waits);

    // Part 2: one transient per run, in six load settings. The load ratio
    // (sink delay / source delay) stands in for the pipeline load factor:
    // below 1 the pipeline is token limited, above 1 bubble limited.
    for (int m = 0; m < N_LOAD; m++) begin
      for (int r = 0; r < N_RUNS; r++) begin
        int c_tgt, cls;
        logic err, last_en;
        start_run(8, ld_src[m], ld_snk[m]);
        inj_sel = $urandom_range(N_TGT - 1);
        c_tgt = tgt_circuit(inj_sel);
        cls = tgt_class(inj_sel);
        cl_runs[cls]++;
        last_en = (inj_sel == T_FIFO_C + FS - 1);
        #($urandom_range(8 * (ld_src[m] + ld_snk[m]) + 10) + 0.25);
        inj_go++;
        wait_done(2000, ok);
        checks++;
        if (coding_err[c_tgt] != 0) begin
          failures++;
          $display("FAIL: coding error at output, target %0d", inj_sel);
        end
        err = 1'b0;
        if (!ok[c_tgt])            begin st_dead[m]++;   err = 1'b1; end
        if (value_err[c_tgt] != 0) begin st_value[m]++;  err = 1'b1; end
        if (coding_err[c_tgt] != 0) begin st_coding[m]++; err = 1'b1; end
        if (glitch[c_tgt] != 0) begin
          st_glitch[m]++; err = 1'b1;
          if (!last_en) st_glitch_nle[m]++;
        end
        if (!err) st_masked[m]++;
        else cl_err[cls]++;
        if (value_err[c_tgt] != 0) cl_value[cls]++;
        // the circuit that was not hit must be unaffected
        checks++;
        if (!ok[1-c_tgt] || value_err[1-c_tgt] != 0 || glitch[1-c_tgt] != 0) begin
          failures++;
          $display("FAIL: circuit %0d disturbed by a fault in the other", 1 - c_tgt);
        end
        inj_sel = -1;
      end
      $display("load %4.2f (source %0d, sink %0d): %0d runs, masked %0d, value %0d, coding %0d, glitch %0d (%0d without last-stage enable), deadlock %0d",
               real'(ld_snk[m]) / real'(ld_src[m]), ld_src[m], ld_snk[m], N_RUNS, st_masked[m],
               st_value[m], st_coding[m], st_glitch[m], st_glitch_nle[m], st_dead[m]);
      n_masked += st_masked[m]; n_value += st_value[m]; n_coding += st_coding[m];
      n_glitch += st_glitch[m]; n_dead += st_dead[m];
    end

    for (int k = 0; k < 5; k++)
      $display("target class %s: %0d runs, %0d with an error, %0d with a value error",
               cl_name[k], cl_runs[k], cl_err[k], cl_value[k]);

    // Part 3: transients on the enable of the last FIFO stage while the sink
    // holds an unacknowledged token (bubble limited). The stage then drops
    // its token before the sink has acknowledged it: a glitch at the output.
    for (int r = 0; r < 10; r++) begin
      start_run(8, 2, 8);
      inj_sel = T_FIFO_C + FS - 1;
      while (snk_st[0] != 1) #0.25;
      #1.25;
      inj_go++;
      wait_done(2000, ok);
      if (glitch[0] != 0) n_le_glitch++;
      inj_sel = -1;
    end
    $display("last-stage enable hits in bubble-limited mode: %0d of 10 gave a glitch", n_le_glitch);

    $display("all fault runs: masked %0d, value errors %0d, coding errors %0d, glitches %0d, deadlocks %0d",
             n_masked, n_value, n_coding, n_glitch, n_dead);
    $display("mechanisms: backpressure %0d, sink waits %0d, (1,1) blocked at a stage input %0d",
             src_waits, snk_waits, n_ilock);

    checks++;
    if (src_waits == 0) begin failures++; $display("FAIL: no backpressure"); end
    checks++;
    if (snk_waits == 0) begin failures++; $display("FAIL: sink never waited"); end
    checks++;
    if (n_ilock == 0) begin failures++; $display("FAIL: input interlock never exercised"); end
    checks++;
    if (n_value == 0) begin failures++; $display("FAIL: no value error produced"); end
    checks++;
    if (n_masked == 0) begin failures++; $display("FAIL: no fault masked"); end
    // Hits on the filtered arming signal or on the input-interlock latch can
    // at most move a transition earlier; they must never corrupt data.
    checks++;
    if (cl_value[3] != 0 || cl_value[4] != 0 || cl_runs[3] == 0 || cl_runs[4] == 0) begin
      failures++; $display("FAIL: arming or interlock hit gave a value error (or never ran)");
    end
    checks++;
    if (n_le_glitch == 0) begin failures++; $display("FAIL: last-stage enable glitch never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
