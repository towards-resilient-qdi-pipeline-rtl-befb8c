// tb_input_interlock: self-checking testbench of the NAND SR-latch input
// interlock.
//
// The rails change one at a time (a simultaneous rise is the arbitration
// case the latch leaves to analog resolution). The reference is a mutex: a
// rail is granted when it is high and the other rail holds no grant; a
// grant is kept while its rail stays high; when a granted rail falls, a
// waiting companion rail that is still high is granted. The run must
// include a second rail rising while the first is granted (an illegal
// (1,1) input) and check it is not granted.
`timescale 1ns/1ps
module tb_input_interlock;
  logic in_t, in_f;
  logic grant_t_n, grant_f_n;
  logic gt, gf;   // reference grants, active high
  int checks = 0, failures = 0;
  int n_blocked = 0;

  input_interlock dut (.in_t(in_t), .in_f(in_f), .grant_t_n(grant_t_n), .grant_f_n(grant_f_n));

  initial begin
    in_t = 1'b0; in_f = 1'b0; gt = 1'b0; gf = 1'b0;
    #1;
    checks++;
    if (grant_t_n !== 1'b1 || grant_f_n !== 1'b1) begin failures++; $display("FAIL: idle"); end
    for (int k = 0; k < 400; k++) begin
      if ($urandom_range(1) == 0) in_t = ~in_t; else in_f = ~in_f;
      #1;
      if (!in_t) gt = 1'b0;
      if (!in_f) gf = 1'b0;
      if (in_t && !gf) gt = 1'b1;
      if (in_f && !gt) gf = 1'b1;
      if (in_t && in_f) n_blocked++;
      checks++;
      if (grant_t_n !== ~gt || grant_f_n !== ~gf) begin
        failures++;
        $display("FAIL: in=%b%b grants_n=%b%b expected %b%b", in_t, in_f,
                 grant_t_n, grant_f_n, ~gt, ~gf);
      end
    end
    checks++;
    if (n_blocked == 0) begin failures++; $display("FAIL: (1,1) never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
