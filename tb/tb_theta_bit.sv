// tb_theta_bit: self-checking testbench of one theta buffer bit.
//
// Directed scenarios, each with its expected output worked out by hand:
//   1. reset gives the spacer;
//   2. tokens 1 and 0 are captured while en = 1 and released to the spacer
//      only after en = 0 and the input spacer;
//   3. a token offered while en = 0 waits until en rises (bubble limited);
//   4. input interlock: the second rail rising while the first holds the
//      grant (an illegal (1,1) input) is not passed on, with en high before
//      or after the rails;
//   5. output interlock: a transient that flips the false-rail output
//      C-element while the stage is armed for a token blocks the true rail,
//      so the result is a wrong value but never a (1,1) code word.
// Throughout, the output is checked never to be (1,1).
`timescale 1ns/1ps
module tb_theta_bit;
  import qdi_pkg::*;

  logic rst, en;
  dr_t in, out;
  int checks = 0, failures = 0;
  int n_in_lock = 0, n_out_lock = 0;

  theta_bit dut (.rst(rst), .in(in), .en(en), .out(out));

  always @(out) if (!rst && out.t && out.f) begin
    failures++; $display("FAIL: (1,1) at output, %0t", $time);
  end

  task automatic expect_out(input dr_t e, input string what);
    #1;
    checks++;
    if (out !== e) begin
      failures++;
      $display("FAIL: %s: out=%b expected %b", what, out, e);
    end
  endtask

  task automatic to_spacer();
    en = 1'b0; in = DR_SPACER;
    expect_out(DR_SPACER, "return to spacer");
    en = 1'b1;
    expect_out(DR_SPACER, "spacer held after en");
  endtask

  initial begin
    rst = 1'b1; en = 1'b1; in = DR_SPACER;
    #1 rst = 1'b0;
    expect_out(DR_SPACER, "reset");

    // 2. plain tokens
    for (int v = 0; v < 2; v++) begin
      in = dr_token(v[0]);
      expect_out(dr_token(v[0]), "token capture");
      in = DR_SPACER;
      expect_out(dr_token(v[0]), "token held while en high");
      en = 1'b0;
      expect_out(DR_SPACER, "spacer after en low");
      en = 1'b1;
      expect_out(DR_SPACER, "spacer held");
    end

    // 3. token waits for en
    en = 1'b0;
    in = dr_token(1'b0);
    expect_out(DR_SPACER, "token blocked while en low");
    en = 1'b1;
    expect_out(dr_token(1'b0), "token released by en");
    to_spacer();

    // 4a. illegal input, armed stage: true rail first
    in.t = 1'b1;
    expect_out(dr_token(1'b1), "first rail captured");
    in.f = 1'b1; n_in_lock++;
    expect_out(dr_token(1'b1), "second rail blocked");
    to_spacer();

    // 4b. illegal input while not armed: false rail first, then true rail
    en = 1'b0;
    in.f = 1'b1;
    #1 in.t = 1'b1; n_in_lock++;
    expect_out(DR_SPACER, "nothing captured while en low");
    en = 1'b1;
    expect_out(dr_token(1'b0), "input interlock keeps the first rail");
    to_spacer();

    // 5. output interlock: transient flips the false-rail C-element
    force dut.u_c_f.out = 1'b1;
    #1 release dut.u_c_f.out;
    expect_out(dr_token(1'b0), "flipped state held");
    in = dr_token(1'b1); n_out_lock++;
    expect_out(dr_token(1'b0), "true rail blocked by output interlock");
    en = 1'b0; in = DR_SPACER;
    expect_out(DR_SPACER, "recovers with next spacer");
    en = 1'b1;
    in = dr_token(1'b1);
    expect_out(dr_token(1'b1), "next token correct");
    to_spacer();

    checks++;
    if (n_in_lock == 0 || n_out_lock == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
