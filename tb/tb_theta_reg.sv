// tb_theta_reg: self-checking testbench of one N-bit theta pipeline stage.
//
// The stage sits between a testbench source and sink. For each random token
// the testbench checks, step by step: the token appears at the output and
// ack_out rises while ack_in is low; the output keeps the token (and a new
// input spacer is not taken) while ack_in stays low; after ack_in rises the
// output returns to the spacer and ack_out falls; a next token is held back
// while ack_in is still high.
`timescale 1ns/1ps
module tb_theta_reg;
  import qdi_pkg::*;
  localparam int unsigned N = 4;

  logic rst, ack_out, ack_in;
  dr_t [N-1:0] in, out;
  int checks = 0, failures = 0;

  theta_reg #(.N(N)) dut (.rst(rst), .in(in), .ack_out(ack_out), .out(out), .ack_in(ack_in));

  function automatic dr_t [N-1:0] enc(input logic [N-1:0] v);
    dr_t [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = dr_token(v[i]);
    return r;
  endfunction

  task automatic chk(input dr_t [N-1:0] e_out, input logic e_ack, input string what);
    #1;
    checks++;
    if (out !== e_out || ack_out !== e_ack) begin
      failures++;
      $display("FAIL: %s: out=%b ack_out=%b expected %b %b", what, out, ack_out, e_out, e_ack);
    end
  endtask

  initial begin
    logic [N-1:0] v, v2;
    rst = 1'b1; in = '0; ack_in = 1'b0;
    #1 rst = 1'b0;
    chk('0, 1'b0, "reset");
    for (int k = 0; k < 40; k++) begin
      v = N'($urandom);
      v2 = N'($urandom);
      in = enc(v);
      chk(enc(v), 1'b1, "token captured");
      in = '0;
      chk(enc(v), 1'b1, "token held until ack_in");
      ack_in = 1'b1;
      chk('0, 1'b0, "spacer after ack_in");
      in = enc(v2);
      chk('0, 1'b0, "next token waits for ack_in low");
      ack_in = 1'b0;
      chk(enc(v2), 1'b1, "next token");
      ack_in = 1'b1; in = '0;
      chk('0, 1'b0, "spacer");
      ack_in = 1'b0;
      chk('0, 1'b0, "idle");
    end
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
