// tb_completion_detect: self-checking testbench of the dual-rail completion
// detector.
//
// Each round fills a 4-bit word with a random token one bit at a time, in
// random order, and then returns it to the spacer one bit at a time. The
// expected done is 0 until the last bit becomes valid, 1 from then until
// the last bit returns to the spacer, and 0 afterwards (hysteresis of the
// C-element).
`timescale 1ns/1ps
module tb_completion_detect;
  import qdi_pkg::*;
  localparam int unsigned N = 4;

  logic rst, done;
  dr_t [N-1:0] data;
  int checks = 0, failures = 0;

  completion_detect #(.N(N)) dut (.rst(rst), .data(data), .done(done));

  task automatic chk(input logic e, input string what);
    #1;
    checks++;
    if (done !== e) begin failures++; $display("FAIL: %s done=%b expected %b", what, done, e); end
  endtask

  initial begin
    int order[N];
    rst = 1'b1; data = '0;
    #1 rst = 1'b0;
    chk(1'b0, "reset");
    for (int r = 0; r < 50; r++) begin
      for (int i = 0; i < N; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < N; i++) begin
        data[order[i]] = dr_token(1'($urandom));
        chk(i == N-1, "filling");
      end
      order.shuffle();
      for (int i = 0; i < N; i++) begin
        data[order[i]] = DR_SPACER;
        chk(i != N-1, "emptying");
      end
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
