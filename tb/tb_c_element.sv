// tb_c_element: self-checking testbench of the N-input Muller C-element.
//
// Applies reset, then 400 random input vectors (one input bit changed at a
// time, as in a speed-independent circuit, plus some multi-bit jumps) and
// compares the output with a reference state updated by the C-element rule:
// set when all inputs are 1, clear when all are 0, hold otherwise. It also
// counts that each of rise, fall and hold actually happened.
`timescale 1ns/1ps
module tb_c_element;
  localparam int unsigned N = 3;

  logic rst;
  logic [N-1:0] in;
  logic out;
  logic ref_q;
  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0, n_hold = 0;

  c_element #(.N(N)) dut (.rst(rst), .in(in), .out(out));

  initial begin
    in = '1; rst = 1'b1;
    #1;
    checks++;
    if (out !== 1'b0) begin failures++; $display("FAIL: reset"); end
    rst = 1'b0; ref_q = 1'b0;
    #1;
    // With all inputs 1 after reset the output must rise.
    ref_q = 1'b1;
    for (int k = 0; k < 400; k++) begin
      logic prev;
      prev = ref_q;
      if (k % 7 == 0) in = N'($urandom);
      else            in[$urandom_range(N-1)] ^= 1'b1;
      #1;
      if (&in)       ref_q = 1'b1;
      else if (~|in) ref_q = 1'b0;
      if (ref_q && !prev) n_rise++;
      else if (!ref_q && prev) n_fall++;
      else n_hold++;
      checks++;
      if (out !== ref_q) begin
        failures++;
        $display("FAIL: in=%b out=%b expected %b", in, out, ref_q);
      end
    end
    checks++;
    if (n_rise == 0 || n_fall == 0 || n_hold == 0) begin
      failures++; $display("FAIL: coverage rise=%0d fall=%0d hold=%0d", n_rise, n_fall, n_hold);
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
