// tb_c_element_plus: self-checking testbench of the C-element with a
// positive input.
//
// Random input changes are compared with a reference state: rise when the
// regular inputs and the positive input are all 1, fall when the regular
// inputs are all 0 (the positive input is ignored for the fall), hold
// otherwise. The run must include a fall with the positive input still high
// and a blocked rise (regular inputs high, positive input low).
`timescale 1ns/1ps
module tb_c_element_plus;
  localparam int unsigned N = 2;

  logic rst;
  logic [N-1:0] in;
  logic pos, out, ref_q;
  int checks = 0, failures = 0;
  int n_fall_pos_high = 0, n_blocked_rise = 0;

  c_element_plus #(.N(N)) dut (.rst(rst), .in(in), .pos(pos), .out(out));

  initial begin
    in = '0; pos = 1'b0; rst = 1'b1;
    #1 rst = 1'b0; ref_q = 1'b0;
    #1;
    checks++;
    if (out !== 1'b0) begin failures++; $display("FAIL: reset"); end
    for (int k = 0; k < 500; k++) begin
      logic prev;
      prev = ref_q;
      if ($urandom_range(3) == 0) pos = ~pos;
      else in[$urandom_range(N-1)] ^= 1'b1;
      #1;
      if ((&in) && pos)  ref_q = 1'b1;
      else if (~|in)     ref_q = 1'b0;
      if (prev && !ref_q && pos) n_fall_pos_high++;
      if (!ref_q && (&in) && !pos) n_blocked_rise++;
      checks++;
      if (out !== ref_q) begin
        failures++;
        $display("FAIL: in=%b pos=%b out=%b expected %b", in, pos, out, ref_q);
      end
    end
    checks++;
    if (n_fall_pos_high == 0 || n_blocked_rise == 0) begin
      failures++; $display("FAIL: coverage %0d %0d", n_fall_pos_high, n_blocked_rise);
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
