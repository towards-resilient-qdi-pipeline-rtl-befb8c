// tb_dims_adder: self-checking testbench of the dual-rail ripple adder.
//
// Two instances, 4 + 4 bits and 4 + 3 bits (the shapes the multiplier
// uses), are driven exhaustively with four-phase tokens: both operands
// become valid, the sum is compared with a + b, then the operands return to
// the spacer and every sum bit must return to the spacer too.
`timescale 1ns/1ps
module tb_dims_adder;
  import qdi_pkg::*;

  logic rst;
  dr_t [3:0] a, b;
  dr_t [2:0] b3;
  dr_t [4:0] s44, s43;
  int checks = 0, failures = 0;

  dims_adder #(.WA(4), .WB(4)) u44 (.rst(rst), .a(a), .b(b),  .sum(s44));
  dims_adder #(.WA(4), .WB(3)) u43 (.rst(rst), .a(a), .b(b3), .sum(s43));

  function automatic logic [4:0] dec5(input dr_t [4:0] d);
    logic [4:0] v;
    for (int i = 0; i < 5; i++) v[i] = d[i].t;
    return v;
  endfunction

  function automatic logic valid5(input dr_t [4:0] d);
    for (int i = 0; i < 5; i++) if (!dr_is_valid(d[i])) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    rst = 1'b1; a = '0; b = '0; b3 = '0;
    #1 rst = 1'b0;
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        for (int i = 0; i < 4; i++) begin
          a[i] = dr_token(x[i]);
          b[i] = dr_token(y[i]);
        end
        for (int i = 0; i < 3; i++) b3[i] = dr_token(y[i]);
        #1;
        checks += 2;
        if (!valid5(s44) || dec5(s44) != 5'(x + y)) begin
          failures++; $display("FAIL: %0d + %0d = %b", x, y, s44);
        end
        if (!valid5(s43) || dec5(s43) != 5'(x + (y % 8))) begin
          failures++; $display("FAIL: %0d + %0d (3 bit) = %b", x, y % 8, s43);
        end
        a = '0; b = '0; b3 = '0;
        #1;
        checks++;
        if (s44 != '0 || s43 != '0) begin failures++; $display("FAIL: no spacer"); end
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
