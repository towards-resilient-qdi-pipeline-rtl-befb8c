// tb_dims_gate: self-checking testbench of the DIMS function block.
//
// Two instances: the default 2-input AND and a full adder (3 inputs, sum and
// carry). For every input value the inputs become valid one at a time in
// random order; the outputs must stay at the spacer until the last input is
// valid (strong indication), then equal the Boolean function computed here
// with & ^ and majority. The inputs then return to the spacer one at a
// time, and the outputs must hold until the last one has.
`timescale 1ns/1ps
module tb_dims_gate;
  import qdi_pkg::*;

  localparam logic [15:0] FA_TT = {8'b1110_1000, 8'b1001_0110};

  logic rst;
  dr_t [1:0] and_in;
  dr_t [0:0] and_out;
  dr_t [2:0] fa_in;
  dr_t [1:0] fa_out;
  int checks = 0, failures = 0;

  dims_gate u_and (.rst(rst), .in(and_in), .out(and_out));
  dims_gate #(.NIN(3), .NOUT(2), .TT(FA_TT)) u_fa (.rst(rst), .in(fa_in), .out(fa_out));

  function automatic logic all_sp2(input dr_t [1:0] d);
    return dr_is_spacer(d[0]) && dr_is_spacer(d[1]);
  endfunction

  initial begin
    int ord[3];
    rst = 1'b1; and_in = '0; fa_in = '0;
    #1 rst = 1'b0;
    for (int rep = 0; rep < 4; rep++) begin
      // AND gate
      for (int v = 0; v < 4; v++) begin
        ord[0] = 0; ord[1] = 1;
        if ($urandom_range(1) == 1) begin ord[0] = 1; ord[1] = 0; end
        and_in[ord[0]] = dr_token(v[ord[0]]);
        #1 checks++;
        if (!dr_is_spacer(and_out[0])) begin failures++; $display("FAIL: AND early"); end
        and_in[ord[1]] = dr_token(v[ord[1]]);
        #1 checks++;
        if (and_out[0] !== dr_token(v[0] & v[1])) begin
          failures++; $display("FAIL: AND %b -> %b", v[1:0], and_out[0]);
        end
        and_in[ord[0]] = DR_SPACER;
        #1 checks++;
        if (and_out[0] !== dr_token(v[0] & v[1])) begin failures++; $display("FAIL: AND early spacer"); end
        and_in[ord[1]] = DR_SPACER;
        #1 checks++;
        if (!dr_is_spacer(and_out[0])) begin failures++; $display("FAIL: AND no spacer"); end
      end
      // full adder
      for (int v = 0; v < 8; v++) begin
        logic s, c;
        s = v[0] ^ v[1] ^ v[2];
        c = (v[0] & v[1]) | (v[0] & v[2]) | (v[1] & v[2]);
        ord = '{0, 1, 2};
        ord.shuffle();
        for (int i = 0; i < 3; i++) begin
          fa_in[ord[i]] = dr_token(v[ord[i]]);
          #1;
          if (i < 2) begin
            checks++;
            if (!all_sp2(fa_out)) begin failures++; $display("FAIL: FA early"); end
          end
        end
        checks++;
        if (fa_out[0] !== dr_token(s) || fa_out[1] !== dr_token(c)) begin
          failures++; $display("FAIL: FA %b -> s=%b c=%b", v[2:0], fa_out[0], fa_out[1]);
        end
        ord.shuffle();
        for (int i = 0; i < 3; i++) begin
          fa_in[ord[i]] = DR_SPACER;
          #1;
          checks++;
          if (i < 2 && (fa_out[0] !== dr_token(s) || fa_out[1] !== dr_token(c))) begin
            failures++; $display("FAIL: FA early spacer");
          end
          if (i == 2 && !all_sp2(fa_out)) begin failures++; $display("FAIL: FA no spacer"); end
        end
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
