// Self-checking test of sign_extend: every 4-bit value widened to 16 bits
// (the default) and to 8 bits, compared with the value read as a signed
// integer in -8..7.
module tb_sign_extend;
  logic [3:0]  din;
  logic [15:0] d16;
  logic [7:0]  d8;
  int checks = 0, failures = 0;

  sign_extend                          dut16 (.din, .dout(d16));
  sign_extend #(.IN_W(4), .OUT_W(8))   dut8  (.din, .dout(d8));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int s;
      s = (v < 8) ? v : v - 16;
      din = 4'(v);
      #1;
      checks += 2;
      if (d16 !== 16'(s)) begin failures++; $display("FAIL16 %0d -> %h", v, d16); end
      if (d8  !== 8'(s))  begin failures++; $display("FAIL8 %0d -> %h", v, d8);  end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
