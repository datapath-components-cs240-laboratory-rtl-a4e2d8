// Self-checking test of the 16-bit ALU: for each defined ALUOp code
// (0 AND, 1 OR, 2 add, 6 subtract, 7 set on less than) random and corner
// operands are applied and result, Zero, Carry and Overflow are compared
// with values computed here in integer arithmetic. Undefined codes must
// give 0.
module tb_alu;
  import mips_pkg::*;
  logic [15:0] a, b, result;
  alu_op_t     op;
  logic        zero, carry, overflow;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_op(op), .result, .zero, .carry, .overflow);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [15:0] ta, tb_, input logic [3:0] code);
    int sa, sb, r, exp_r, exp_c, exp_v;
    a = ta; b = tb_; op = alu_op_t'(code);
    #1;
    sa = ta[15] ? int'(ta) - 65536 : int'(ta);
    sb = tb_[15] ? int'(tb_) - 65536 : int'(tb_);
    exp_c = 0; exp_v = 0;
    case (code)
      4'd0: exp_r = int'(ta & tb_);
      4'd1: exp_r = int'(ta | tb_);
      4'd2: begin
        r = int'(ta) + int'(tb_);
        exp_r = r % 65536; exp_c = r / 65536;
        exp_v = (sa + sb > 32767 || sa + sb < -32768) ? 1 : 0;
      end
      4'd6: begin
        r = int'(ta) - int'(tb_);
        exp_r = (r + 65536) % 65536; exp_c = (int'(ta) >= int'(tb_)) ? 1 : 0;
        exp_v = (sa - sb > 32767 || sa - sb < -32768) ? 1 : 0;
      end
      4'd7: exp_r = (sa < sb) ? 1 : 0;
      default: exp_r = 0;
    endcase
    checks++;
    if (int'(result) != exp_r || zero != (exp_r == 0) ||
        int'(carry) != exp_c || int'(overflow) != exp_v) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h result=%h z=%b c=%b v=%b exp=%h c=%0d v=%0d",
               code, ta, tb_, result, zero, carry, overflow, exp_r, exp_c, exp_v);
    end
  endtask

  localparam logic [15:0] CORNER [6] = '{16'h0000, 16'h0001, 16'h7FFF,
                                         16'h8000, 16'hFFFF, 16'h1234};
  localparam logic [3:0] CODES [9] = '{4'd0, 4'd1, 4'd2, 4'd6, 4'd7,
                                       4'd3, 4'd5, 4'd8, 4'd15};

  initial begin
    foreach (CODES[k]) begin
      foreach (CORNER[i]) foreach (CORNER[j]) check_one(CORNER[i], CORNER[j], CODES[k]);
      for (int n = 0; n < 300; n++) check_one(16'($urandom), 16'($urandom), CODES[k]);
      check_one(16'h5A5A, 16'h5A5A, CODES[k]);  // equal operands: sub gives Zero
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
