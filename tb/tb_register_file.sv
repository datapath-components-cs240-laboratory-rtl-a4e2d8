// Self-checking test of the register file against a reference array:
// reset clears R2-R15, R0 reads 0 and R1 reads 1 even after writes to
// them, random writes land on the rising edge only while RegWrite = 1,
// and both read ports see the stored values.
module tb_register_file;
  logic        clk = 0, reset, reg_write;
  logic [3:0]  read_reg1, read_reg2, write_reg;
  logic [15:0] write_data, read_data1, read_data2;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  register_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int r = 0; r < 16; r++) begin
      read_reg1 = 4'(r); read_reg2 = 4'(15 - r);
      #1;
      checks += 2;
      if (read_data1 !== model[r]) begin
        failures++; $display("FAIL port1 R%0d=%h exp %h", r, read_data1, model[r]);
      end
      if (read_data2 !== model[15 - r]) begin
        failures++; $display("FAIL port2 R%0d=%h exp %h", 15 - r, read_data2, model[15 - r]);
      end
    end
  endtask

  initial begin
    reset = 1; reg_write = 0; write_reg = 0; write_data = 0;
    read_reg1 = 0; read_reg2 = 0;
    @(posedge clk); #1;
    reset = 0;
    foreach (model[i]) model[i] = '0;
    model[1] = 16'd1;
    check_all();
    for (int n = 0; n < 400; n++) begin
      logic [3:0]  wr;
      logic [15:0] wd;
      logic        we;
      wr = 4'($urandom); wd = 16'($urandom); we = 1'($urandom);
      if (n < 4) begin wr = 4'(n % 2); we = 1; end  // writes aimed at R0 / R1
      reg_write = we; write_reg = wr; write_data = wd;
      @(posedge clk); #1;
      if (we && wr > 1) model[wr] = wd;
      reg_write = 0;
      if (n % 25 == 0) check_all();
      else begin
        read_reg1 = wr; read_reg2 = 4'($urandom);
        #1;
        checks += 2;
        if (read_data1 !== model[wr]) begin failures++; $display("FAIL rd1 R%0d", wr); end
        if (read_data2 !== model[read_reg2]) begin failures++; $display("FAIL rd2 R%0d", read_reg2); end
      end
    end
    reset = 1; @(posedge clk); #1; reset = 0;
    foreach (model[i]) model[i] = '0;
    model[1] = 16'd1;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
