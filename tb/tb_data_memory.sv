// Self-checking test of the data memory with active-low enables: every
// address is written with MemWr = 0, then random writes and reads follow;
// a word must not change while MemWr = 1, Read data must be 0 while
// MemRd = 1, and reads return the last word written (reference array).
module tb_data_memory;
  logic        clk = 0, mem_rd_n, mem_wr_n;
  logic [7:0]  address;
  logic [15:0] write_data, read_data;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  data_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input logic [7:0] adr);
    address = adr; mem_rd_n = 0; mem_wr_n = 1;
    #1;
    checks++;
    if (read_data !== model[adr]) begin
      failures++; $display("FAIL read [%0d]=%h exp %h", adr, read_data, model[adr]);
    end
  endtask

  initial begin
    mem_rd_n = 1; mem_wr_n = 1; address = 0; write_data = 0;
    for (int i = 0; i < 256; i++) begin
      address = 8'(i); write_data = 16'($urandom); mem_wr_n = 0;
      @(posedge clk); #1;
      model[i] = write_data;
    end
    mem_wr_n = 1;
    for (int i = 0; i < 256; i++) read_check(8'(i));
    for (int n = 0; n < 1000; n++) begin
      logic [7:0] adr;
      adr = 8'($urandom);
      case ($urandom % 4)
        0: begin  // write
          address = adr; write_data = 16'($urandom); mem_wr_n = 0; mem_rd_n = 1;
          @(posedge clk); #1; model[adr] = write_data; mem_wr_n = 1;
        end
        1: begin  // cycle with MemWr = 1: nothing written
          address = adr; write_data = ~model[adr]; mem_wr_n = 1; mem_rd_n = 1;
          @(posedge clk); #1;
          checks++;
          if (read_data !== 16'h0) begin failures++; $display("FAIL rd disabled %h", read_data); end
        end
        default: read_check(adr);
      endcase
    end
    for (int i = 0; i < 256; i++) read_check(8'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
