// tb_cp_regfile -- self-checking test of the 16 x 32 register file.
//
// Checks that reset clears every register, then performs random writes and
// reads on all three read ports against a reference array, including a
// read of a register in the cycle it is written (old value until the edge).
module tb_cp_regfile;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra_addr, rb_addr, rx_addr, waddr;
  logic [31:0] ra_data, rb_data, rx_data, wdata;
  logic we;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  cp_regfile dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (ra_data !== model[ra_addr] || rb_data !== model[rb_addr] || rx_data !== model[rx_addr]) begin
      failures++;
      $display("FAIL read a[%0d]=%h b[%0d]=%h x[%0d]=%h", ra_addr, ra_data, rb_addr, rb_data,
               rx_addr, rx_data);
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; ra_addr = 0; rb_addr = 0; rx_addr = 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra_addr = 4'(i); rb_addr = 4'(15 - i); rx_addr = 4'(i); #1; check_reads();
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = ($urandom_range(1) == 1); waddr = 4'($urandom); wdata = $urandom;
      ra_addr = 4'($urandom); rb_addr = 4'($urandom); rx_addr = waddr;
      #1; check_reads();
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 16; i++) begin
      ra_addr = 4'(i); rb_addr = 4'(i); rx_addr = 4'(i); #1; check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
