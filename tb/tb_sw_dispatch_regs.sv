// tb_sw_dispatch_regs -- self-checking test of the software-dispatch
// special purpose registers.
//
// Captures operands as the dispatch branch would, reads them back with the
// special load, stores a result and checks that the register-file write
// goes to the remembered destination with the stored value, and saves and
// restores all four registers through the operating-system path as a
// process switch would.
module tb_sw_dispatch_regs;
  import proteus_pkg::*;
  logic clk = 0, rst_n = 0;
  logic capture, store, os_we, rf_we;
  logic [31:0] cap_a, cap_b, rd_data, wdata, rf_wdata;
  logic [3:0] cap_dest, rf_waddr;
  spr_sel_e rd_sel, wr_sel;
  int checks = 0, failures = 0;

  sw_dispatch_regs dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_spr(input spr_sel_e s, input logic [31:0] v);
    rd_sel = s; #1;
    checks++;
    if (rd_data !== v) begin failures++; $display("FAIL spr %s=%h exp %h", s.name(), rd_data, v); end
  endtask

  task automatic cap(input logic [31:0] a, input logic [31:0] b, input logic [3:0] d);
    @(negedge clk); capture = 1; cap_a = a; cap_b = b; cap_dest = d;
    @(negedge clk); capture = 0;
  endtask

  task automatic do_store(input logic [31:0] v, input logic [3:0] exp_dest);
    @(negedge clk); store = 1; wdata = v; #1;
    checks++;
    if (!rf_we || rf_waddr !== exp_dest || rf_wdata !== v) begin
      failures++; $display("FAIL store we=%0d addr=%0d data=%h", rf_we, rf_waddr, rf_wdata);
    end
    @(negedge clk); store = 0; #1;
    checks++;
    if (rf_we) begin failures++; $display("FAIL rf_we without store"); end
  endtask

  task automatic os_write(input spr_sel_e s, input logic [31:0] v);
    @(negedge clk); os_we = 1; wr_sel = s; wdata = v;
    @(negedge clk); os_we = 0;
  endtask

  initial begin
    logic [31:0] sa, sb, sr, sd;
    capture = 0; store = 0; os_we = 0; cap_a = 0; cap_b = 0; cap_dest = 0; wdata = 0;
    rd_sel = SPR_SRC_A; wr_sel = SPR_SRC_A;
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_spr(SPR_SRC_A, 0); expect_spr(SPR_RESULT, 0);
    for (int i = 0; i < 50; i++) begin
      automatic logic [31:0] a = $urandom, b = $urandom, r = $urandom;
      automatic logic [3:0] d = 4'($urandom);
      cap(a, b, d);
      expect_spr(SPR_SRC_A, a); expect_spr(SPR_SRC_B, b);
      expect_spr(SPR_DEST, 32'(d)); expect_spr(SPR_RESULT, 0);
      do_store(r, d);
      expect_spr(SPR_RESULT, r); expect_spr(SPR_SRC_A, a);
    end
    // process switch: save, clobber by another capture, restore
    rd_sel = SPR_SRC_A; #1 sa = rd_data;
    rd_sel = SPR_SRC_B; #1 sb = rd_data;
    rd_sel = SPR_RESULT; #1 sr = rd_data;
    rd_sel = SPR_DEST; #1 sd = rd_data;
    cap(32'h1111_1111, 32'h2222_2222, 4'd1);
    os_write(SPR_SRC_A, sa); os_write(SPR_SRC_B, sb);
    os_write(SPR_RESULT, sr); os_write(SPR_DEST, sd);
    expect_spr(SPR_SRC_A, sa); expect_spr(SPR_SRC_B, sb);
    expect_spr(SPR_RESULT, sr); expect_spr(SPR_DEST, sd);
    do_store(32'hCAFE_F00D, sd[3:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
