// tb_proteus_dispatch -- self-checking test of the dispatch stage.
//
// Programs the hardware and software TLBs and checks the three outcomes:
// a hardware mapping wins over a software one for the same tuple, a
// software-only tuple yields the routine's address, and an unmapped tuple
// faults. It also checks sharing (two tuples on one PFU) and that removing
// a hardware mapping falls back to the software alternative.
module tb_proteus_dispatch;
  import proteus_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] req_pid, req_cid, tlb_wr_pid, tlb_wr_cid;
  disp_kind_e kind;
  logic [1:0] pfu;
  logic [31:0] sw_addr, tlb_wr_data;
  logic tlb_wr_en, tlb_sel, tlb_wr_valid;
  logic [2:0] tlb_wr_idx;
  int checks = 0, failures = 0;

  proteus_dispatch dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tlb_write(input logic sel, input int idx, input logic v, input logic [7:0] p,
                           input logic [7:0] c, input logic [31:0] d);
    @(negedge clk);
    tlb_wr_en = 1; tlb_sel = sel; tlb_wr_idx = idx[2:0]; tlb_wr_valid = v;
    tlb_wr_pid = p; tlb_wr_cid = c; tlb_wr_data = d;
    @(negedge clk);
    tlb_wr_en = 0;
  endtask

  task automatic expect_disp(input logic [7:0] p, input logic [7:0] c, input disp_kind_e k,
                             input logic [31:0] val);
    req_pid = p; req_cid = c;
    #1;
    checks++;
    if (kind !== k || (k == DISP_HW && pfu !== val[1:0]) || (k == DISP_SW && sw_addr !== val)) begin
      failures++;
      $display("FAIL %h/%h: kind=%s pfu=%0d addr=%h", p, c, kind.name(), pfu, sw_addr);
    end
  endtask

  initial begin
    tlb_wr_en = 0; tlb_sel = 0; tlb_wr_idx = 0; tlb_wr_valid = 0;
    tlb_wr_pid = 0; tlb_wr_cid = 0; tlb_wr_data = 0; req_pid = 0; req_cid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    expect_disp(1, 1, DISP_FAULT, 0);
    tlb_write(0, 0, 1, 8'd1, 8'd1, 32'd3);          // (1,1) -> PFU 3
    tlb_write(0, 5, 1, 8'd2, 8'd4, 32'd3);          // (2,4) -> PFU 3 as well
    tlb_write(1, 0, 1, 8'd1, 8'd1, 32'h0000_8000);  // (1,1) also has software
    tlb_write(1, 7, 1, 8'd2, 8'd1, 32'h0001_0040);  // (2,1) software only
    expect_disp(1, 1, DISP_HW, 3);
    expect_disp(2, 4, DISP_HW, 3);
    expect_disp(2, 1, DISP_SW, 32'h0001_0040);
    expect_disp(1, 4, DISP_FAULT, 0);
    expect_disp(3, 1, DISP_FAULT, 0);
    // circuit swapped out: hardware entry invalidated -> software alternative
    tlb_write(0, 0, 0, 8'd1, 8'd1, 32'd3);
    expect_disp(1, 1, DISP_SW, 32'h0000_8000);
    expect_disp(2, 4, DISP_HW, 3);
    // remap onto another PFU
    tlb_write(0, 2, 1, 8'd1, 8'd1, 32'd1);
    expect_disp(1, 1, DISP_HW, 1);
    tlb_write(1, 7, 0, 8'd2, 8'd1, 32'h0);
    expect_disp(2, 1, DISP_FAULT, 0);
    // random sweep over the PFU numbers
    for (int i = 0; i < 4; i++) begin
      tlb_write(0, 3, 1, 8'd9, 8'(i + 100), 32'(i));
      expect_disp(9, 8'(i + 100), DISP_HW, 32'(i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
