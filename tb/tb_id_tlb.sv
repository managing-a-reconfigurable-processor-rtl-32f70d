// tb_id_tlb -- self-checking test of the ID-tuple TLB.
//
// Writes random entries (some invalidated, several sharing one data word),
// then looks up every stored tuple and random absent ones, comparing hit and
// data with a reference copy of the table kept in the testbench. Also
// checks that reset leaves the table empty and that one tuple with
// different PIDs resolves differently (no flush on a context switch).
module tb_id_tlb;
  localparam int ENTRIES = 8;
  localparam int DW = 32;

  logic clk = 0, rst_n = 0;
  logic [7:0] key_pid, key_cid, wr_pid, wr_cid;
  logic hit, wr_en, wr_valid;
  logic [DW-1:0] hit_data, wr_data;
  logic [2:0] wr_idx;
  int checks = 0, failures = 0;

  logic        m_valid [ENTRIES];
  logic [7:0]  m_pid   [ENTRIES];
  logic [7:0]  m_cid   [ENTRIES];
  logic [DW-1:0] m_data [ENTRIES];

  id_tlb #(.ENTRIES(ENTRIES), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic lookup(input logic [7:0] p, input logic [7:0] c);
    logic exp_hit = 0;
    logic [DW-1:0] exp_data = '0;
    key_pid = p; key_cid = c;
    for (int i = 0; i < ENTRIES; i++)
      if (m_valid[i] && m_pid[i] == p && m_cid[i] == c) begin exp_hit = 1; exp_data = m_data[i]; end
    #1;
    checks++;
    if (hit !== exp_hit || (exp_hit && hit_data !== exp_data)) begin
      failures++;
      $display("FAIL lookup %h/%h: hit=%0d data=%h exp %0d %h", p, c, hit, hit_data, exp_hit, exp_data);
    end
  endtask

  task automatic write(input int idx, input logic v, input logic [7:0] p, input logic [7:0] c,
                       input logic [DW-1:0] d);
    @(negedge clk);
    wr_en = 1; wr_idx = idx[2:0]; wr_valid = v; wr_pid = p; wr_cid = c; wr_data = d;
    @(negedge clk);
    wr_en = 0;
    m_valid[idx] = v; m_pid[idx] = p; m_cid[idx] = c; m_data[idx] = d;
  endtask

  initial begin
    wr_en = 0; wr_idx = 0; wr_valid = 0; wr_pid = 0; wr_cid = 0; wr_data = 0;
    key_pid = 0; key_cid = 0;
    for (int i = 0; i < ENTRIES; i++) begin m_valid[i] = 0; m_pid[i] = 0; m_cid[i] = 0; m_data[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // empty after reset
    for (int i = 0; i < 16; i++) lookup(8'($urandom), 8'($urandom));
    lookup(0, 0);
    // same CID in two processes, shared data
    write(0, 1, 8'd1, 8'd7, 32'h0000_0002);
    write(1, 1, 8'd2, 8'd7, 32'h0000_0003);
    write(2, 1, 8'd3, 8'd9, 32'h0000_0002);
    lookup(1, 7); lookup(2, 7); lookup(3, 9); lookup(3, 7); lookup(1, 9);
    // random rounds with distinct tuples per entry
    for (int r = 0; r < 40; r++) begin
      automatic int idx = $urandom_range(ENTRIES - 1);
      automatic logic [7:0] p = 8'($urandom_range(3)), c = 8'(idx * 16 + $urandom_range(3));
      write(idx, ($urandom_range(3) != 0), p, c, $urandom);
      for (int i = 0; i < ENTRIES; i++) lookup(m_pid[i], m_cid[i]);
      lookup(8'($urandom_range(3)), 8'($urandom));
    end
    // invalidate everything
    for (int i = 0; i < ENTRIES; i++) write(i, 0, m_pid[i], m_cid[i], m_data[i]);
    for (int i = 0; i < ENTRIES; i++) lookup(m_pid[i], m_cid[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
