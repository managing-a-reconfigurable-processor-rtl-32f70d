// tb_proteus_exec_ctrl -- self-checking test of the custom-instruction
// sequencer.
//
// Four behavioural PFU circuits, each needing (b & 7) + 1 clocked cycles,
// are attached with init bits kept by the testbench. The test checks, for
// each PFU and many operand values: the response kind, the result written
// to the destination register, one usage-count pulse per completion, and
// the latency (response K + 1 cycles after the request). It interrupts
// running instructions, checks that nothing is written, reissues them and
// checks that the total clocked cycles still equal K and the result is
// right. Software dispatch (operand capture, branch address) and faults are
// checked too.
module tb_proteus_exec_ctrl;
  import proteus_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ex_valid, ex_ready, irq;
  disp_kind_e disp_kind;
  logic [1:0] disp_pfu;
  logic [31:0] disp_addr, src_a, src_b, resp_addr, pfu_op_a, pfu_op_b, rf_wdata;
  logic [3:0] ex_rd, rf_waddr;
  logic resp_valid, rf_we, spr_capture;
  resp_kind_e resp_kind;
  logic [3:0] pfu_clk_en, pfu_done, cnt_inc, init_q;
  logic [3:0][31:0] pfu_result;
  int checks = 0, failures = 0;
  int clocked [4];
  int n_we, n_inc [4], n_cap;
  logic [3:0] last_waddr;
  logic [31:0] last_wdata;

  proteus_exec_ctrl dut (.*);

  for (genvar g = 0; g < 4; g++) begin : g_pfu
    pfu_circuit_model #(.SALT(32'h1000_0000 * g)) u_pfu (
      .clk, .clk_en(pfu_clk_en[g]), .init(init_q[g]), .op_a(pfu_op_a), .op_b(pfu_op_b),
      .result(pfu_result[g]), .done(pfu_done[g]));
  end

  // reference init bits: reset to 1, load done in each clocked cycle
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) init_q <= '1;
    else for (int i = 0; i < 4; i++) if (pfu_clk_en[i]) init_q[i] <= pfu_done[i];

  always_ff @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) begin
      if (pfu_clk_en[i]) clocked[i]++;
      if (cnt_inc[i]) n_inc[i]++;
    end
    if (rf_we) begin n_we++; last_waddr <= rf_waddr; last_wdata <= rf_wdata; end
    if (spr_capture) n_cap++;
  end

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // issue one request; irq raised for one cycle after irq_after cycles (-1: never)
  task automatic issue(input disp_kind_e k, input int p, input logic [31:0] addr,
                       input logic [3:0] rd, input logic [31:0] a, input logic [31:0] b,
                       input int irq_after, output resp_kind_e rk, output logic [31:0] ra,
                       output int cycles);
    @(negedge clk);
    chk(ex_ready, "not ready at issue");
    ex_valid = 1; disp_kind = k; disp_pfu = 2'(p); disp_addr = addr; ex_rd = rd;
    src_a = a; src_b = b;
    @(negedge clk);
    ex_valid = 0; src_a = $urandom; src_b = $urandom;
    cycles = 1;
    while (!resp_valid) begin
      irq = (cycles - 1 == irq_after);
      @(negedge clk);
      cycles++;
      if (cycles > 100) break;
    end
    irq = 0;
    rk = resp_kind; ra = resp_addr;
  endtask

  initial begin
    resp_kind_e rk;
    logic [31:0] ra;
    int cyc;
    ex_valid = 0; disp_kind = DISP_FAULT; disp_pfu = 0; disp_addr = 0; ex_rd = 0;
    src_a = 0; src_b = 0; irq = 0; n_we = 0; n_cap = 0;
    for (int i = 0; i < 4; i++) begin clocked[i] = 0; n_inc[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // uninterrupted PFU runs with checked latency
    for (int n = 0; n < 40; n++) begin
      automatic int p = $urandom_range(3);
      automatic logic [31:0] a = $urandom, b = $urandom;
      automatic logic [3:0] rd = 4'($urandom);
      automatic int k = int'(b[2:0]) + 1;
      automatic int we0 = n_we, inc0 = n_inc[p], clk0 = clocked[p];
      issue(DISP_HW, p, 0, rd, a, b, -1, rk, ra, cyc);
      chk(rk == RESP_DONE, "hw response kind");
      chk(cyc == k + 1, $sformatf("hw latency %0d expected %0d", cyc, k + 1));
      chk(clocked[p] - clk0 == k, "clocked cycles");
      chk(n_we == we0 + 1 && last_waddr == rd, "write-back destination");
      chk(last_wdata == ((a * 32'(k)) ^ (32'h1000_0000 * p)), $sformatf("write-back value %h a=%h k=%0d p=%0d", last_wdata, a, k, p));
      chk(n_inc[p] == inc0 + 1, "usage count pulse");
    end

    // interrupted and reissued runs
    for (int n = 0; n < 20; n++) begin
      automatic int p = $urandom_range(3);
      automatic logic [31:0] a = $urandom, b = $urandom | 32'd7;   // K = 8
      automatic logic [3:0] rd = 4'($urandom);
      automatic int we0 = n_we, inc0 = n_inc[p], clk0 = clocked[p];
      automatic int cut = $urandom_range(6, 1);
      issue(DISP_HW, p, 0, rd, a, b, cut, rk, ra, cyc);
      chk(rk == RESP_INTR, "interrupt response");
      chk(n_we == we0 && n_inc[p] == inc0, "no write-back or count when interrupted");
      chk(clocked[p] - clk0 == cut, "cycles before interrupt");
      issue(DISP_HW, p, 0, rd, a, b, -1, rk, ra, cyc);
      chk(rk == RESP_DONE, "reissue completes");
      chk(clocked[p] - clk0 == 8, $sformatf("total clocked %0d expected 8", clocked[p] - clk0));
      chk(last_wdata == ((a * 32'd8) ^ (32'h1000_0000 * p)), "resumed result");
      chk(n_inc[p] == inc0 + 1, "counted once");
    end

    // software dispatch and faults
    for (int n = 0; n < 10; n++) begin
      automatic logic [31:0] addr = $urandom;
      automatic int cap0 = n_cap, we0 = n_we;
      issue(DISP_SW, 0, addr, 4'd3, 1, 2, -1, rk, ra, cyc);
      chk(rk == RESP_BRANCH && ra == addr && cyc == 1, "software branch");
      chk(n_cap == cap0 + 1 && n_we == we0, "operand capture");
      issue(DISP_FAULT, 0, addr, 4'd3, 1, 2, -1, rk, ra, cyc);
      chk(rk == RESP_FAULT && cyc == 1 && n_cap == cap0 + 1, "fault");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
