// tb_proteus_unit -- end-to-end test of the reconfigurable execution unit
// at its default sizes (4 PFUs, 16 x 32 registers, 8-entry TLBs).
//
// Four behavioural sequential circuits are attached to the PFU ports; PFU p
// computes (a * K) ^ (p << 28) in K = (b & 7) + 1 cycles. The testbench
// plays both the host core and the operating system's custom-instruction
// scheduler: it moves operands in and out of the register file, issues
// custom instructions, and answers faults by writing TLB entries. Every
// result is compared with a value computed here, and latencies with K + 1.
//
// Mechanisms exercised and counted (each must occur at least once):
//   hw_done      custom instruction completed in a PFU
//   fault_load   fault on an unmapped tuple, circuit then mapped, reissued
//   shared       two tuples of different processes sharing one PFU
//   ctx_switch   one CID resolving differently for two PIDs, no flush
//   interrupt    instruction interrupted, reissued and resumed
//   map_fault    fault although the circuit is still loaded (entry evicted)
//   sw_branch    dispatch to a software alternative with operand capture
//   spr_switch   special registers saved and restored across a switch
//   cnt_clear    usage counters read and cleared
//   eviction     circuit replaced under contention (5 processes, 4 PFUs)
//   sw_fallback  circuit evicted, process falls back to its software routine
module tb_proteus_unit;
  import proteus_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ex_valid, ex_ready, irq, resp_valid;
  logic [7:0] ex_pid, ex_cid, tlb_wr_pid, tlb_wr_cid;
  logic [3:0] ex_rd, ex_rn, ex_rm, xfer_waddr, xfer_raddr;
  resp_kind_e resp_kind;
  logic [31:0] resp_addr, xfer_wdata, xfer_rdata, spr_rdata, spr_wdata, tlb_wr_data, cnt_rdata;
  logic xfer_we, spr_store, spr_os_we, tlb_wr_en, tlb_sel, tlb_wr_valid;
  spr_sel_e spr_rd_sel, spr_wr_sel;
  logic [2:0] tlb_wr_idx;
  logic [1:0] cnt_sel;
  logic [3:0] cnt_clr, pfu_init, pfu_clk_en, pfu_done;
  logic [31:0] pfu_op_a, pfu_op_b;
  logic [3:0][31:0] pfu_result;

  int checks = 0, failures = 0;
  logic [31:0] rf [16];
  int completions [4];

  typedef enum int {M_HW_DONE, M_FAULT_LOAD, M_SHARED, M_CTX_SWITCH, M_INTERRUPT, M_MAP_FAULT,
                    M_SW_BRANCH, M_SPR_SWITCH, M_CNT_CLEAR, M_EVICTION, M_SW_FALLBACK, M_NUM}
    mech_e;
  int mech [M_NUM];

  proteus_unit dut (.*);

  for (genvar g = 0; g < 4; g++) begin : g_pfu
    pfu_circuit_model #(.SALT(32'(g) << 28)) u_pfu (
      .clk, .clk_en(pfu_clk_en[g]), .init(pfu_init[g]), .op_a(pfu_op_a), .op_b(pfu_op_b),
      .result(pfu_result[g]), .done(pfu_done[g]));
  end

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] circuit(input int p, input logic [31:0] a, input logic [31:0] b);
    return (a * (32'(b[2:0]) + 32'd1)) ^ (32'(p) << 28);
  endfunction

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- host core side ----
  task automatic reg_write(input int r, input logic [31:0] v);
    @(negedge clk);
    xfer_we = 1; xfer_waddr = 4'(r); xfer_wdata = v;
    @(negedge clk);
    xfer_we = 0;
    rf[r] = v;
  endtask

  task automatic check_regs();
    for (int r = 0; r < 16; r++) begin
      xfer_raddr = 4'(r); #1;
      chk(xfer_rdata == rf[r], $sformatf("r%0d = %h expected %h", r, xfer_rdata, rf[r]));
    end
  endtask

  task automatic exec(input int pid, input int cid, input int rd, input int rn, input int rm,
                      input int irq_after, output resp_kind_e rk, output logic [31:0] ra,
                      output int cycles);
    @(negedge clk);
    chk(ex_ready, "unit not ready");
    ex_valid = 1; ex_pid = 8'(pid); ex_cid = 8'(cid);
    ex_rd = 4'(rd); ex_rn = 4'(rn); ex_rm = 4'(rm);
    @(negedge clk);
    ex_valid = 0;
    cycles = 1;
    while (!resp_valid && cycles < 100) begin
      irq = (cycles - 1 == irq_after);
      @(negedge clk);
      cycles++;
    end
    irq = 0;
    rk = resp_kind; ra = resp_addr;
  endtask

  // run a custom instruction expected to complete in PFU p
  task automatic run_hw(input int pid, input int cid, input int p);
    automatic int rd = $urandom_range(15), rn = $urandom_range(15), rm = $urandom_range(15);
    automatic logic [31:0] exp;
    automatic int k;
    resp_kind_e rk; logic [31:0] ra; int cyc;
    if (rn == rm) rm = (rn + 1) % 16;
    reg_write(rn, $urandom); reg_write(rm, $urandom);
    exp = circuit(p, rf[rn], rf[rm]);
    k = int'(rf[rm][2:0]) + 1;
    exec(pid, cid, rd, rn, rm, -1, rk, ra, cyc);
    chk(rk == RESP_DONE, $sformatf("(%0d,%0d) kind %s expected DONE", pid, cid, rk.name()));
    chk(cyc == k + 1, $sformatf("latency %0d expected %0d", cyc, k + 1));
    rf[rd] = exp;
    completions[p]++;
    mech[M_HW_DONE]++;
    check_regs();
  endtask

  task automatic expect_fault(input int pid, input int cid);
    resp_kind_e rk; logic [31:0] ra; int cyc;
    exec(pid, cid, 0, 1, 2, -1, rk, ra, cyc);
    chk(rk == RESP_FAULT && cyc == 1, $sformatf("(%0d,%0d) expected fault, got %s", pid, cid,
                                                rk.name()));
    check_regs();
  endtask

  // ---- operating system side ----
  task automatic tlb_write(input logic sw, input int idx, input logic v, input int pid,
                           input int cid, input logic [31:0] d);
    @(negedge clk);
    tlb_wr_en = 1; tlb_sel = sw; tlb_wr_idx = 3'(idx); tlb_wr_valid = v;
    tlb_wr_pid = 8'(pid); tlb_wr_cid = 8'(cid); tlb_wr_data = d;
    @(negedge clk);
    tlb_wr_en = 0;
  endtask

  task automatic check_counters();
    for (int p = 0; p < 4; p++) begin
      cnt_sel = 2'(p); #1;
      chk(cnt_rdata == 32'(completions[p]), $sformatf("PFU%0d count %0d expected %0d", p,
                                                      cnt_rdata, completions[p]));
    end
  endtask

  // software alternative: reads operands through the special load, stores a+b
  task automatic sw_routine(input int rd, input int rn, input int rm);
    automatic logic [31:0] a, b;
    spr_rd_sel = SPR_SRC_A; #1 a = spr_rdata;
    spr_rd_sel = SPR_SRC_B; #1 b = spr_rdata;
    chk(a == rf[rn] && b == rf[rm], "special load returns captured operands");
    spr_rd_sel = SPR_DEST; #1;
    chk(spr_rdata == 32'(rd), "destination remembered");
    @(negedge clk);
    spr_store = 1; spr_wdata = a + b;
    @(negedge clk);
    spr_store = 0;
    rf[rd] = a + b;
    check_regs();
  endtask

  task automatic run_sw(input int pid, input int cid, input logic [31:0] addr);
    automatic int rd = $urandom_range(15), rn = $urandom_range(15), rm = $urandom_range(15);
    resp_kind_e rk; logic [31:0] ra; int cyc;
    reg_write(rn, $urandom); reg_write(rm, $urandom);
    exec(pid, cid, rd, rn, rm, -1, rk, ra, cyc);
    chk(rk == RESP_BRANCH && ra == addr && cyc == 1,
        $sformatf("(%0d,%0d) expected branch to %h, got %s %h", pid, cid, addr, rk.name(), ra));
    mech[M_SW_BRANCH]++;
    sw_routine(rd, rn, rm);
  endtask

  initial begin
    resp_kind_e rk; logic [31:0] ra; int cyc;
    ex_valid = 0; ex_pid = 0; ex_cid = 0; ex_rd = 0; ex_rn = 0; ex_rm = 0; irq = 0;
    xfer_we = 0; xfer_waddr = 0; xfer_wdata = 0; xfer_raddr = 0;
    spr_rd_sel = SPR_SRC_A; spr_wr_sel = SPR_SRC_A; spr_store = 0; spr_os_we = 0; spr_wdata = 0;
    tlb_wr_en = 0; tlb_sel = 0; tlb_wr_idx = 0; tlb_wr_valid = 0; tlb_wr_pid = 0;
    tlb_wr_cid = 0; tlb_wr_data = 0; cnt_sel = 0; cnt_clr = 0;
    for (int i = 0; i < 16; i++) rf[i] = 0;
    for (int i = 0; i < 4; i++) completions[i] = 0;
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check_regs();
    for (int r = 0; r < 16; r++) reg_write(r, $urandom);
    check_regs();

    // first use of a circuit faults; the OS loads it into PFU 0 and maps it
    expect_fault(1, 5);
    tlb_write(0, 0, 1, 1, 5, 0);
    run_hw(1, 5, 0);
    mech[M_FAULT_LOAD]++;

    // process 2 shares the circuit under its own CID
    tlb_write(0, 1, 1, 2, 9, 0);
    run_hw(2, 9, 0);
    run_hw(1, 5, 0);
    mech[M_SHARED]++;

    // CID 5 of process 2 is a different circuit: it faults, then maps to PFU 1
    expect_fault(2, 5);
    tlb_write(0, 2, 1, 2, 5, 1);
    run_hw(2, 5, 1);
    run_hw(1, 5, 0);
    mech[M_CTX_SWITCH]++;

    // interrupted long instruction, reissued and resumed
    for (int n = 0; n < 6; n++) begin
      automatic int rd = 9, rn = 10, rm = 11;
      automatic int cut = $urandom_range(6, 1);
      automatic logic [31:0] exp;
      automatic int p = (n % 2 == 0) ? 0 : 1;
      automatic int pid = (p == 0) ? 1 : 2;
      reg_write(rn, $urandom); reg_write(rm, $urandom | 32'd7);
      exp = circuit(p, rf[rn], rf[rm]);
      exec(pid, 5, rd, rn, rm, cut, rk, ra, cyc);
      chk(rk == RESP_INTR, $sformatf("expected interrupt, got %s", rk.name()));
      check_regs();   // nothing written
      exec(pid, 5, rd, rn, rm, -1, rk, ra, cyc);
      chk(rk == RESP_DONE, "reissue completes");
      chk(cyc == 8 - cut + 1, $sformatf("resumed latency %0d expected %0d", cyc, 8 - cut + 1));
      rf[rd] = exp;
      completions[p]++;
      check_regs();
      mech[M_INTERRUPT]++;
    end

    // usage counters count completions only; the OS reads and clears them
    check_counters();
    @(negedge clk); cnt_clr = 4'b0011; @(negedge clk); cnt_clr = 0;
    completions[0] = 0; completions[1] = 0;
    check_counters();
    mech[M_CNT_CLEAR]++;
    run_hw(2, 9, 0);
    check_counters();

    // software alternative for process 3
    tlb_write(1, 0, 1, 3, 7, 32'h0000_4000);
    run_sw(3, 7, 32'h0000_4000);

    // special registers survive a process switch through OS save and restore
    begin
      automatic logic [31:0] saved [4];
      for (int s = 0; s < 4; s++) begin spr_rd_sel = spr_sel_e'(s); #1 saved[s] = spr_rdata; end
      tlb_write(1, 1, 1, 4, 7, 32'h0000_5000);
      run_sw(4, 7, 32'h0000_5000);
      for (int s = 0; s < 4; s++) begin
        @(negedge clk); spr_os_we = 1; spr_wr_sel = spr_sel_e'(s); spr_wdata = saved[s];
        @(negedge clk); spr_os_we = 0;
      end
      for (int s = 0; s < 4; s++) begin
        spr_rd_sel = spr_sel_e'(s); #1;
        chk(spr_rdata == saved[s], $sformatf("SPR %0d restored", s));
      end
      mech[M_SPR_SWITCH]++;
    end

    // mapping pushed out of the TLB while the circuit stays loaded
    tlb_write(0, 0, 0, 1, 5, 0);
    expect_fault(1, 5);
    tlb_write(0, 3, 1, 1, 5, 0);   // OS finds the circuit already in PFU 0
    run_hw(1, 5, 0);
    mech[M_MAP_FAULT]++;

    // contention: five processes, one circuit each, four PFUs, round-robin
    // replacement. Process 14 also has a software alternative.
    for (int i = 0; i < 8; i++) tlb_write(0, i, 0, 0, 0, 0);
    tlb_write(1, 2, 1, 14, 1, 32'h0000_9000);
    begin
      automatic int owner [4] = '{-1, -1, -1, -1};
      automatic int victim = 0;
      for (int round = 0; round < 4; round++) begin
        for (int pr = 10; pr < 15; pr++) begin
          automatic int p = -1;
          for (int q = 0; q < 4; q++) if (owner[q] == pr) p = q;
          if (p < 0) begin
            if (pr == 14 && round > 0) begin
              // no free PFU: the OS leaves it on its software alternative
              run_sw(14, 1, 32'h0000_9000);
              mech[M_SW_FALLBACK]++;
              continue;
            end
            if (pr == 14) begin
              run_sw(14, 1, 32'h0000_9000);
            end
            else begin
              expect_fault(pr, 1);
            end
            if (owner[victim] >= 0) mech[M_EVICTION]++;
            owner[victim] = pr;
            p = victim;
            victim = (victim + 1) % 4;
            tlb_write(0, p, 1, pr, 1, 32'(p));   // entry p maps the tuple to PFU p
          end
          run_hw(pr, 1, p);
        end
      end
    end
    check_counters();

    for (int i = 0; i < M_NUM; i++) begin
      automatic mech_e m = mech_e'(i);
      $display("mechanism %-14s occurred %0d times", m.name(), mech[i]);
      chk(mech[i] > 0, $sformatf("mechanism %s never occurred", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
