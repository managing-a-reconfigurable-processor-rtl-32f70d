// tb_sched_workload -- contention workload on the full unit at default
// sizes (four PFUs), modelled on the scheduling experiments the design was
// made for.
//
// N = 1..8 processes each run a loop of custom instructions: either one
// circuit per process (like an image-blending or cipher kernel) or two
// circuits used alternately in a tight loop (like an audio-echo kernel).
// The testbench is the host core plus a small operating system:
//   * processes are scheduled round-robin with a time quantum, long
//     (batch-like) or short (interactive-like), and switch at instruction
//     boundaries;
//   * on an instruction fault the OS maps the circuit into a free PFU, or
//     when all four are taken either evicts one (round-robin or random
//     victim, charging a fixed reload time) or, in software-dispatch mode,
//     maps the tuple to a software alternative instead;
//   * a software alternative reads its operands through the special
//     registers, computes the same function and stores its result.
// All PFUs run the same circuit model (a * ((b & 7) + 1)), so every result
// is checked whatever PFU or routine produced it.
//
// Checked per run: every result; that circuits are evicted exactly when the
// processes need more than four circuits (contention after four one-circuit
// or two two-circuit processes); that software mode never evicts and
// dispatches to software exactly under contention; that the usage counters
// add up to the hardware completions; that completion time grows linearly
// with the number of processes until contention, and clearly faster after
// it with round-robin replacement and short quanta. A completion-time table
// is printed.
// Reload time, quanta and loop length are scaled-down cycle counts.
module tb_sched_workload;
  import proteus_pkg::*;

  localparam int ITER        = 60;    // loop iterations per process
  localparam int LOAD_CYCLES = 100;   // cost of loading a circuit (scaled)
  localparam int SW_CYCLES   = 25;    // extra cost of a software alternative (scaled)
  localparam int Q_LONG      = 1000;  // batch-like quantum, cycles (scaled)
  localparam int Q_SHORT     = 100;   // interactive-like quantum, cycles (scaled)

  typedef enum int {POL_RR, POL_RANDOM, POL_SOFT} policy_e;

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
  longint cycle = 0;

  proteus_unit dut (.*);

  for (genvar g = 0; g < 4; g++) begin : g_pfu
    pfu_circuit_model u_pfu (
      .clk, .clk_en(pfu_clk_en[g]), .init(pfu_init[g]), .op_a(pfu_op_a), .op_b(pfu_op_b),
      .result(pfu_result[g]), .done(pfu_done[g]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;
  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic reg_write(input int r, input logic [31:0] v);
    @(negedge clk); xfer_we = 1; xfer_waddr = 4'(r); xfer_wdata = v;
    @(negedge clk); xfer_we = 0;
  endtask

  task automatic tlb_write(input logic sw, input int idx, input logic v, input int pid,
                           input int cid, input logic [31:0] d);
    @(negedge clk);
    tlb_wr_en = 1; tlb_sel = sw; tlb_wr_idx = 3'(idx); tlb_wr_valid = v;
    tlb_wr_pid = 8'(pid); tlb_wr_cid = 8'(cid); tlb_wr_data = d;
    @(negedge clk);
    tlb_wr_en = 0;
  endtask

  task automatic exec(input int pid, input int cid, output resp_kind_e rk,
                      output logic [31:0] ra);
    @(negedge clk);
    ex_valid = 1; ex_pid = 8'(pid); ex_cid = 8'(cid); ex_rd = 4'd2; ex_rn = 4'd0; ex_rm = 4'd1;
    @(negedge clk);
    ex_valid = 0;
    while (!resp_valid) @(negedge clk);
    rk = resp_kind; ra = resp_addr;
  endtask

  // one complete run; returns cycles taken
  task automatic run(input int nproc, input int ncirc, input policy_e pol, input int quantum,
                     output longint cycles_taken);
    int owner_pid [4], owner_cid [4];
    int sw_next = 0;
    int rr_victim = 0;
    int evictions = 0, loads = 0, sw_calls = 0, hw_done = 0;
    int iter [8], step [8];
    int remaining = nproc;
    int cur = 0;
    longint t0, q0;
    resp_kind_e rk; logic [31:0] ra;
    for (int p = 0; p < 4; p++) begin owner_pid[p] = -1; owner_cid[p] = -1; end
    for (int i = 0; i < 8; i++) begin iter[i] = 0; step[i] = 0; end
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    t0 = cycle;
    while (remaining > 0) begin
      q0 = cycle;
      // run process `cur` until its quantum expires or it finishes
      while (iter[cur] < ITER && cycle - q0 < longint'(quantum)) begin
        automatic int pid = cur + 1, cid = step[cur] + 1;
        automatic logic [31:0] a = $urandom, b = $urandom;
        automatic logic [31:0] expv = a * (32'(b[2:0]) + 32'd1);
        automatic logic finished = 0;
        reg_write(0, a); reg_write(1, b);
        while (!finished) begin
          exec(pid, cid, rk, ra);
          case (rk)
            RESP_DONE: begin
              xfer_raddr = 4'd2; #1;
              chk(xfer_rdata == expv, $sformatf("hw result p%0d c%0d", pid, cid));
              hw_done++;
              finished = 1;
            end
            RESP_BRANCH: begin
              automatic logic [31:0] sa, sb;
              spr_rd_sel = SPR_SRC_A; #1 sa = spr_rdata;
              spr_rd_sel = SPR_SRC_B; #1 sb = spr_rdata;
              repeat (SW_CYCLES) @(negedge clk);
              spr_store = 1; spr_wdata = sa * (32'(sb[2:0]) + 32'd1);
              @(negedge clk); spr_store = 0;
              xfer_raddr = 4'd2; #1;
              chk(xfer_rdata == expv, $sformatf("sw result p%0d c%0d", pid, cid));
              sw_calls++;
              finished = 1;
            end
            RESP_FAULT: begin
              // operating system: find a free PFU, else evict or go to software
              automatic int slot = -1;
              for (int p = 0; p < 4; p++) if (slot < 0 && owner_pid[p] < 0) slot = p;
              if (slot < 0 && pol == POL_SOFT) begin
                tlb_write(1, sw_next, 1, pid, cid, 32'h1000 + 32'(pid * 16 + cid));
                sw_next = (sw_next + 1) % 8;
              end else begin
                if (slot < 0) begin
                  slot = (pol == POL_RR) ? rr_victim : $urandom_range(3);
                  rr_victim = (rr_victim + 1) % 4;
                  evictions++;
                end
                repeat (LOAD_CYCLES) @(negedge clk);
                loads++;
                owner_pid[slot] = pid; owner_cid[slot] = cid;
                tlb_write(0, slot, 1, pid, cid, 32'(slot));   // entry `slot` tracks PFU `slot`
              end
            end
            default: chk(0, "unexpected interrupt response");
          endcase
        end
        step[cur] = (step[cur] + 1) % ncirc;
        if (step[cur] == 0) begin
          iter[cur]++;
          if (iter[cur] == ITER) remaining--;
        end
      end
      cur = (cur + 1) % nproc;
    end
    cycles_taken = cycle - t0;
    // bookkeeping checks
    begin
      automatic int need = nproc * ncirc;
      automatic int cnt_sum = 0;
      chk(loads == ((pol == POL_SOFT) ? ((need < 4) ? need : 4) : loads), "load count");
      if (pol == POL_SOFT) begin
        chk(evictions == 0, "software mode never evicts");
        chk((sw_calls > 0) == (need > 4), $sformatf("software calls %0d with %0d circuits",
                                                    sw_calls, need));
      end else begin
        chk((evictions > 0) == (need > 4), $sformatf("evictions %0d with %0d circuits",
                                                     evictions, need));
        chk(sw_calls == 0, "no software dispatch without software mode");
      end
      for (int p = 0; p < 4; p++) begin cnt_sel = 2'(p); #1 cnt_sum += int'(cnt_rdata); end
      chk(cnt_sum == hw_done, $sformatf("usage counters %0d vs completions %0d", cnt_sum, hw_done));
      chk(hw_done + sw_calls == nproc * ncirc * ITER, "all instructions executed");
    end
  endtask

  initial begin
    longint t, t1;
    string line;
    ex_valid = 0; ex_pid = 0; ex_cid = 0; ex_rd = 0; ex_rn = 0; ex_rm = 0; irq = 0;
    xfer_we = 0; xfer_waddr = 0; xfer_wdata = 0; xfer_raddr = 0;
    spr_rd_sel = SPR_SRC_A; spr_wr_sel = SPR_SRC_A; spr_store = 0; spr_os_we = 0; spr_wdata = 0;
    tlb_wr_en = 0; tlb_sel = 0; tlb_wr_idx = 0; tlb_wr_valid = 0; tlb_wr_pid = 0;
    tlb_wr_cid = 0; tlb_wr_data = 0; cnt_sel = 0; cnt_clr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    $display("completion time in cycles, by number of processes 1..8");
    for (int nc = 1; nc <= 2; nc++)
      for (int pol = 0; pol < 3; pol++)
        for (int qi = 0; qi < 2; qi++) begin
          automatic int q = (qi == 0) ? Q_LONG : Q_SHORT;
          line = $sformatf("%0d circuit(s) %-10s %-5s:", nc, policy_e'(pol),
                           (qi == 0) ? "long" : "short");
          for (int n = 1; n <= 8; n++) begin
            run(n, nc, policy_e'(pol), q, t);
            line = {line, $sformatf(" %7d", t)};
            if (n == 1) t1 = t;
            // without contention the time grows linearly with the process count
            if (n * nc <= 4)
              chk(real'(t) < real'(n) * real'(t1) * 1.15,
                  $sformatf("%0d processes: %0d cycles is not linear in %0d", n, t, t1));
            // with contention and short quanta, circuit swapping dominates
            if (n * nc > 4 && pol == POL_RR && qi == 1)
              chk(real'(t) > real'(n) * real'(t1) * 1.5,
                  $sformatf("%0d processes: no contention cost visible", n));
          end
          $display("%s", line);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
