// proteus_unit -- reconfigurable execution unit for a workstation-class
// processor, attached to the host core as a coprocessor.
//
// The unit holds its own 16 x 32-bit register file and a set of
// Programmable Function Units (PFUs), each a region of reconfigurable logic
// holding one custom-instruction circuit. An application invokes a custom
// instruction by its Circuit ID; with the running Process ID this forms a
// tuple that the dispatch stage maps, through two operating-system managed
// TLBs, to a PFU, to a software alternative, or to a fault. PFU circuits may
// be sequential and run for many cycles; a per-PFU status bit makes them
// interruptible and transparently resumable, and a per-PFU usage counter
// tells the operating system which circuits earn their place.
//
// The PFU fabric itself is outside this module: its operand bus, per-PFU
// init and clock enable, and per-PFU result and done are ports, so any
// circuit model or fabric can be attached. A PFU must keep its state while
// its clock enable is low.
//
// Interfaces (all synchronous to clk, active-low asynchronous reset):
//   exec      ex_valid/ex_ready with PID, CID and register numbers rd, rn, rm;
//             one response (resp_valid, resp_kind, resp_addr) per request,
//             see proteus_exec_ctrl for the timing.
//   xfer      move a value from the core into a register (xfer_we) or read
//             one out (xfer_raddr/xfer_rdata, combinational).
//   spr       special load (spr_rd_sel/spr_rdata), special store of a
//             software result (spr_store), operating-system write (spr_os_we).
//   tlb       operating-system write of one entry of either TLB.
//   cnt       read any usage counter (cnt_sel/cnt_rdata), clear one (cnt_clr).
//   pfu_*     the fabric side.
// Register-file writes from a PFU result, a special store and a transfer
// share one port with that priority; the core must not issue the latter two
// while a PFU instruction runs (an assertion checks it).
//
// From the published architecture: the structure, the dispatch order, the long
// instruction handshake, the usage counters and the software-dispatch
// registers, four PFUs and a 16 x 32 register file. Own choices: the port
// protocol towards the core and the operating system, PID/CID widths and the
// TLB depth (see proteus_pkg).
module proteus_unit #(
  parameter int unsigned NUM_PFU     = proteus_pkg::NUM_PFU,
  parameter int unsigned DATA_W      = proteus_pkg::DATA_W,
  parameter int unsigned RF_DEPTH    = proteus_pkg::RF_DEPTH,
  parameter int unsigned TLB_ENTRIES = proteus_pkg::TLB_ENTRIES,
  parameter int unsigned PID_W       = proteus_pkg::PID_W,
  parameter int unsigned CID_W       = proteus_pkg::CID_W,
  parameter int unsigned ADDR_W      = proteus_pkg::ADDR_W,
  parameter int unsigned CNT_W       = proteus_pkg::CNT_W,
  localparam int unsigned RF_AW      = $clog2(RF_DEPTH),
  localparam int unsigned PFU_W      = (NUM_PFU > 1) ? $clog2(NUM_PFU) : 1,
  localparam int unsigned TIDX_W     = (TLB_ENTRIES > 1) ? $clog2(TLB_ENTRIES) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // exec
  input  logic                           ex_valid,
  output logic                           ex_ready,
  input  logic [PID_W-1:0]               ex_pid,
  input  logic [CID_W-1:0]               ex_cid,
  input  logic [RF_AW-1:0]               ex_rd,
  input  logic [RF_AW-1:0]               ex_rn,
  input  logic [RF_AW-1:0]               ex_rm,
  input  logic                           irq,
  output logic                           resp_valid,
  output proteus_pkg::resp_kind_e                     resp_kind,
  output logic [ADDR_W-1:0]              resp_addr,
  // register transfers with the core
  input  logic                           xfer_we,
  input  logic [RF_AW-1:0]               xfer_waddr,
  input  logic [DATA_W-1:0]              xfer_wdata,
  input  logic [RF_AW-1:0]               xfer_raddr,
  output logic [DATA_W-1:0]              xfer_rdata,
  // software-dispatch special purpose registers
  input  proteus_pkg::spr_sel_e          spr_rd_sel,
  output logic [DATA_W-1:0]              spr_rdata,
  input  logic                           spr_store,
  input  logic                           spr_os_we,
  input  proteus_pkg::spr_sel_e          spr_wr_sel,
  input  logic [DATA_W-1:0]              spr_wdata,
  // TLB management
  input  logic                           tlb_wr_en,
  input  logic                           tlb_sel,
  input  logic [TIDX_W-1:0]              tlb_wr_idx,
  input  logic                           tlb_wr_valid,
  input  logic [PID_W-1:0]               tlb_wr_pid,
  input  logic [CID_W-1:0]               tlb_wr_cid,
  input  logic [ADDR_W-1:0]              tlb_wr_data,
  // usage counters
  input  logic [PFU_W-1:0]               cnt_sel,
  output logic [CNT_W-1:0]               cnt_rdata,
  input  logic [NUM_PFU-1:0]             cnt_clr,
  // PFU fabric
  output logic [DATA_W-1:0]              pfu_op_a,
  output logic [DATA_W-1:0]              pfu_op_b,
  output logic [NUM_PFU-1:0]             pfu_init,
  output logic [NUM_PFU-1:0]             pfu_clk_en,
  input  logic [NUM_PFU-1:0][DATA_W-1:0] pfu_result,
  input  logic [NUM_PFU-1:0]             pfu_done
);

  // dispatch
  proteus_pkg::disp_kind_e disp_kind;
  logic [PFU_W-1:0]  disp_pfu;
  logic [ADDR_W-1:0] disp_addr;

  proteus_dispatch #(
    .NUM_PFU(NUM_PFU), .TLB_ENTRIES(TLB_ENTRIES),
    .PID_W(PID_W), .CID_W(CID_W), .ADDR_W(ADDR_W)
  ) u_dispatch (
    .clk, .rst_n,
    .req_pid(ex_pid), .req_cid(ex_cid),
    .kind(disp_kind), .pfu(disp_pfu), .sw_addr(disp_addr),
    .tlb_wr_en, .tlb_sel, .tlb_wr_idx, .tlb_wr_valid,
    .tlb_wr_pid, .tlb_wr_cid, .tlb_wr_data
  );

  // register file
  logic [DATA_W-1:0] src_a, src_b;
  logic              rf_we;
  logic [RF_AW-1:0]  rf_waddr;
  logic [DATA_W-1:0] rf_wdata;

  cp_regfile #(.DEPTH(RF_DEPTH), .DATA_W(DATA_W)) u_rf (
    .clk, .rst_n,
    .ra_addr(ex_rn), .ra_data(src_a),
    .rb_addr(ex_rm), .rb_data(src_b),
    .rx_addr(xfer_raddr), .rx_data(xfer_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  // execution control
  logic                ctl_we;
  logic [RF_AW-1:0]    ctl_waddr;
  logic [DATA_W-1:0]   ctl_wdata;
  logic [NUM_PFU-1:0]  cnt_inc;
  logic                spr_capture;

  proteus_exec_ctrl #(
    .NUM_PFU(NUM_PFU), .DATA_W(DATA_W), .RF_AW(RF_AW), .ADDR_W(ADDR_W)
  ) u_ctrl (
    .clk, .rst_n,
    .ex_valid, .ex_ready,
    .disp_kind, .disp_pfu, .disp_addr,
    .ex_rd, .src_a, .src_b, .irq,
    .resp_valid, .resp_kind, .resp_addr,
    .pfu_op_a, .pfu_op_b, .pfu_clk_en, .pfu_result, .pfu_done,
    .rf_we(ctl_we), .rf_waddr(ctl_waddr), .rf_wdata(ctl_wdata),
    .cnt_inc, .spr_capture
  );

  // software-dispatch registers
  logic              spr_rf_we;
  logic [RF_AW-1:0]  spr_rf_waddr;
  logic [DATA_W-1:0] spr_rf_wdata;

  sw_dispatch_regs #(.DATA_W(DATA_W), .RF_AW(RF_AW)) u_spr (
    .clk, .rst_n,
    .capture(spr_capture), .cap_a(src_a), .cap_b(src_b), .cap_dest(ex_rd),
    .rd_sel(spr_rd_sel), .rd_data(spr_rdata),
    .store(spr_store), .os_we(spr_os_we), .wr_sel(spr_wr_sel), .wdata(spr_wdata),
    .rf_we(spr_rf_we), .rf_waddr(spr_rf_waddr), .rf_wdata(spr_rf_wdata)
  );

  // register-file write arbitration: PFU result, special store, transfer
  always_comb begin
    rf_we    = 1'b1;
    rf_waddr = xfer_waddr;
    rf_wdata = xfer_wdata;
    if (ctl_we) begin
      rf_waddr = ctl_waddr;
      rf_wdata = ctl_wdata;
    end else if (spr_rf_we) begin
      rf_waddr = spr_rf_waddr;
      rf_wdata = spr_rf_wdata;
    end else if (!xfer_we) begin
      rf_we = 1'b0;
    end
  end

  // per-PFU status bit and usage counter
  logic [NUM_PFU-1:0][CNT_W-1:0] counts;

  for (genvar g = 0; g < NUM_PFU; g++) begin : g_pfu
    pfu_init_status u_status (
      .clk, .rst_n,
      .clk_en(pfu_clk_en[g]), .done(pfu_done[g]), .init(pfu_init[g])
    );
    usage_counter #(.CNT_W(CNT_W)) u_count (
      .clk, .rst_n,
      .complete(cnt_inc[g]), .clr(cnt_clr[g]), .count(counts[g])
    );
  end

  assign cnt_rdata = counts[cnt_sel];

  a_xfer_alone: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(xfer_we && (ctl_we || spr_rf_we)))
    else $error("proteus_unit: register transfer collides with a result write");
  a_store_alone: assert property (@(posedge clk) disable iff (!rst_n) !(ctl_we && spr_rf_we))
    else $error("proteus_unit: special store collides with a PFU result write");

endmodule
