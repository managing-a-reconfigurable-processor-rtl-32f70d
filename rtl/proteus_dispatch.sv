// proteus_dispatch -- resolves a custom-instruction request in the decode
// stage.
//
// The (PID, CID) tuple of the request is looked up in two TLBs at once.
// TLB 1 maps tuples to the number of the PFU holding the circuit; a hit
// there decodes the instruction as a PFU invocation. Otherwise TLB 2 maps
// tuples to the address of a software alternative; a hit there decodes it
// as a branch and link to that address. If neither holds the tuple the
// instruction faults and the operating system is invoked, which may load
// the circuit, add a mapping or kill the process.
//
// Everything is combinational, so the result is valid in the cycle the
// request is presented. The two TLBs are written by the operating system
// through one shared port, `tlb_sel` choosing which (0: hardware TLB,
// 1: software TLB). The software TLB stores the full address; the hardware
// TLB stores the PFU number in the low bits of the same write data.
//
// From the published architecture (its dispatch figure): the order hardware, software, fault.
// Own choices: both TLBs are searched in parallel rather than one after the
// other, and the shared write port.
module proteus_dispatch #(
  parameter int unsigned NUM_PFU     = proteus_pkg::NUM_PFU,
  parameter int unsigned TLB_ENTRIES = proteus_pkg::TLB_ENTRIES,
  parameter int unsigned PID_W       = proteus_pkg::PID_W,
  parameter int unsigned CID_W       = proteus_pkg::CID_W,
  parameter int unsigned ADDR_W      = proteus_pkg::ADDR_W,
  localparam int unsigned PFU_W      = (NUM_PFU > 1) ? $clog2(NUM_PFU) : 1,
  localparam int unsigned IDX_W      = (TLB_ENTRIES > 1) ? $clog2(TLB_ENTRIES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // request
  input  logic [PID_W-1:0]        req_pid,
  input  logic [CID_W-1:0]        req_cid,
  output proteus_pkg::disp_kind_e kind,
  output logic [PFU_W-1:0]        pfu,
  output logic [ADDR_W-1:0]       sw_addr,
  // operating-system TLB write port
  input  logic                    tlb_wr_en,
  input  logic                    tlb_sel,
  input  logic [IDX_W-1:0]        tlb_wr_idx,
  input  logic                    tlb_wr_valid,
  input  logic [PID_W-1:0]        tlb_wr_pid,
  input  logic [CID_W-1:0]        tlb_wr_cid,
  input  logic [ADDR_W-1:0]       tlb_wr_data
);
  import proteus_pkg::*;

  logic             hw_hit, sw_hit;

  id_tlb #(.ENTRIES(TLB_ENTRIES), .PID_W(PID_W), .CID_W(CID_W), .DATA_W(PFU_W)) u_tlb_hw (
    .clk, .rst_n,
    .key_pid(req_pid), .key_cid(req_cid),
    .hit(hw_hit), .hit_data(pfu),
    .wr_en(tlb_wr_en && !tlb_sel), .wr_idx(tlb_wr_idx), .wr_valid(tlb_wr_valid),
    .wr_pid(tlb_wr_pid), .wr_cid(tlb_wr_cid), .wr_data(tlb_wr_data[PFU_W-1:0])
  );

  id_tlb #(.ENTRIES(TLB_ENTRIES), .PID_W(PID_W), .CID_W(CID_W), .DATA_W(ADDR_W)) u_tlb_sw (
    .clk, .rst_n,
    .key_pid(req_pid), .key_cid(req_cid),
    .hit(sw_hit), .hit_data(sw_addr),
    .wr_en(tlb_wr_en && tlb_sel), .wr_idx(tlb_wr_idx), .wr_valid(tlb_wr_valid),
    .wr_pid(tlb_wr_pid), .wr_cid(tlb_wr_cid), .wr_data(tlb_wr_data)
  );

  always_comb begin
    if (hw_hit)      kind = DISP_HW;
    else if (sw_hit) kind = DISP_SW;
    else             kind = DISP_FAULT;
  end

endmodule
