// id_tlb -- ID-tuple translation buffer: a content addressable memory of
// (PID, CID) tuples that indexes a RAM of mapping data.
//
// The dispatch stage holds two of these. In the first the RAM word is the
// number of the PFU that holds the circuit; in the second it is the address
// of the software alternative. Several tuples may hold the same data, which
// is how one circuit or routine is shared by many tuples; this is why a
// plain per-PFU ID register is not enough.
//
// Lookup is combinational: every valid entry compares its tuple with the
// key, and the RAM word of the matching entry is driven out with `hit` in
// the same cycle (the decode stage). Entries are written by the operating
// system one at a time through the write port; there is no hardware
// replacement, because the operating system decides what to keep. Reset
// clears all valid bits; nothing is flushed on a context switch because the
// PID is part of the key.
//
// A tuple should be present at most once. If the operating system writes a
// duplicate, the lowest-numbered matching entry wins and an assertion
// reports it in simulation.
//
// From the published architecture: CAM of PID and CID indexing a RAM. Own choices:
// the depth, the write port and the lowest-index priority.
module id_tlb #(
  parameter int unsigned ENTRIES = proteus_pkg::TLB_ENTRIES,
  parameter int unsigned PID_W   = proteus_pkg::PID_W,
  parameter int unsigned CID_W   = proteus_pkg::CID_W,
  parameter int unsigned DATA_W  = 2,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup (decode stage)
  input  logic [PID_W-1:0]  key_pid,
  input  logic [CID_W-1:0]  key_cid,
  output logic              hit,
  output logic [DATA_W-1:0] hit_data,
  // operating-system write port
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_idx,
  input  logic              wr_valid,   // 0 invalidates the entry
  input  logic [PID_W-1:0]  wr_pid,
  input  logic [CID_W-1:0]  wr_cid,
  input  logic [DATA_W-1:0] wr_data
);

  logic [ENTRIES-1:0]            valid_q;
  logic [ENTRIES-1:0][PID_W-1:0] pid_q;
  logic [ENTRIES-1:0][CID_W-1:0] cid_q;
  logic [ENTRIES-1:0][DATA_W-1:0] data_q;
  logic [ENTRIES-1:0]            match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      pid_q   <= '0;
      cid_q   <= '0;
      data_q  <= '0;
    end else if (wr_en) begin
      valid_q[wr_idx] <= wr_valid;
      pid_q[wr_idx]   <= wr_pid;
      cid_q[wr_idx]   <= wr_cid;
      data_q[wr_idx]  <= wr_data;
    end
  end

  // CAM compare lines
  always_comb begin
    for (int i = 0; i < ENTRIES; i++)
      match[i] = valid_q[i] && (pid_q[i] == key_pid) && (cid_q[i] == key_cid);
  end

  // priority encode to the RAM word
  always_comb begin
    hit      = 1'b0;
    hit_data = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit      = 1'b1;
        hit_data = data_q[i];
      end
    end
  end

  a_unique_tuple: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match))
    else $error("id_tlb: ID tuple %0h/%0h present in more than one entry", key_pid, key_cid);

endmodule
