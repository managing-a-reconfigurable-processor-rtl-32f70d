// proteus_pkg -- types and default sizes shared by the reconfigurable
// execution unit.
//
// The unit sits beside the integer unit of a host processor as a
// coprocessor. A custom instruction is named by a Circuit ID (CID) chosen by
// the application; combined with the Process ID (PID) of the running process
// it forms a system-wide unique ID tuple. The dispatch logic maps that tuple
// to a Programmable Function Unit (PFU), to the address of a software
// alternative, or to an instruction fault.
//
// Sizes from the published reference system: 32-bit data, a 16-entry register file and
// four PFUs. PID and CID widths, TLB depth and counter width are this
// design's own choices.
package proteus_pkg;

  localparam int unsigned DATA_W      = 32;  // register and operand width
  localparam int unsigned RF_DEPTH    = 16;  // coprocessor register file entries
  localparam int unsigned RF_AW       = $clog2(RF_DEPTH);
  localparam int unsigned NUM_PFU     = 4;   // PFUs in the demonstration system
  localparam int unsigned PID_W       = 8;   // process ID width (own choice)
  localparam int unsigned CID_W       = 8;   // circuit ID width (own choice)
  localparam int unsigned TLB_ENTRIES = 8;   // entries per TLB (own choice)
  localparam int unsigned ADDR_W      = 32;  // software alternative address width
  localparam int unsigned CNT_W       = 32;  // usage counter width (own choice)

  // ID tuple presented to the CAMs
  typedef struct packed {
    logic [PID_W-1:0] pid;
    logic [CID_W-1:0] cid;
  } id_tuple_t;

  // How the dispatch stage resolved an exec request
  typedef enum logic [1:0] {
    DISP_FAULT = 2'd0,  // no mapping in either TLB: instruction fault
    DISP_HW    = 2'd1,  // TLB 1 hit: run the circuit in a PFU
    DISP_SW    = 2'd2   // TLB 2 hit: branch and link to the software alternative
  } disp_kind_e;

  // Response the unit gives the host core for one exec request
  typedef enum logic [1:0] {
    RESP_DONE   = 2'd0,  // custom instruction completed, result written
    RESP_INTR   = 2'd1,  // interrupted: reissue later to resume
    RESP_BRANCH = 2'd2,  // branch and link to resp_addr
    RESP_FAULT  = 2'd3   // instruction fault: OS must load or map the circuit
  } resp_kind_e;

  // Software-dispatch special purpose register selector
  typedef enum logic [1:0] {
    SPR_SRC_A  = 2'd0,
    SPR_SRC_B  = 2'd1,
    SPR_RESULT = 2'd2,
    SPR_DEST   = 2'd3   // remembered destination register number
  } spr_sel_e;

endpackage
