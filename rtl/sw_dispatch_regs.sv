// sw_dispatch_regs -- special purpose registers used by software
// alternatives of custom instructions.
//
// When a custom instruction is dispatched to its software alternative, the
// branch also copies the two source operand values and the number of the
// destination register into these registers (`capture`). The routine then
// never decodes the original instruction: it reads the operands with a
// special load (`rd_sel`/`rd_data`, combinational) and delivers its answer
// with a special store (`store`), which puts `wdata` into the result
// register and asks the register file to write it to the remembered
// destination (`rf_we`, `rf_waddr`, `rf_wdata`, same cycle). The operating
// system reads any register the same way and writes any of them with
// `os_we`, so they survive a process switch.
//
// Priority in one cycle: capture, then operating-system write, then store.
// Reset clears all four registers.
//
// From the published architecture: two source operands and a result, filled by the
// special branch, special load and store, OS read and write. Own choices:
// keeping the destination register number as a fourth register, and making
// the special store also write the register file.
module sw_dispatch_regs #(
  parameter int unsigned DATA_W = proteus_pkg::DATA_W,
  parameter int unsigned RF_AW  = proteus_pkg::RF_AW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // fill by the software-dispatch branch
  input  logic                  capture,
  input  logic [DATA_W-1:0]     cap_a,
  input  logic [DATA_W-1:0]     cap_b,
  input  logic [RF_AW-1:0]      cap_dest,
  // special load / OS read
  input  proteus_pkg::spr_sel_e rd_sel,
  output logic [DATA_W-1:0]     rd_data,
  // special store of the result / OS write
  input  logic                  store,
  input  logic                  os_we,
  input  proteus_pkg::spr_sel_e wr_sel,
  input  logic [DATA_W-1:0]     wdata,
  // register file write request from the special store
  output logic                  rf_we,
  output logic [RF_AW-1:0]      rf_waddr,
  output logic [DATA_W-1:0]     rf_wdata
);
  import proteus_pkg::*;

  logic [DATA_W-1:0] src_a_q, src_b_q, result_q;
  logic [RF_AW-1:0]  dest_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_a_q  <= '0;
      src_b_q  <= '0;
      result_q <= '0;
      dest_q   <= '0;
    end else if (capture) begin
      src_a_q  <= cap_a;
      src_b_q  <= cap_b;
      result_q <= '0;
      dest_q   <= cap_dest;
    end else if (os_we) begin
      unique case (wr_sel)
        SPR_SRC_A:  src_a_q  <= wdata;
        SPR_SRC_B:  src_b_q  <= wdata;
        SPR_RESULT: result_q <= wdata;
        SPR_DEST:   dest_q   <= wdata[RF_AW-1:0];
      endcase
    end else if (store) begin
      result_q <= wdata;
    end
  end

  always_comb begin
    unique case (rd_sel)
      SPR_SRC_A:  rd_data = src_a_q;
      SPR_SRC_B:  rd_data = src_b_q;
      SPR_RESULT: rd_data = result_q;
      SPR_DEST:   rd_data = DATA_W'(dest_q);
    endcase
  end

  assign rf_we    = store && !capture && !os_we;
  assign rf_waddr = dest_q;
  assign rf_wdata = wdata;

endmodule
