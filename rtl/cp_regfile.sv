// cp_regfile -- register file of the reconfigurable execution unit.
//
// The unit has its own register file, separate from the host core's, that
// feeds the PFUs through the usual two-operand, one-result interface.
// It has 16 entries of 32 bits. Two combinational read ports supply the
// source operands of a custom instruction; a third lets the host core move
// a register out to its own register file. One write port, written at the
// clock edge, takes a PFU result, a software-alternative result or a value
// moved in from the host core (the unit arbitrates between them). Reset
// clears every register.
//
// From the published architecture: 16 x 32 bits, two operands in, one result out.
// Own choices: the number of ports, combinational reads and the reset.
module cp_regfile #(
  parameter int unsigned DEPTH  = proteus_pkg::RF_DEPTH,
  parameter int unsigned DATA_W = proteus_pkg::DATA_W,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [AW-1:0]     ra_addr,
  output logic [DATA_W-1:0] ra_data,
  input  logic [AW-1:0]     rb_addr,
  output logic [DATA_W-1:0] rb_data,
  input  logic [AW-1:0]     rx_addr,
  output logic [DATA_W-1:0] rx_data,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata
);

  logic [DATA_W-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign ra_data = regs[ra_addr];
  assign rb_data = regs[rb_addr];
  assign rx_data = regs[rx_addr];

endmodule
