// proteus_exec_ctrl -- sequencing of one custom-instruction request.
//
// A request (`ex_valid`, accepted while `ex_ready`) arrives with the
// dispatch decision made in the same cycle and the values of its two
// source registers.
//
//   * Fault: the next cycle reports RESP_FAULT.
//   * Software dispatch: the source values and destination number are copied
//     into the special purpose registers (`spr_capture`) and the next cycle
//     reports RESP_BRANCH with the routine's address.
//   * PFU dispatch: the operands are latched onto the shared PFU operand bus
//     and the selected PFU is clocked (`pfu_clk_en`) one cycle at a time
//     until it raises `done`. In that cycle its result is written to the
//     destination register, its usage counter is bumped (`cnt_inc`) and the
//     next cycle reports RESP_DONE. If `irq` is high in a running cycle the
//     PFU is not clocked in that cycle, the instruction is abandoned without
//     write-back and the next cycle reports RESP_INTR; the core reissues it
//     after the interrupt and the circuit continues where it stopped.
//
// Timing: a circuit needing K clocked cycles reports RESP_DONE K+1 cycles
// after the request cycle; software branches and faults report one cycle
// after it. Only one request is in flight; `ex_ready` is low while a PFU
// runs.
//
// From the published architecture: PFU clocked until completion, interruptible with
// transparent reissue, count on completion, operand capture for software
// dispatch. Own choices: the two-state sequencer, the registered response
// and that an interrupt is taken before the PFU is clocked in that cycle.
module proteus_exec_ctrl #(
  parameter int unsigned NUM_PFU = proteus_pkg::NUM_PFU,
  parameter int unsigned DATA_W  = proteus_pkg::DATA_W,
  parameter int unsigned RF_AW   = proteus_pkg::RF_AW,
  parameter int unsigned ADDR_W  = proteus_pkg::ADDR_W,
  localparam int unsigned PFU_W  = (NUM_PFU > 1) ? $clog2(NUM_PFU) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // request from the core, with the dispatch decision
  input  logic                           ex_valid,
  output logic                           ex_ready,
  input  proteus_pkg::disp_kind_e        disp_kind,
  input  logic [PFU_W-1:0]               disp_pfu,
  input  logic [ADDR_W-1:0]              disp_addr,
  input  logic [RF_AW-1:0]               ex_rd,
  input  logic [DATA_W-1:0]              src_a,
  input  logic [DATA_W-1:0]              src_b,
  input  logic                           irq,
  // response to the core
  output logic                           resp_valid,
  output proteus_pkg::resp_kind_e        resp_kind,
  output logic [ADDR_W-1:0]              resp_addr,
  // PFU side
  output logic [DATA_W-1:0]              pfu_op_a,
  output logic [DATA_W-1:0]              pfu_op_b,
  output logic [NUM_PFU-1:0]             pfu_clk_en,
  input  logic [NUM_PFU-1:0][DATA_W-1:0] pfu_result,
  input  logic [NUM_PFU-1:0]             pfu_done,
  // result write-back and bookkeeping
  output logic                           rf_we,
  output logic [RF_AW-1:0]               rf_waddr,
  output logic [DATA_W-1:0]              rf_wdata,
  output logic [NUM_PFU-1:0]             cnt_inc,
  output logic                           spr_capture
);
  import proteus_pkg::*;

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e           state_q;
  logic [PFU_W-1:0] pfu_q;
  logic [RF_AW-1:0] rd_q;
  logic             finish, abort;

  assign ex_ready = (state_q == S_IDLE);
  assign abort    = (state_q == S_RUN) && irq;
  assign finish   = (state_q == S_RUN) && !irq && pfu_done[pfu_q];

  always_comb begin
    pfu_clk_en = '0;
    cnt_inc    = '0;
    if (state_q == S_RUN && !irq) pfu_clk_en[pfu_q] = 1'b1;
    if (finish)                   cnt_inc[pfu_q]    = 1'b1;
  end

  assign rf_we       = finish;
  assign rf_waddr    = rd_q;
  assign rf_wdata    = pfu_result[pfu_q];
  assign spr_capture = ex_ready && ex_valid && (disp_kind == DISP_SW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      pfu_q      <= '0;
      rd_q       <= '0;
      pfu_op_a   <= '0;
      pfu_op_b   <= '0;
      resp_valid <= 1'b0;
      resp_kind  <= RESP_DONE;
      resp_addr  <= '0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (ex_valid) begin
            unique case (disp_kind)
              DISP_HW: begin
                state_q  <= S_RUN;
                pfu_q    <= disp_pfu;
                rd_q     <= ex_rd;
                pfu_op_a <= src_a;
                pfu_op_b <= src_b;
              end
              DISP_SW: begin
                resp_valid <= 1'b1;
                resp_kind  <= RESP_BRANCH;
                resp_addr  <= disp_addr;
              end
              default: begin
                resp_valid <= 1'b1;
                resp_kind  <= RESP_FAULT;
                resp_addr  <= '0;
              end
            endcase
          end
        end
        S_RUN: begin
          if (abort) begin
            state_q    <= S_IDLE;
            resp_valid <= 1'b1;
            resp_kind  <= RESP_INTR;
          end else if (finish) begin
            state_q    <= S_IDLE;
            resp_valid <= 1'b1;
            resp_kind  <= RESP_DONE;
          end
        end
      endcase
    end
  end

  // exactly one PFU is clocked at a time
  a_one_pfu: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pfu_clk_en))
    else $error("proteus_exec_ctrl: several PFUs clocked");

endmodule
