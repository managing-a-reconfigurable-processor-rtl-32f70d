// pfu_circuit_model -- behavioural stand-in for a sequential custom
// instruction loaded into a PFU, used only by testbenches.
//
// It computes (a * K) ^ SALT by repeated addition, where K = (b & 7) + 1 is
// also the number of clocked cycles it needs, so the latency depends on the
// operand. It obeys the PFU handshake: in a cycle with `init` high it
// starts afresh, otherwise it continues from its saved accumulator and
// count; `done` and `result` are combinational and valid in the final
// clocked cycle; its state only changes at a clock edge where `clk_en` is
// high, so it freezes while the unit stops clocking it.
module pfu_circuit_model #(
  parameter logic [31:0] SALT = 32'h0
) (
  input  logic        clk,
  input  logic        clk_en,
  input  logic        init,
  input  logic [31:0] op_a,
  input  logic [31:0] op_b,
  output logic [31:0] result,
  output logic        done
);
  logic [31:0] acc_q = '0;
  logic [2:0]  cnt_q = '0;
  logic [31:0] cur_acc, new_acc;
  logic [2:0]  cur_cnt;

  always_comb begin
    cur_acc = init ? 32'd0 : acc_q;
    cur_cnt = init ? op_b[2:0] : cnt_q;
    new_acc = cur_acc + op_a;
    done    = (cur_cnt == 3'd0);
    result  = new_acc ^ SALT;
  end

  always_ff @(posedge clk) begin
    if (clk_en) begin
      acc_q <= new_acc;
      cnt_q <= cur_cnt - 3'd1;
    end
  end
endmodule
