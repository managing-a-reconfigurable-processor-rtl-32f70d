// pfu_init_status -- the one-bit status register that lets a long-running
// custom instruction be interrupted and resumed.
//
// A PFU has an `init` input, high in the first cycle of an invocation, and
// a `done` output, high in the cycle its result is ready. This register
// feeds `done` back into `init`: it is loaded from `done` in every cycle the
// PFU is clocked (`clk_en`) and holds otherwise. Reset sets it to 1, so the
// first cycle of the first invocation sees init high. After that cycle done
// is low, so init goes low and stays low while the circuit runs. If the
// instruction is interrupted the PFU stops being clocked, the register keeps
// its 0, and when the instruction is reissued the circuit continues from
// its saved state instead of restarting. The completing cycle loads a 1,
// arming init for the next invocation.
//
// Timing: `init` is the register output, valid throughout a cycle; `done`
// is sampled at the rising edge that ends a clocked cycle.
//
// Entirely as in the published architecture (reset value, feedback, clocking).
module pfu_init_status (
  input  logic clk,
  input  logic rst_n,
  input  logic clk_en,  // the PFU is clocked in this cycle
  input  logic done,    // PFU completion output
  output logic init     // PFU init input
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      init <= 1'b1;
    else if (clk_en) init <= done;
  end

endmodule
