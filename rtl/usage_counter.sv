// usage_counter -- counts the completions of the custom instruction in one
// PFU, for the operating system's circuit replacement policy.
//
// The count rises by one in each cycle `complete` is high, which the
// execution control asserts in the cycle a PFU instruction finishes and its
// result is written. Counting at the end rather than at issue means an
// instruction that is interrupted and reissued is counted once. The
// operating system reads `count` at any time and clears it with `clr`; a
// completion in the same cycle as a clear is counted after the clear, so it
// is not lost. The counter wraps at its width.
//
// From the published architecture: completions counted, readable and clearable.
// Own choices: 32-bit width, wrap-around, clear-and-count ordering.
module usage_counter #(
  parameter int unsigned CNT_W = proteus_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             complete,
  input  logic             clr,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= CNT_W'(complete);
    else          count <= count + CNT_W'(complete);
  end

endmodule
