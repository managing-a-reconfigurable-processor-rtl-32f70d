// tb_pfu_init_status -- self-checking test of the init/done status bit.
//
// Walks the sequences the long-instruction handshake relies on: init high
// after reset, low after the first clocked cycle, held while the PFU is not
// clocked (an interrupt), high again after the completing cycle, and a
// one-cycle instruction that keeps init high throughout. A reference bit
// updated by the same rule checks random sequences.
module tb_pfu_init_status;
  logic clk = 0, rst_n = 0, clk_en = 0, done = 0, init;
  logic model;
  int checks = 0, failures = 0;

  pfu_init_status dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic en, input logic d, input logic exp_init_after);
    @(negedge clk); clk_en = en; done = d;
    @(negedge clk); clk_en = 0; done = 0;
    checks++;
    if (init !== exp_init_after) begin
      failures++;
      $display("FAIL en=%0d done=%0d: init=%0d exp %0d", en, d, init, exp_init_after);
    end
  endtask

  initial begin
    @(negedge clk);
    checks++; if (init !== 1'b1) begin failures++; $display("FAIL init after reset"); end
    rst_n = 1;
    step(1, 0, 0);   // first cycle of a 3-cycle instruction
    step(0, 0, 0);   // interrupted: not clocked
    step(0, 1, 0);   // done ignored while not clocked
    step(1, 0, 0);   // reissued, continues
    step(1, 1, 1);   // completes
    step(1, 1, 1);   // single-cycle instruction
    model = 1;
    for (int i = 0; i < 300; i++) begin
      automatic logic en = ($urandom_range(1) == 1), d = ($urandom_range(3) == 0);
      if (en) model = d;
      step(en, d, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
