// tb_usage_counter -- self-checking test of the per-PFU completion counter.
//
// Counts bursts of completions, clears, a clear coinciding with a
// completion (counts 1), random sequences against a reference count, and
// wrap-around at a reduced 4-bit width in a second instance.
module tb_usage_counter;
  logic clk = 0, rst_n = 0, complete = 0, clr = 0;
  logic [31:0] count;
  logic [3:0] count4;
  int checks = 0, failures = 0;
  longint model;

  usage_counter dut (.*);
  usage_counter #(.CNT_W(4)) dut4 (.clk, .rst_n, .complete, .clr, .count(count4));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic c, input logic k);
    @(negedge clk); complete = c; clr = k;
    @(negedge clk); complete = 0; clr = 0;
    if (k) model = c; else model = model + c;
    checks++;
    if (count !== 32'(model) || count4 !== 4'(model)) begin
      failures++;
      $display("FAIL count=%0d count4=%0d exp %0d", count, count4, model);
    end
  endtask

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    checks++; if (count !== 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    repeat (5) step(1, 0);
    step(0, 0);
    step(0, 1);
    repeat (3) step(1, 0);
    step(1, 1);
    repeat (20) step(1, 0);   // wraps the 4-bit copy
    for (int i = 0; i < 400; i++) step($urandom_range(1) == 1, $urandom_range(30) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
