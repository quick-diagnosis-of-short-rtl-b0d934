// Self-checking testbench of fault_detection_block: falling edges of Fault
// with one active cell, with no active cell, and rising edges; the reported
// cell, the sticky flag and the one-clock detect pulse are checked.
module tb_fault_detection_block;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic fault;
  logic [N-1:0] active;
  logic [N-1:0] faulty_cell;
  logic [2:0] faulty_idx;
  logic detected, detect_pulse;
  int checks = 0, failures = 0;
  int pulses = 0;

  fault_detection_block #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && detect_pulse) pulses++;
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (cell=%b idx=%0d det=%b)", what, faulty_cell, faulty_idx, detected); end
  endtask

  initial begin
    fault = 0; active = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    chk(!detected && faulty_cell == '0, "idle after reset");
    // Fault rises with cell 3 active: no diagnosis on a rising edge
    active = 5'b01000; fault = 1;
    repeat (3) @(negedge clk);
    chk(!detected, "no diagnosis on rising edge");
    // Fault falls with no active cell: nothing
    active = '0; fault = 0;
    repeat (3) @(negedge clk);
    chk(!detected, "no diagnosis without active cell");
    // Fault rises and falls while cell 2 is active
    fault = 1; repeat (4) @(negedge clk);
    active = 5'b00100;
    repeat (2) @(negedge clk);
    fault = 0;
    @(negedge clk);
    chk(detected && faulty_cell == 5'b00100 && faulty_idx == 3'd2 && detect_pulse, "cell 2 diagnosed");
    @(negedge clk);
    chk(!detect_pulse, "detect pulse lasts one clock");
    active = '0;
    repeat (3) @(negedge clk);
    chk(detected && faulty_idx == 3'd2, "diagnosis held");
    // A later falling edge with cell 4 active updates the diagnosis
    fault = 1; repeat (5) @(negedge clk);
    active = 5'b10000; fault = 0;
    repeat (2) @(negedge clk);
    chk(faulty_cell == 5'b10000 && faulty_idx == 3'd4, "cell 4 diagnosed");
    for (int k = 0; k < N; k++) begin
      fault = 1; repeat (3) @(negedge clk);
      active = N'(1) << k; fault = 0;
      repeat (2) @(negedge clk);
      chk(faulty_idx == 3'(k) && faulty_cell == (N'(1) << k), "each cell");
      active = '0;
    end
    chk(pulses == 2 + N, "one pulse per diagnosis");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
