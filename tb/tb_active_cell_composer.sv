// Self-checking testbench of active_cell_composer (3 cells, PW = 4 ticks,
// one tick every 5 clocks). Every transition of a cell state is applied:
// the four edges of conditions I and II (state +-1 -> 0) must make that cell
// active for PW ticks, the four edges from 0 to +-1 must not. A second cell's
// edge must take over, and two simultaneous edges must give one active cell.
module tb_active_cell_composer;
  localparam int N = 3, PW = 4, DIV = 5;
  logic clk = 0, rst_n = 0, tick;
  logic [N-1:0] vg1, vg2, active;
  int checks = 0, failures = 0;
  int div = 0;

  active_cell_composer #(.N(N), .PW(PW), .PWW(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) div <= (div == DIV - 1) ? 0 : div + 1;
  assign tick = (div == DIV - 1);

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %0t: %s (active=%b)", $time, what, active); end
  endtask

  // set cell k's pulses and measure how long it stays active afterwards
  task automatic step(input int k, input bit s1, input bit s2, input bit expect_active);
    int len;
    @(negedge clk);
    vg1[k] = s1; vg2[k] = s2;
    @(negedge clk);
    len = 0;
    while (active == (N'(1) << k) && len < 1000) begin
      @(negedge clk); len++;
    end
    if (expect_active) begin
      chk(len >= (PW - 1) * DIV && len <= PW * DIV, $sformatf("cell %0d active %0d clocks", k, len));
    end else begin
      chk(len == 0 && active == '0, $sformatf("cell %0d no activity", k));
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    vg1 = '0; vg2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      step(k, 1, 0, 0);   // 0 -> +1 (S1 on, S2 off): not used
      step(k, 1, 1, 1);   // +1 -> 0, S2 on while S1 on (condition I)
      step(k, 0, 1, 0);   // 0 -> -1: not used
      step(k, 1, 1, 1);   // -1 -> 0, S1 on while S2 on (condition I)
      step(k, 1, 0, 0);   // 0 -> +1 via S2 off: not used
      step(k, 0, 0, 1);   // +1 -> 0, S1 off while S2 off (condition II)
      step(k, 0, 1, 0);   // 0 -> -1 via S2 on: not used
      step(k, 0, 0, 1);   // -1 -> 0, S2 off while S1 off (condition II)
    end
    // takeover: cell 0 edge, then cell 2 edge two clocks later
    @(negedge clk); vg1 = 3'b101; vg2 = 3'b000;
    repeat (3) @(negedge clk);
    vg1[0] = 0;
    repeat (2) @(negedge clk);
    chk(active == 3'b001, "cell 0 active");
    vg1[2] = 0;
    repeat (2) @(negedge clk);
    chk(active == 3'b100, "cell 2 takes over");
    repeat (PW * DIV + 2) @(negedge clk);
    chk(active == '0, "pulse ends");
    // simultaneous edges in cells 1 and 2: exactly one active
    vg1 = 3'b110; repeat (3) @(negedge clk);
    vg1 = 3'b000; repeat (2) @(negedge clk);
    chk(active == 3'b010, "lowest index wins on simultaneous edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
