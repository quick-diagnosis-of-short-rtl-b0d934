// Self-checking testbench of fault_signal_gen with TC1 = TC2 = 10 and a tick
// every third clock. Error sequences are applied tick by tick and the Fault
// signal and both counters are compared with the values the CNT1/CNT2 rules
// give: delay-length Error pulses are rejected, Fault sets on the 11th tick of
// Error != 0 and resets on the 11th tick of Error == 0, and each counter
// clears the other.
module tb_fault_signal_gen;
  import chb_fd_pkg::*;
  localparam int TC = 10;
  logic clk = 0, rst_n = 0, tick;
  err_t err;
  logic fault;
  logic [7:0] cnt1, cnt2;
  int checks = 0, failures = 0;
  int div = 0;

  fault_signal_gen #(.TC1(TC), .TC2(TC), .CW(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
  end
  assign tick = (div == 2);

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %0t: %s (fault=%b cnt1=%0d cnt2=%0d)", $time, what, fault, cnt1, cnt2); end
  endtask

  // hold err for n ticks; returns after the n-th tick has been applied
  task automatic run(input err_t e, input int n);
    err = e;
    for (int i = 0; i < n; i++) begin
      @(posedge clk iff tick);
      #1;
    end
  endtask

  initial begin
    err = ERR_ZERO;
    repeat (4) @(posedge clk);
    rst_n = 1;
    #1;
    chk(!fault && cnt1 == 0 && cnt2 == 8'hFF, "reset values");
    // delay pulse of 5 ticks: CNT1 counts, CNT2 holds, no Fault
    run(ERR_POS, 5);
    chk(!fault && cnt1 == 5 && cnt2 == 8'hFF, "short pulse counted");
    run(ERR_ZERO, 1);
    chk(!fault && cnt1 == 0, "CNT2 above TC2 clears CNT1");
    // 10 ticks of Error: still no fault
    run(ERR_NEG, 10);
    chk(!fault && cnt1 == 10, "10 ticks: no fault");
    run(ERR_NEG, 1);
    chk(fault && cnt1 == 11 && cnt2 == 0, "11th tick sets Fault and clears CNT2");
    run(ERR_POS, 5);
    chk(fault && cnt1 == 16 && cnt2 == 0, "CNT1 keeps counting");
    // Error back to 0: CNT2 counts, CNT1 holds
    run(ERR_ZERO, 6);
    chk(fault && cnt2 == 6 && cnt1 == 16, "gap below TC2 keeps Fault");
    run(ERR_POS, 1);
    chk(fault && cnt2 == 0, "Error again clears CNT2");
    run(ERR_ZERO, 10);
    chk(fault && cnt2 == 10, "10 zero ticks: Fault kept");
    run(ERR_ZERO, 1);
    chk(!fault && cnt1 == 0 && cnt2 == 11, "11th zero tick resets Fault, clears CNT1");
    run(ERR_ZERO, 300);
    chk(!fault && cnt2 == 8'hFF, "CNT2 saturates");
    // many short pulses separated by zeros never set Fault
    for (int i = 0; i < 20; i++) begin
      run(ERR_POS, 4);
      run(ERR_ZERO, 2);
    end
    chk(!fault, "repeated delay pulses rejected");
    // CNT1 saturates
    run(ERR_POS, 300);
    chk(fault && cnt1 == 8'hFF, "CNT1 saturates");
    run(ERR_ZERO, 11);
    chk(!fault, "reset after saturation");
    // no change between ticks
    err = ERR_POS;
    @(posedge clk iff !tick); #1;
    chk(cnt1 == 0 && !fault, "no count without tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
