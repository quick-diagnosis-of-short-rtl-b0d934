// Self-checking testbench of error_comparator: values around the +-TH dead
// band edges, full-scale values that would overflow a same-width difference,
// and random samples. Expected Error is computed with 32-bit integers.
module tb_error_comparator;
  import chb_fd_pkg::*;
  localparam int TH = 250;
  logic clk = 0, rst_n = 0;
  logic signed [V_W-1:0] v_ref, v_out;
  err_t err;
  int checks = 0, failures = 0;

  error_comparator #(.TH(TH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic apply(input int r, input int o);
    int e, ex;
    @(negedge clk);
    v_ref = 16'(r); v_out = 16'(o);
    e = r - o;
    ex = (e > TH) ? 1 : (e < -TH) ? -1 : 0;
    @(negedge clk);
    checks++;
    if (int'(err) != ex) begin
      failures++;
      if (failures < 10) $display("mismatch: ref=%0d out=%0d err=%0d exp=%0d", r, o, int'(err), ex);
    end
  endtask

  initial begin
    v_ref = 0; v_out = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    apply(1000, 1000 - TH);      // exactly +TH: 0
    apply(1000, 1000 - TH - 1);  // just above: +1
    apply(0, TH);                // exactly -TH: 0
    apply(0, TH + 1);            // just below: -1
    apply(32767, -32768);        // overflow in 16 bits: +1
    apply(-32768, 32767);        // -1
    apply(2500, 2500);
    for (int i = 0; i < 3000; i++)
      apply(int'($urandom_range(6000)) - 3000, int'($urandom_range(6000)) - 3000);
    for (int i = 0; i < 1000; i++) begin
      int r = int'($urandom_range(4000)) - 2000;
      apply(r, r + int'($urandom_range(2 * TH + 20)) - TH - 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
