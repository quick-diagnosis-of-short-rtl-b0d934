// Self-checking testbench of ref_calc: random switching pulses and DC-link
// voltages; the expected V_ref is summed cell by cell with integers.
module tb_ref_calc;
  import chb_fd_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] vg1, vg2;
  logic signed [V_W-1:0] vdc [N];
  logic signed [V_W-1:0] v_ref;
  int checks = 0, failures = 0;

  ref_calc #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_v;
    vg1 = '0; vg2 = '0;
    for (int k = 0; k < N; k++) vdc[k] = 16'sd500;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      vg1 = N'($urandom); vg2 = N'($urandom);
      if (it < 32) begin vg1 = '1; vg2 = '0; end           // all cells at +Vdc
      else if (it < 64) begin vg1 = '0; vg2 = '1; end      // all cells at -Vdc
      exp_v = 0;
      for (int k = 0; k < N; k++) begin
        vdc[k] = 16'(450 + $urandom_range(100));
        exp_v += (int'(vg1[k]) - int'(vg2[k])) * int'(vdc[k]);
      end
      @(negedge clk);
      checks++;
      if (int'(v_ref) != exp_v) begin
        failures++;
        if (failures < 10) $display("mismatch: vg1=%b vg2=%b v_ref=%0d exp=%0d", vg1, vg2, v_ref, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
