// Self-checking testbench of sine_ref_gen at its default 150 MHz / 50 Hz
// setting. The testbench keeps its own phase count, clocks since reset times
// round(f0 * 2^32 / f_clk), and compares every sample over one full 20 ms
// period of the fundamental with round(m_a * CAR_AMP * sin(phase)) computed
// in floating point, within 3 LSB. m_a steps through 0.95, 0.5 and 1.0. It
// also checks the sample latency (the sample is valid ITER + 1 clocks after the update strobe).
module tb_sine_ref_gen;
  import chb_fd_pkg::*;
  localparam int DIV = 150;
  localparam longint INC = ((longint'(F0_HZ) << 32) + CLK_HZ / 2) / CLK_HZ;
  logic clk = 0, rst_n = 0, upd;
  logic [15:0] m_a;
  logic signed [15:0] v_r;
  logic v_r_valid;
  int checks = 0, failures = 0;
  longint n = 0, ph_lat = 0, t_upd = 0;
  real ma_lat = 0.0;
  int div = 0;
  int maxerr = 0;

  sine_ref_gen dut (.*);

  always #3.333 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n   <= n + 1;
    div <= (div == DIV - 1) ? 0 : div + 1;
    if (upd) begin
      ph_lat <= (n * INC) % (64'd1 << 32);
      ma_lat <= real'(m_a) / 32768.0;
      t_upd  <= n;
    end
  end
  assign upd = rst_n && (div == DIV - 1);

  always @(posedge clk) if (rst_n && v_r_valid) begin
    real expv;
    int e;
    expv = ma_lat * real'(CAR_AMP) * $sin(2.0 * 3.14159265358979 * real'(ph_lat) / 4294967296.0);
    e = int'(v_r) - int'($rtoi(expv + (expv >= 0 ? 0.5 : -0.5)));
    if (e < 0) e = -e;
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > 3 || (n - t_upd) != 18) begin
      failures++;
      if (failures < 10) $display("mismatch: v_r=%0d exp=%f latency=%0d", v_r, expv, n - t_upd);
    end
  end

  initial begin
    #50ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m_a = 16'd31130;   // 0.95
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n == 1_000_000); m_a = 16'd16384;   // 0.5
    wait (n == 2_000_000); m_a = 16'd32768;   // 1.0
    wait (n == 3_000_000);
    $display("max abs error %0d LSB over %0d samples", maxerr, checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
