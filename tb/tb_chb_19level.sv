// Workload testbench: a 19-level phase (n = 9 cells) with the detector and
// modulator at a 9 MHz clock (1 us tick = 9 clocks; carrier resolution
// +-450 so that the 20 degree cell shift is exact), 500 Hz carriers and a
// 50 Hz reference at m_a = 0.95.
//  - Away from the zero crossings of the reference (both edges in the same
//    half-wave), consecutive condition I/II edges of different cells must be
//    at least 96 us apart, the minimum the method's analysis gives for 19
//    levels (tolerance one carrier step); edges at v_r = 0 are not counted.
//    The smallest spacing across a zero crossing is printed.
//  - With a measurement delay of 3 us, one fundamental period must give no
//    Fault.
//  - Shorts in S1 and S2 of cells 1, 5 and 9 must each be diagnosed as that
//    cell, every diagnosis correct.
module tb_chb_19level;
  import chb_fd_pkg::*;
  localparam int N = 9;
  localparam int FCLK = 9_000_000, TICKDIV = 9, CAR = 450;
  localparam int TD = 27;                      // 3 us
  localparam int T_FUND = FCLK / 50;
  localparam int US = FCLK / 1_000_000;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] v_r;
  logic [N-1:0] vg1, vg2, vg1_q, vg2_q;
  logic signed [V_W-1:0] vdc [N];
  logic signed [V_W-1:0] v_out, v_ref;
  err_t err;
  logic fault, fault_q;
  logic [CNT_W-1:0] cnt1, cnt2;
  logic [N-1:0] active, faulty_cell, blown;
  logic [3:0] faulty_idx;
  logic detected, detect_pulse;
  logic fault_en = 0, fault_sw = 0, clear = 0;
  int unsigned fault_cell = 0;
  longint n = 0, last_edge = 0;
  int last_cell = -1, last_sign = 0;
  int min_same = 1 << 30, min_cross = 1 << 30;
  int checks = 0, failures = 0, sets = 0, diagnoses = 0, wrong = 0;

  ps_pwm #(.N(N), .CLK_HZ_P(FCLK), .CAR_AMP_P(CAR)) u_pwm (
    .clk(clk), .rst_n(rst_n), .v_r(v_r), .vg1(vg1), .vg2(vg2), .car_tick());

  chb_fault_detector #(.N(N), .CLK_HZ_P(FCLK), .TICK_DIV(TICKDIV)) dut (.*);

  chb_inverter_model #(.N(N), .TD(TD)) u_inv (
    .clk(clk), .vg1(vg1), .vg2(vg2), .vdc(vdc), .fault_en(fault_en),
    .fault_cell(fault_cell), .fault_sw(fault_sw), .clear(clear), .v_out(v_out), .blown(blown));

  always #10 clk = ~clk;
  always @(posedge clk) begin
    n <= n + 1;
    v_r <= 16'($rtoi(0.95 * CAR * $sin(2.0 * 3.14159265358979 * real'(n % T_FUND) / real'(T_FUND))));
    vg1_q <= vg1; vg2_q <= vg2; fault_q <= fault;
    if (rst_n) begin
      for (int k = 0; k < N; k++)
        if (vg1_q[k] != vg2_q[k] && vg1[k] == vg2[k]) begin
          int sgn;
          sgn = (v_r > 0) ? 1 : (v_r < 0) ? -1 : 0;
          if (last_cell >= 0 && k != last_cell) begin
            if (sgn != 0 && sgn == last_sign && int'(n - last_edge) < min_same) min_same = int'(n - last_edge);
            if (sgn != last_sign && int'(n - last_edge) < min_cross) min_cross = int'(n - last_edge);
          end
          last_edge = n; last_cell = k; last_sign = sgn;
        end
      if (fault && !fault_q) sets++;
      if (detect_pulse) begin
        diagnoses++;
        if (int'(faulty_idx) != int'(fault_cell)) wrong++;
      end
    end
  end

  initial begin
    #200ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic restart();
    rst_n = 0; clear = 1; fault_en = 0;
    repeat (2 * TD) @(posedge clk);
    clear = 0; rst_n = 1;
    sets = 0; diagnoses = 0; wrong = 0; last_cell = -1;
  endtask

  initial begin
    int cells [3] = '{0, 4, 8};
    for (int k = 0; k < N; k++) vdc[k] = 16'(480 + $urandom_range(40));
    restart();
    repeat (T_FUND + 200) @(posedge clk);
    chk(sets == 0 && !detected, $sformatf("healthy 19-level phase: no Fault (sets=%0d)", sets));
    chk(min_same >= 96 * US - CAR / 100, $sformatf("min spacing within a half-wave %0d us (>= 96 us)", min_same / US));
    $display("min conditional-edge spacing: %0d us within a half-wave, %0d us across a zero crossing",
             min_same / US, min_cross / US);
    foreach (cells[i]) begin
      for (int s = 0; s < 2; s++) begin
        restart();
        fault_cell = cells[i]; fault_sw = s[0];
        repeat (20000 + int'($urandom_range(T_FUND))) @(posedge clk);
        fault_en = 1;
        repeat (8 * FCLK / 1000) @(posedge clk);
        chk(detected && diagnoses > 0 && wrong == 0,
            $sformatf("cell %0d S%0d: %0d diagnoses, %0d wrong", cells[i] + 1, s + 1, diagnoses, wrong));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
