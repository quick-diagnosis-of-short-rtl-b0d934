// Workload testbench: maximum fault detection time for carrier periods
// Ts = 2 ms (500 Hz) and Ts = 1 ms (1 kHz) in the 11-level phase.
//
// Two modulator + detector + power-stage model sets run side by side from one
// 9 MHz clock (1 us tick = 9 clocks, carrier resolution +-450), both at
// m_a = 0.95 with a 50 Hz reference and a 3 us measurement delay. Each run
// restarts both, injects the same short (random cell, random switch, random
// instant) into both, and then watches one full fundamental period, so that
// the fault is seen at every phase of the reference. The detection time is
// the length of a Fault interval, from set to reset. Checked per carrier
// period:
//  - every diagnosis names the shorted cell;
//  - no Fault interval is longer than Ts/2, the bound the method gives for
//    m_a -> 1, plus two ticks of filter jitter;
//  - the longest interval over all runs reaches at least 0.7 * Ts/2, i.e. the
//    bound is approached, not merely respected.
// A healthy period before each fault must give no Fault.
module tb_chb_detect_time;
  import chb_fd_pkg::*;
  localparam int N = N_CELLS;
  localparam int FCLK = 9_000_000, TICKDIV = 9, CAR = 450, TD = 27;
  localparam int T_FUND = FCLK / 50;
  localparam int US = FCLK / 1_000_000;
  localparam int RUNS = 8;
  localparam int FCAR [2] = '{500, 1000};

  logic clk = 0, rst_n = 0;
  logic signed [15:0] v_r;
  logic signed [V_W-1:0] vdc [N];
  logic fault_en = 0, fault_sw = 0, clear = 0, armed = 0;
  int unsigned fault_cell = 0;
  longint n = 0;
  int checks = 0, failures = 0;
  int longest [2], sets [2], healthy_sets [2], diagnoses [2], wrong [2];

  always #10 clk = ~clk;
  always @(posedge clk) begin
    n <= n + 1;
    v_r <= 16'($rtoi(0.95 * CAR * $sin(2.0 * 3.14159265358979 * real'(n % T_FUND) / real'(T_FUND))));
  end

  for (genvar g = 0; g < 2; g++) begin : g_set
    logic [N-1:0] vg1, vg2, active, faulty_cell, blown;
    logic signed [V_W-1:0] v_out, v_ref;
    err_t err;
    logic fault, fault_q, detected, detect_pulse;
    logic [CNT_W-1:0] cnt1, cnt2;
    logic [2:0] faulty_idx;
    longint set_at;

    ps_pwm #(.N(N), .CLK_HZ_P(FCLK), .F_CAR_P(FCAR[g]), .CAR_AMP_P(CAR)) u_pwm (
      .clk(clk), .rst_n(rst_n), .v_r(v_r), .vg1(vg1), .vg2(vg2), .car_tick());

    chb_fault_detector #(.N(N), .CLK_HZ_P(FCLK), .TICK_DIV(TICKDIV)) u_det (
      .clk(clk), .rst_n(rst_n), .vg1(vg1), .vg2(vg2), .vdc(vdc), .v_out(v_out),
      .v_ref(v_ref), .err(err), .fault(fault), .cnt1(cnt1), .cnt2(cnt2),
      .active(active), .faulty_cell(faulty_cell), .faulty_idx(faulty_idx),
      .detected(detected), .detect_pulse(detect_pulse));

    chb_inverter_model #(.N(N), .TD(TD)) u_inv (
      .clk(clk), .vg1(vg1), .vg2(vg2), .vdc(vdc), .fault_en(fault_en),
      .fault_cell(fault_cell), .fault_sw(fault_sw), .clear(clear), .v_out(v_out), .blown(blown));

    always @(posedge clk) begin
      fault_q <= fault;
      if (rst_n) begin
        if (fault && !fault_q) begin
          set_at <= n;
          if (armed) sets[g]++; else healthy_sets[g]++;
        end
        if (!fault && fault_q && armed && int'(n - set_at) > longest[g]) longest[g] = int'(n - set_at);
        if (detect_pulse) begin
          diagnoses[g]++;
          if (int'(faulty_idx) != int'(fault_cell)) wrong[g]++;
        end
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

  initial begin
    for (int k = 0; k < N; k++) vdc[k] = 16'(480 + $urandom_range(40));
    for (int g = 0; g < 2; g++) begin
      longest[g] = 0; sets[g] = 0; healthy_sets[g] = 0; diagnoses[g] = 0; wrong[g] = 0;
    end
    for (int r = 0; r < RUNS; r++) begin
      rst_n = 0; clear = 1; fault_en = 0; armed = 0;
      repeat (2 * TD) @(posedge clk);
      clear = 0; rst_n = 1;
      fault_cell = $urandom_range(N - 1); fault_sw = 1'($urandom_range(1));
      repeat (20000 + int'($urandom_range(T_FUND))) @(posedge clk);
      armed = 1; fault_en = 1;
      repeat (T_FUND) @(posedge clk);
    end
    for (int g = 0; g < 2; g++) begin
      int ts_half;
      ts_half = FCLK / FCAR[g] / 2;
      $display("Ts = %0d ms: longest Fault interval %0d us (Ts/2 = %0d us), %0d Fault sets, %0d diagnoses",
               1000 / FCAR[g], longest[g] / US, ts_half / US, sets[g], diagnoses[g]);
      chk(healthy_sets[g] == 0, $sformatf("Ts = %0d ms: %0d Fault sets while healthy", 1000 / FCAR[g], healthy_sets[g]));
      chk(diagnoses[g] >= RUNS && wrong[g] == 0,
          $sformatf("Ts = %0d ms: %0d diagnoses, %0d wrong", 1000 / FCAR[g], diagnoses[g], wrong[g]));
      chk(longest[g] <= ts_half + 2 * US,
          $sformatf("Ts = %0d ms: longest Fault interval %0d us above Ts/2", 1000 / FCAR[g], longest[g] / US));
      chk(longest[g] * 10 >= ts_half * 7,
          $sformatf("Ts = %0d ms: longest Fault interval %0d us below 0.7 Ts/2", 1000 / FCAR[g], longest[g] / US));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
