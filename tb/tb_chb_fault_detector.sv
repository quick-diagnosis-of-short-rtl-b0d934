// Self-checking testbench of chb_fault_detector, run at a 3 MHz clock to keep
// it short (1 us tick = 3 clocks; all times in microseconds are as in the
// 150 MHz design). A ps_pwm instance at the same clock makes the switching
// pulses of an 11-level phase from a 50 Hz reference computed here; the
// behavioural power stage adds a 3 us delay, noise and a +-4 % spread of the
// DC-link voltages.
//  - A healthy run of one fundamental period must give no Fault at all.
//  - Then, for every cell and both switches, a short circuit is injected at a
//    random instant; every diagnosis must name that cell, the first within
//    8 ms, and each Fault high interval must last at most half a carrier
//    period (1 ms) plus the filter and delay margin.
module tb_chb_fault_detector;
  import chb_fd_pkg::*;
  localparam int N = 5;
  localparam int FCLK = 3_000_000, TICKDIV = 3, CAR = 100;
  localparam int TD = 9;                       // 3 us
  localparam int T_FUND = FCLK / 50;           // 60000 clocks
  localparam int TDET_MAX = FCLK / 1000 + 90;  // 1 ms + 30 us
  logic clk = 0, rst_n = 0;
  logic signed [15:0] v_r;
  logic [N-1:0] vg1, vg2;
  logic signed [V_W-1:0] vdc [N];
  logic signed [V_W-1:0] v_out, v_ref;
  err_t err;
  logic fault;
  logic [CNT_W-1:0] cnt1, cnt2;
  logic [N-1:0] active, faulty_cell, blown;
  logic [2:0] faulty_idx;
  logic detected, detect_pulse;
  logic fault_en = 0, fault_sw = 0, clear = 0;
  int unsigned fault_cell = 0;
  real m_a = 0.95;
  longint n = 0;
  int checks = 0, failures = 0;
  int wrong = 0, diagnoses = 0, sets = 0, t_set = 0, longest = 0;

  ps_pwm #(.N(N), .CLK_HZ_P(FCLK), .CAR_AMP_P(CAR)) u_pwm (
    .clk(clk), .rst_n(rst_n), .v_r(v_r), .vg1(vg1), .vg2(vg2), .car_tick());

  chb_fault_detector #(.N(N), .CLK_HZ_P(FCLK), .TICK_DIV(TICKDIV)) dut (.*);

  chb_inverter_model #(.N(N), .TD(TD)) u_inv (
    .clk(clk), .vg1(vg1), .vg2(vg2), .vdc(vdc), .fault_en(fault_en),
    .fault_cell(fault_cell), .fault_sw(fault_sw), .clear(clear), .v_out(v_out), .blown(blown));

  always #10 clk = ~clk;
  always @(posedge clk) begin
    n <= n + 1;
    v_r <= 16'($rtoi(m_a * CAR * $sin(2.0 * 3.14159265358979 * real'(n % T_FUND) / real'(T_FUND))));
  end

  // Fault high intervals and diagnoses
  always @(posedge clk) if (rst_n) begin
    if (fault && !dut.u_fdb.fault_q) begin sets++; t_set <= int'(n); end
    if (!fault && dut.u_fdb.fault_q && int'(n) - t_set > longest) longest <= int'(n) - t_set;
    if (detect_pulse) begin
      diagnoses++;
      if (int'(faulty_idx) != int'(fault_cell)) wrong++;
    end
  end

  initial begin
    #400ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic restart();
    rst_n = 0; clear = 1; fault_en = 0;
    repeat (3 * TD) @(posedge clk);
    clear = 0; rst_n = 1;
    sets = 0; diagnoses = 0; wrong = 0; longest = 0;
  endtask

  initial begin
    int t0;
    for (int k = 0; k < N; k++) vdc[k] = 16'(480 + $urandom_range(40));
    restart();
    repeat (T_FUND) @(posedge clk);
    chk(sets == 0 && !detected, $sformatf("healthy phase: no fault (sets=%0d)", sets));
    for (int c = 0; c < N; c++) begin
      for (int s = 0; s < 2; s++) begin
        m_a = (s == 0) ? 0.95 : 0.5;
        restart();
        fault_cell = c; fault_sw = s[0];
        t0 = 6000 + int'($urandom_range(T_FUND));
        repeat (t0) @(posedge clk);
        chk(sets == 0, "no fault before injection");
        fault_en = 1;
        t0 = int'(n);
        repeat (24000) @(posedge clk);
        chk(detected, $sformatf("cell %0d S%0d: detected", c + 1, s + 1));
        chk(diagnoses > 0 && wrong == 0, $sformatf("cell %0d S%0d: %0d diagnoses, %0d wrong", c + 1, s + 1, diagnoses, wrong));
        chk(longest <= TDET_MAX, $sformatf("cell %0d S%0d: longest Fault interval %0d us", c + 1, s + 1, longest / TICKDIV));
        $display("cell %0d S%0d m_a=%0.2f: %0d diagnoses, longest Fault interval %0d us", c + 1, s + 1, m_a, diagnoses, longest / TICKDIV);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
