// Self-checking testbench of ps_pwm at its default 11-level, 150 MHz, 500 Hz
// setting, with constant references. Over one carrier period (300000 clocks)
// it checks, for every pulse:
//  - the duty cycle of vg1 is (1 + v_r/CAR_AMP)/2 and that of vg2 is
//    (1 - v_r/CAR_AMP)/2, as for a unitary triangular carrier compared with
//    a constant, within 0.1 %; so the mean cell state vg1 - vg2 is v_r;
//  - the cell state never takes the sign opposite to v_r (unipolar PWM);
//  - each pulse rises exactly once per carrier period;
//  - vg1 and vg2 of cell k rise one carrier period / (2n) (a 180/n degree
//    shift) before those of cell k-1.
// Tolerances are two carrier steps. A final period with a reference ramping
// by one LSB every 317 clocks (close to the steepest slope of the sine at
// m_a = 0.95) checks that every pulse still rises exactly once and that no
// high or low run is shorter than two carrier steps, i.e. the staircase
// reference never makes a pulse chatter at a crossing.
module tb_ps_pwm;
  import chb_fd_pkg::*;
  localparam int N = N_CELLS;
  localparam int PER = CLK_HZ / F_CARRIER;          // 300000 clocks
  localparam int SHIFT = PER / (2 * N);             // 30000 clocks
  localparam int TOL = 2 * CLK_HZ / (4 * F_CARRIER * CAR_AMP);
  logic clk = 0, rst_n = 0;
  logic signed [15:0] v_r;
  logic [N-1:0] vg1, vg2, vg1_q, vg2_q;
  logic car_tick;
  int checks = 0, failures = 0;
  int hi1 [N], hi2 [N], r1 [N], r2 [N], nr1 [N], nr2 [N], wrongsign [N];
  int cyc = 0;

  ps_pwm dut (.*);

  always #3.333 clk = ~clk;
  initial begin
    #30ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int cdist(input int a, input int b);   // (a - b) mod PER
    int d = (a - b) % PER;
    return d < 0 ? d + PER : d;
  endfunction

  task automatic measure(input int vr);
    v_r = 16'(vr);
    repeat (PER) @(posedge clk);     // settle one period
    for (int k = 0; k < N; k++) begin hi1[k] = 0; hi2[k] = 0; nr1[k] = 0; nr2[k] = 0; wrongsign[k] = 0; end
    vg1_q = vg1; vg2_q = vg2;
    for (int c = 0; c < PER; c++) begin
      @(posedge clk); #0.1;
      for (int k = 0; k < N; k++) begin
        hi1[k] += int'(vg1[k]); hi2[k] += int'(vg2[k]);
        if ((vr > 0 && !vg1[k] && vg2[k]) || (vr < 0 && vg1[k] && !vg2[k])) wrongsign[k]++;
        if (vg1[k] && !vg1_q[k]) begin r1[k] = c; nr1[k]++; end
        if (vg2[k] && !vg2_q[k]) begin r2[k] = c; nr2[k]++; end
      end
      vg1_q = vg1; vg2_q = vg2;
    end
    for (int k = 0; k < N; k++) begin
      int exp_hi = int'((1.0 + real'(vr) / real'(CAR_AMP)) / 2.0 * real'(PER));
      int exp_hi2 = PER - exp_hi;
      chk(hi1[k] > exp_hi - PER / 1000 && hi1[k] < exp_hi + PER / 1000,
          $sformatf("vr=%0d cell %0d vg1 high %0d exp %0d", vr, k, hi1[k], exp_hi));
      chk(hi2[k] > exp_hi2 - PER / 1000 && hi2[k] < exp_hi2 + PER / 1000,
          $sformatf("vr=%0d cell %0d vg2 high %0d exp %0d", vr, k, hi2[k], exp_hi2));
      chk(wrongsign[k] == 0, $sformatf("cell %0d state against the sign of v_r %0d times", k, wrongsign[k]));
      chk(nr1[k] == 1 && nr2[k] == 1, $sformatf("cell %0d one rise per period (%0d,%0d)", k, nr1[k], nr2[k]));
      if (k > 0) begin
        chk(cdist(r1[k-1], r1[k]) > SHIFT - TOL && cdist(r1[k-1], r1[k]) < SHIFT + TOL,
            $sformatf("cell %0d vg1 leads cell %0d by %0d clocks", k, k - 1, cdist(r1[k-1], r1[k])));
        chk(cdist(r2[k-1], r2[k]) > SHIFT - TOL && cdist(r2[k-1], r2[k]) < SHIFT + TOL,
            $sformatf("cell %0d vg2 leads cell %0d by %0d clocks", k, k - 1, cdist(r2[k-1], r2[k])));
      end
    end
  endtask

  task automatic ramp();
    int run1 [N], run2 [N], short_runs;
    short_runs = 0;
    v_r = -16'sd500;
    repeat (PER) @(posedge clk);
    for (int k = 0; k < N; k++) begin nr1[k] = 0; nr2[k] = 0; run1[k] = TOL; run2[k] = TOL; end
    vg1_q = vg1; vg2_q = vg2;
    for (int c = 0; c < PER; c++) begin
      @(posedge clk); #0.1;
      if (c % 317 == 316) v_r = v_r + 16'sd1;
      for (int k = 0; k < N; k++) begin
        if (vg1[k] != vg1_q[k]) begin
          if (run1[k] < TOL) short_runs++;
          run1[k] = 0;
          if (vg1[k]) nr1[k]++;
        end else run1[k]++;
        if (vg2[k] != vg2_q[k]) begin
          if (run2[k] < TOL) short_runs++;
          run2[k] = 0;
          if (vg2[k]) nr2[k]++;
        end else run2[k]++;
      end
      vg1_q = vg1; vg2_q = vg2;
    end
    for (int k = 0; k < N; k++)
      chk(nr1[k] == 1 && nr2[k] == 1, $sformatf("ramp: cell %0d one rise per period (%0d,%0d)", k, nr1[k], nr2[k]));
    chk(short_runs == 0, $sformatf("ramp: %0d runs shorter than %0d clocks", short_runs, TOL));
  endtask

  initial begin
    v_r = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(600);      // 0.4
    measure(-900);     // -0.6
    measure(1425);     // 0.95
    ramp();            // -0.33 .. 0.33
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
