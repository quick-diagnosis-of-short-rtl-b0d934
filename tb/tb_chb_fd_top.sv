// End-to-end testbench of chb_fd_top at its default parameters (11 levels,
// 150 MHz clock, 500 Hz carriers, 50 Hz reference), closed through the
// behavioural power stage (3 us measurement delay, noise, +-4 % DC links).
// Four runs, each from reset:
//  A, B  m_a steps from 0.95 to 0.5 at 12.5 ms or 15 ms, no fault, 20 ms:
//        Fault must never be set (normal transients are not faults);
//  C, D  m_a = 0.95 or 0.5, short circuit in S1 of cell 1 at 40 ms, run to
//        46 ms: every diagnosis must name cell 1, the first within 3 ms, and
//        every Fault interval must end within half a carrier period (1 ms)
//        plus a 30 us margin.
// Throughout: V_ref must equal the sum of (S1 - S2) * Vdc; the gates of a leg
// are never on together. Each mechanism is counted and must occur: delay
// pulses of Error rejected by CNT1, Fault set by CNT1, Fault reset by CNT2,
// active-cell pulses, diagnoses, dead-time gaps, m_a steps.
module tb_chb_fd_top;
  import chb_fd_pkg::*;
  localparam int N = N_CELLS;
  localparam int MS = CLK_HZ / 1000;
  logic clk = 0, rst_n = 0;
  logic [15:0] m_a;
  logic signed [V_W-1:0] vdc [N];
  logic signed [V_W-1:0] v_out, v_ref;
  logic signed [15:0] v_r;
  logic [N-1:0] vg1, vg2, active, faulty_cell, blown;
  logic [2*N-1:0] g_hi, g_lo;
  err_t err;
  logic fault, detected, detect_pulse;
  logic [CNT_W-1:0] cnt1, cnt2;
  logic [2:0] faulty_idx;
  logic fault_en = 0, clear = 0;
  int checks = 0, failures = 0;
  longint n = 0;

  // mechanism counters
  int n_reject = 0, n_set = 0, n_reset = 0, n_active = 0, n_diag = 0, n_dead = 0, n_ma = 0, n_take = 0;
  // per run
  int run_sets, run_diag, run_wrong, longest;
  longint t_set, t_first_diag, t_fault;
  int ref_bad = 0, overlap = 0;
  logic fault_q = 0, err_nz_q = 0, set_in_episode = 0;
  logic [N-1:0] active_q = '0;
  logic [2*N-1:0] dead_q = '0;
  int exp_ref_q;

  chb_fd_top dut (.*);

  chb_inverter_model #(.N(N), .TD(450)) u_inv (
    .clk(clk), .vg1(vg1), .vg2(vg2), .vdc(vdc), .fault_en(fault_en), .fault_cell(0),
    .fault_sw(1'b0), .clear(clear), .v_out(v_out), .blown(blown));

  always #3.333 clk = ~clk;

  always @(posedge clk) begin
    int exp_ref;
    n <= n + 1;
    exp_ref = 0;
    for (int k = 0; k < N; k++) exp_ref += (int'(vg1[k]) - int'(vg2[k])) * int'(vdc[k]);
    exp_ref_q <= exp_ref;
    if (rst_n) begin
      if (int'(v_ref) != exp_ref_q) ref_bad++;
      if ((g_hi & g_lo) != '0) overlap++;
      for (int i = 0; i < 2 * N; i++)
        if (!g_hi[i] && !g_lo[i] && !dead_q[i]) n_dead++;
      dead_q <= ~(g_hi | g_lo);
      // Error episodes that end without setting Fault: rejected delay pulses
      err_nz_q <= (err != ERR_ZERO);
      if (err != ERR_ZERO && !err_nz_q) set_in_episode <= fault;
      if (fault && !fault_q) set_in_episode <= 1'b1;
      if (err == ERR_ZERO && err_nz_q && !set_in_episode && !fault) n_reject++;
      fault_q <= fault;
      if (fault && !fault_q) begin n_set++; run_sets++; t_set <= n; end
      if (!fault && fault_q) begin
        n_reset++;
        if (int'(n - t_set) > longest) longest <= int'(n - t_set);
      end
      active_q <= active;
      if (active != '0 && active != active_q) n_active++;
      if (active != '0 && active_q != '0 && active != active_q) n_take++;
      if (detect_pulse) begin
        n_diag++; run_diag++;
        if (faulty_idx != 3'd0 || faulty_cell != 5'b00001) run_wrong++;
        if (t_first_diag == 0) t_first_diag <= n;
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

  task automatic restart(input logic [15:0] ma);
    rst_n = 0; clear = 1; fault_en = 0; m_a = ma;
    repeat (500) @(posedge clk);
    clear = 0; rst_n = 1;
    run_sets = 0; run_diag = 0; run_wrong = 0; longest = 0; t_first_diag = 0;
    n = 0;
  endtask

  task automatic transient_run(input longint t_step);
    restart(16'd31130);
    wait (n == t_step); m_a = 16'd16384; n_ma++;
    wait (n == 20 * MS);
    chk(run_sets == 0 && !detected, $sformatf("m_a step at %0d us: no Fault (sets=%0d)", t_step / (MS / 1000), run_sets));
  endtask

  task automatic fault_run(input logic [15:0] ma, input string name);
    restart(ma);
    wait (n == 40 * MS);
    chk(run_sets == 0, {name, ": no Fault before the short circuit"});
    fault_en = 1; t_fault = n;
    wait (n == 46 * MS);
    chk(detected && run_diag > 0 && run_wrong == 0,
        $sformatf("%s: %0d diagnoses, %0d not cell 1", name, run_diag, run_wrong));
    chk(t_first_diag > 0 && t_first_diag - t_fault <= 3 * MS,
        $sformatf("%s: first diagnosis %0d us after the fault", name, (t_first_diag - t_fault) / (MS / 1000)));
    chk(longest <= MS + 30 * (MS / 1000), $sformatf("%s: longest Fault interval %0d us", name, longest / (MS / 1000)));
    $display("%s: first diagnosis %0d us after the fault, longest Fault interval %0d us, %0d diagnoses",
             name, (t_first_diag - t_fault) / (MS / 1000), longest / (MS / 1000), run_diag);
  endtask

  initial begin
    m_a = 16'd31130;
    for (int k = 0; k < N; k++) vdc[k] = 16'(VDC_NOM - 20 + $urandom_range(40));
    transient_run(longint'(25 * MS / 2));
    transient_run(longint'(15 * MS));
    fault_run(16'd31130, "m_a=0.95");
    fault_run(16'd16384, "m_a=0.50");
    chk(ref_bad == 0, $sformatf("V_ref mismatches: %0d", ref_bad));
    chk(overlap == 0, $sformatf("both gates of a leg on: %0d clocks", overlap));
    $display("mechanisms: rejected Error pulses %0d, Fault sets %0d, Fault resets %0d, active pulses %0d (takeovers %0d), diagnoses %0d, dead-time gaps %0d, m_a steps %0d",
             n_reject, n_set, n_reset, n_active, n_take, n_diag, n_dead, n_ma);
    chk(n_reject > 0, "delay pulses rejected");
    chk(n_set > 0, "Fault set");
    chk(n_reset > 0, "Fault reset");
    chk(n_active > 0, "active-cell pulses");
    chk(n_diag > 0, "diagnoses");
    chk(n_dead > 0, "dead-time gaps");
    chk(n_ma > 0, "m_a steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
