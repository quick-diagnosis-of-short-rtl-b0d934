// FPGA contents for one phase of an 11-level cascaded H-bridge inverter:
// modulation plus fast short-circuit fault diagnosis.
//
// sine_ref_gen produces the reference m_a*sin(2*pi*f0*t), updated every
// microsecond; ps_pwm compares it with 2n phase-shifted triangular carriers
// to give the switching pulses vg1/vg2 of each cell; dead_time_gen turns them
// into gate signals for the complementary switch pairs; chb_fault_detector
// compares the measured phase voltage with the voltage the pulses should
// produce and names the cell with a shorted switch.
//
// Interface: m_a is unsigned Q1.15; vdc[k] and v_out are signed samples of the
// measured DC-link voltages and phase voltage (0.1 V / LSB). Gate signals are
// {S2 legs, S1 legs}: index k is S1 of cell k, index N+k is S2 of cell k.
// The fault outputs are described in chb_fault_detector. All defaults follow
// the 11-level, 150 MHz, 500 Hz carrier prototype; f0 = 50 Hz and the
// detector's time base are this design's choices.
module chb_fd_top
  import chb_fd_pkg::*;
#(
  parameter int unsigned N  = N_CELLS,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [15:0]           m_a,
  input  logic signed [V_W-1:0] vdc [N],
  input  logic signed [V_W-1:0] v_out,
  output logic signed [15:0]    v_r,
  output logic [N-1:0]          vg1,
  output logic [N-1:0]          vg2,
  output logic [2*N-1:0]        g_hi,
  output logic [2*N-1:0]        g_lo,
  output logic signed [V_W-1:0] v_ref,
  output err_t                  err,
  output logic                  fault,
  output logic [CNT_W-1:0]      cnt1,
  output logic [CNT_W-1:0]      cnt2,
  output logic [N-1:0]          active,
  output logic [N-1:0]          faulty_cell,
  output logic [IW-1:0]         faulty_idx,
  output logic                  detected,
  output logic                  detect_pulse
);
  logic upd;

  tick_gen #(.DIV(CLK_HZ / TICK_HZ)) u_upd (.clk(clk), .rst_n(rst_n), .tick(upd));

  sine_ref_gen u_sine (
    .clk(clk), .rst_n(rst_n), .upd(upd), .m_a(m_a), .v_r(v_r), .v_r_valid());

  ps_pwm #(.N(N)) u_pwm (
    .clk(clk), .rst_n(rst_n), .v_r(v_r), .vg1(vg1), .vg2(vg2), .car_tick());

  dead_time_gen #(.NCH(2 * N)) u_dt (
    .clk(clk), .rst_n(rst_n), .vg({vg2, vg1}), .g_hi(g_hi), .g_lo(g_lo));

  chb_fault_detector #(.N(N), .IW(IW)) u_det (
    .clk(clk), .rst_n(rst_n), .vg1(vg1), .vg2(vg2), .vdc(vdc), .v_out(v_out),
    .v_ref(v_ref), .err(err), .fault(fault), .cnt1(cnt1), .cnt2(cnt2),
    .active(active), .faulty_cell(faulty_cell), .faulty_idx(faulty_idx),
    .detected(detected), .detect_pulse(detect_pulse));
endmodule
