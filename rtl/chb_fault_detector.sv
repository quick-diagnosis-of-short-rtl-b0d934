// Short-circuit fault detector for one phase of a cascaded H-bridge inverter.
//
// A healthy phase outputs the sum of (S1 - S2) * Vdc over its cells. The
// detector rebuilds that reference from the switching pulses and the measured
// DC-link voltages (ref_calc), compares it with the measured phase voltage in
// a three-level comparator with dead band TH (error_comparator), and filters
// the resulting Error with the two counters CNT1/CNT2 into the Fault signal
// (fault_signal_gen). In parallel the active cell composer marks, for PW
// ticks, the cell that last made a condition I/II edge. When Fault falls, the
// active cell is reported as the faulty cell (fault_detection_block). A
// tick_gen divides the system clock to the 1 us counter clock.
//
// Interface: vg1/vg2 are the switching commands, vdc[k] and v_out are signed
// voltage samples (0.1 V / LSB by default), taken every clock. Latency from
// a pulse edge to err is two clocks (ref_calc and comparator registers).
// The structure is the one of the method's block diagram; widths, the tick
// rate and PW are this design's choices.
module chb_fault_detector
  import chb_fd_pkg::*;
#(
  parameter int unsigned N        = N_CELLS,
  parameter int unsigned CLK_HZ_P = CLK_HZ,
  parameter int unsigned TICK_DIV = CLK_HZ / TICK_HZ,
  parameter int unsigned TC1      = TC1_DEF,
  parameter int unsigned TC2      = TC2_DEF,
  parameter int          TH       = TH_DEF,
  parameter int unsigned PW       = PW_DEF,
  parameter int unsigned IW       = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          vg1,
  input  logic [N-1:0]          vg2,
  input  logic signed [V_W-1:0] vdc [N],
  input  logic signed [V_W-1:0] v_out,
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
  logic tick;

  tick_gen #(.DIV(TICK_DIV)) u_tick (.clk(clk), .rst_n(rst_n), .tick(tick));

  ref_calc #(.N(N), .VW(V_W)) u_ref (
    .clk(clk), .rst_n(rst_n), .vg1(vg1), .vg2(vg2), .vdc(vdc), .v_ref(v_ref));

  error_comparator #(.VW(V_W), .TH(TH)) u_cmp (
    .clk(clk), .rst_n(rst_n), .v_ref(v_ref), .v_out(v_out), .err(err));

  fault_signal_gen #(.TC1(TC1), .TC2(TC2), .CW(CNT_W)) u_fsg (
    .clk(clk), .rst_n(rst_n), .tick(tick), .err(err),
    .fault(fault), .cnt1(cnt1), .cnt2(cnt2));

  active_cell_composer #(.N(N), .PW(PW), .PWW(PW_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .tick(tick), .vg1(vg1), .vg2(vg2), .active(active));

  fault_detection_block #(.N(N), .IW(IW)) u_fdb (
    .clk(clk), .rst_n(rst_n), .fault(fault), .active(active),
    .faulty_cell(faulty_cell), .faulty_idx(faulty_idx),
    .detected(detected), .detect_pulse(detect_pulse));

  // CLK_HZ_P documents the clock the defaults assume
  initial assert (CLK_HZ_P / TICK_DIV > 0) else $error("tick divider larger than the clock");
endmodule
