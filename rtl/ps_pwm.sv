// Phase-shifted PWM modulator for one phase of a cascaded H-bridge inverter.
//
// Each cell k has two opposite-phased triangular carriers, c1 and c2 = -c1.
// The carriers of adjacent cells are shifted by 180/n degrees. The pulse of
// S1 is 1 while c1 <= v_r. The pulse of S2 is 1 while c2 > v_r, so that the
// cell voltage (S1 - S2) * Vdc follows the reference with 0 and +Vdc in the
// positive half-wave and 0 and -Vdc in the negative one; applying c <= v_r to
// both carriers would make the mean cell voltage zero. With n cells this
// gives 2n+1 output levels.
//
// A carrier step strobe at CLK_HZ / (4*F_CARRIER*CAR_AMP) (50 clocks by
// default, 3 MHz) drives a counter t = 0 .. 4*CAR_AMP-1 that spans one carrier
// period. Cell k uses phase p = t + k*2*CAR_AMP/n (mod 4*CAR_AMP); its carrier
// is p - CAR_AMP on the rising half and 3*CAR_AMP - p on the falling half, so
// it runs between -CAR_AMP and +CAR_AMP, the unitary carrier of the method.
//
// Interface: v_r is a signed sample in the same units (+-CAR_AMP = +-1).
// The comparison is evaluated only on the clock after each carrier step, with
// v_r sampled at that clock (regular sampling at the step rate). Carrier and
// reference then change at the same instants; since the carrier moves one
// LSB per step and the reference far less, their difference is monotonic
// between carrier peaks and every crossing gives exactly one switching edge.
// Comparing on every clock would let a staircase reference that moves in the
// carrier's direction cross it back and forth, giving one-clock pulses.
// vg1[k] and vg2[k] are registered and change two clocks after the carrier
// step strobe at which the comparison changes. The carrier law, the phase shift and
// the 500 Hz carrier follow the document; the counter-based carrier, its
// resolution and the phase origin are this design's choices.
module ps_pwm
  import chb_fd_pkg::*;
#(
  parameter int unsigned N         = N_CELLS,
  parameter int unsigned CLK_HZ_P  = CLK_HZ,
  parameter int unsigned F_CAR_P   = F_CARRIER,
  parameter int unsigned CAR_AMP_P = CAR_AMP
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] v_r,
  output logic [N-1:0]       vg1,
  output logic [N-1:0]       vg2,
  output logic               car_tick
);
  localparam int unsigned DIV    = CLK_HZ_P / (4 * F_CAR_P * CAR_AMP_P);
  localparam int unsigned PERIOD = 4 * CAR_AMP_P;
  localparam int unsigned TW     = $clog2(PERIOD) + 1;
  localparam int unsigned CW     = (TW + 2 > 17) ? TW + 2 : 17;  // compare width

  tick_gen #(.DIV(DIV)) u_step (.clk(clk), .rst_n(rst_n), .tick(car_tick));

  logic [TW-1:0] t;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      t <= '0;
    else if (car_tick)
      t <= (t == TW'(PERIOD - 1)) ? '0 : t + 1'b1;
  end

  logic signed [CW-1:0] c1 [N];
  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic [CW-1:0] p;
      p = CW'(t) + CW'((k * 2 * CAR_AMP_P) / N);
      if (p >= CW'(PERIOD)) p = p - CW'(PERIOD);
      if (p < CW'(2 * CAR_AMP_P))
        c1[k] = signed'(p) - CW'(CAR_AMP_P);
      else
        c1[k] = CW'(3 * CAR_AMP_P) - signed'(p);
    end
  end

  logic step_q;  // t has just advanced
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      step_q <= 1'b0;
    else
      step_q <= car_tick;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vg1 <= '0;
      vg2 <= '0;
    end else if (step_q) begin
      for (int k = 0; k < N; k++) begin
        vg1[k] <= (c1[k] <= CW'(v_r));
        vg2[k] <= ((-c1[k]) > CW'(v_r));
      end
    end
  end
endmodule
