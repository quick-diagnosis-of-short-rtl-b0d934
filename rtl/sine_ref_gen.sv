// Sinusoidal modulating reference for the phase-shifted PWM.
//
// Produces v_r = m_a * sin(2*pi*F0_HZ*t), scaled so that +-CAR_AMP stands for
// the unitary carrier amplitude +-1. A 32-bit phase accumulator advances every
// clock by round(F0_HZ * 2^32 / CLK_HZ). On each `upd` strobe the current
// phase is folded into [-pi/2, pi/2] and an iterative CORDIC in rotation mode
// (one micro-rotation per clock, ITER clocks per sample) rotates the vector
// (m_a*K*CAR_AMP, 0) by that angle; its y component is the sample. K is the
// CORDIC gain correction 0.607253. The angle constants are
// atan(2^-i) / (2*pi) * 2^32.
//
// Interface: m_a is unsigned Q1.15 (32768 = 1.0) and is taken at `upd`.
// v_r is signed and updates, with a one-cycle v_r_valid pulse, ITER+1 clocks
// after `upd`. `upd` strobes closer together than ITER+1 clocks are ignored.
// The document only says the reference is a sinusoid of amplitude m_a and
// frequency f0; the CORDIC, the 50 Hz default and the scaling are this
// design's choices.
module sine_ref_gen
  import chb_fd_pkg::*;
#(
  parameter int unsigned CLK_HZ_P  = CLK_HZ,
  parameter int unsigned F0_HZ_P   = F0_HZ,
  parameter int unsigned CAR_AMP_P = CAR_AMP,
  parameter int unsigned ITER      = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              upd,
  input  logic [15:0]       m_a,
  output logic signed [15:0] v_r,
  output logic              v_r_valid
);
  localparam int unsigned FRAC = 8;                       // extra fraction bits
  localparam longint unsigned K_Q16 = 39797;              // 0.607253 * 2^16
  localparam longint unsigned KA = (longint'(CAR_AMP_P) * (1 << FRAC) * K_Q16) >> 16;
  localparam logic [31:0] PHASE_INC =
    32'(((longint'(F0_HZ_P) << 32) + longint'(CLK_HZ_P) / 2) / longint'(CLK_HZ_P));

  function automatic logic signed [31:0] atan_c(input int unsigned i);
    case (i)
      0:  return 32'sd536870912;
      1:  return 32'sd316933406;
      2:  return 32'sd167458907;
      3:  return 32'sd85004756;
      4:  return 32'sd42667331;
      5:  return 32'sd21354465;
      6:  return 32'sd10679838;
      7:  return 32'sd5340245;
      8:  return 32'sd2670163;
      9:  return 32'sd1335087;
      10: return 32'sd667544;
      11: return 32'sd333772;
      12: return 32'sd166886;
      13: return 32'sd83443;
      14: return 32'sd41722;
      15: return 32'sd20861;
      default: return 32'sd0;
    endcase
  endfunction

  logic [31:0]        phase;
  logic signed [25:0] x, y;
  logic signed [31:0] z;
  logic               neg, busy;
  logic [4:0]         it;

  // Folded start angle and sign
  logic signed [31:0] z_in;
  logic               neg_in;
  always_comb begin
    z_in   = signed'(phase);
    neg_in = 1'b0;
    if (z_in > 32'sh4000_0000 || z_in < -32'sh4000_0000) begin
      z_in   = z_in + 32'sh8000_0000;   // subtract pi (wraps modulo 2*pi)
      neg_in = 1'b1;
    end
  end

  localparam logic signed [25:0] AMP = 26'(CAR_AMP_P);
  logic signed [25:0] y_sat;
  logic signed [25:0] y_rnd;
  always_comb begin
    y_rnd = (neg ? -y : y) + 26'sd128;
    y_sat = y_rnd >>> FRAC;
    if (y_sat >  AMP) y_sat =  AMP;
    if (y_sat < -AMP) y_sat = -AMP;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      x         <= '0;
      y         <= '0;
      z         <= '0;
      neg       <= 1'b0;
      busy      <= 1'b0;
      it        <= '0;
      v_r       <= '0;
      v_r_valid <= 1'b0;
    end else begin
      phase     <= phase + PHASE_INC;
      v_r_valid <= 1'b0;
      if (!busy) begin
        if (upd) begin
          x    <= 26'((longint'(m_a) * longint'(KA)) >> 15);
          y    <= '0;
          z    <= z_in;
          neg  <= neg_in;
          it   <= '0;
          busy <= 1'b1;
        end
      end else if (it == 5'(ITER)) begin
        busy      <= 1'b0;
        v_r       <= 16'(y_sat);
        v_r_valid <= 1'b1;
      end else begin
        if (z >= 0) begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - atan_c(32'(it));
        end else begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + atan_c(32'(it));
        end
        it <= it + 1'b1;
      end
    end
  end
endmodule
