// Shared constants and types for the cascaded H-bridge (CHB) short-circuit
// fault detector.
//
// Voltages are signed fixed-point samples with 0.1 V per LSB, so a 50 V cell
// DC link reads 500 and the full +-250 V swing of an 11-level phase fits in
// 16 bits. The number of cells, the 150 MHz clock, the 500 Hz carrier and the
// counter thresholds follow the 11-level prototype; the voltage scaling, the
// 1 us counter time base and the active-cell pulse width are choices of this
// design.
package chb_fd_pkg;

  // Inverter and clock
  localparam int unsigned N_CELLS   = 5;            // cells per phase: 2n+1 = 11 levels
  localparam int unsigned CLK_HZ    = 150_000_000;  // system clock
  localparam int unsigned F_CARRIER = 500;          // triangular carrier frequency
  localparam int unsigned F0_HZ     = 50;           // fundamental of the reference

  // Carrier resolution: the unitary carrier +-1 is represented as +-CAR_AMP
  localparam int unsigned CAR_AMP   = 1500;

  // Voltage samples
  localparam int unsigned V_W       = 16;           // signed, 0.1 V / LSB
  localparam int          VDC_NOM   = 500;          // 50 V DC link
  localparam int          TH_DEF    = VDC_NOM / 2;  // comparator dead band, about Vdc/2

  // Counter clock of CNT1/CNT2 and of the active-cell pulse
  localparam int unsigned TICK_HZ   = 1_000_000;    // 1 us
  localparam int unsigned TC1_DEF   = 10;
  localparam int unsigned TC2_DEF   = 10;
  localparam int unsigned CNT_W     = 8;
  localparam int unsigned PW_DEF    = 50;           // active-cell pulse width in ticks
  localparam int unsigned PW_W      = 8;

  // Dead time between complementary switches, in clock cycles
  localparam int unsigned DEAD_CYC  = 150;          // 1 us

  typedef logic signed [V_W-1:0] volt_t;

  // Quantised comparator output
  typedef enum logic signed [1:0] {
    ERR_NEG  = -2'sd1,
    ERR_ZERO =  2'sd0,
    ERR_POS  =  2'sd1
  } err_t;

endpackage
