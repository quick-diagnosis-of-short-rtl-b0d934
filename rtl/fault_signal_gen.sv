// Fault signal generation with the two filter counters CNT1 and CNT2.
//
// The measured voltage lags the reference by the sensor, driver and switch
// delays, so a short Error pulse follows every switching edge even without a
// fault. Two saturating counters, clocked by `tick`, reject these pulses:
//  - while Error != 0, CNT1 counts and CNT2 holds; when CNT1 exceeds TC1,
//    Fault is set and CNT2 is cleared;
//  - while Error == 0, CNT2 counts and CNT1 holds; when CNT2 exceeds TC2,
//    Fault is reset and CNT1 is cleared.
// After reset CNT1 = 0, CNT2 is at its maximum and Fault = 0.
//
// Timing: from CNT1 = 0, Fault rises one clock after the (TC1+1)-th tick with
// Error != 0; from CNT2 = 0 it falls one clock after the (TC2+1)-th tick with
// Error == 0. With a 1 us tick and TC1 = TC2 = 10 a single delay pulse of up
// to about 10 us is rejected. Two pulses of opposite sign, from edges of two
// cells about one delay apart, can leave less than one tick of Error == 0
// between them and then count as one; a healthy phase is free of false
// Faults only for 2 * delay + 1 tick <= TC1 (about 4.5 us here). The counter rules and thresholds follow the document; the
// counter width and saturation are this design's choices.
module fault_signal_gen
  import chb_fd_pkg::*;
#(
  parameter int unsigned TC1 = TC1_DEF,
  parameter int unsigned TC2 = TC2_DEF,
  parameter int unsigned CW  = CNT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  err_t          err,
  output logic          fault,
  output logic [CW-1:0] cnt1,
  output logic [CW-1:0] cnt2
);
  localparam logic [CW-1:0] CMAX = '1;

  logic [CW-1:0] cnt1_inc, cnt2_inc;
  assign cnt1_inc = (cnt1 == CMAX) ? CMAX : cnt1 + 1'b1;
  assign cnt2_inc = (cnt2 == CMAX) ? CMAX : cnt2 + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt1  <= '0;
      cnt2  <= CMAX;
      fault <= 1'b0;
    end else if (tick) begin
      if (err != ERR_ZERO) begin
        cnt1 <= cnt1_inc;
        if (cnt1_inc > CW'(TC1)) begin
          fault <= 1'b1;
          cnt2  <= '0;
        end
      end else begin
        cnt2 <= cnt2_inc;
        if (cnt2_inc > CW'(TC2)) begin
          fault <= 1'b0;
          cnt1  <= '0;
        end
      end
    end
  end

  initial begin
    assert (TC1 < (1 << CW) - 1 && TC2 < (1 << CW) - 1)
      else $error("fault_signal_gen: thresholds must fit below the counter maximum");
  end
endmodule
