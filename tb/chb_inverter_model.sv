// Behavioural model of one phase of the cascaded H-bridge power stage, for
// testbenches only (not synthesizable hardware: the power stage has no logic).
//
// Cell k outputs (S1 - S2) * vdc[k]. A short circuit can be injected in S1
// or S2 of one cell: the shorted switch conducts all the time, so the leg is
// shorted as soon as its complementary switch is commanded on (the switching
// pulse of the shorted switch goes to 0). The cell's fuse then opens and its
// output is 0 from then on. The phase voltage is the sum of the cells, plus a
// small uniform measurement noise of +-NOISE LSB, delayed by TD clock cycles
// to stand for the sensor, driver and switch delays.
module chb_inverter_model
  import chb_fd_pkg::*;
#(
  parameter int unsigned N     = N_CELLS,
  parameter int unsigned TD    = 450,      // 3 us at 150 MHz
  parameter int unsigned NOISE = 20
) (
  input  logic                  clk,
  input  logic [N-1:0]          vg1,
  input  logic [N-1:0]          vg2,
  input  logic signed [V_W-1:0] vdc [N],
  input  logic                  fault_en,
  input  int unsigned           fault_cell,
  input  logic                  fault_sw,    // 0: S1 shorted, 1: S2 shorted
  input  logic                  clear,       // replaces the blown fuse
  output logic signed [V_W-1:0] v_out,
  output logic [N-1:0]          blown
);
  logic signed [V_W-1:0] dly [TD];     // ring buffer
  logic signed [V_W-1:0] v_now;
  int unsigned           wp;

  initial begin
    blown = '0;
    wp = 0;
    for (int i = 0; i < TD; i++) dly[i] = '0;
  end

  always_comb begin
    v_now = '0;
    for (int k = 0; k < N; k++)
      if (!blown[k]) begin
        if (vg1[k] && !vg2[k]) v_now = v_now + vdc[k];
        else if (!vg1[k] && vg2[k]) v_now = v_now - vdc[k];
      end
  end

  always @(posedge clk) begin
    if (clear) blown <= '0;
    else if (fault_en && ((fault_sw == 1'b0 && !vg1[fault_cell]) ||
                          (fault_sw == 1'b1 && !vg2[fault_cell])))
      blown[fault_cell] <= 1'b1;
    dly[wp] <= v_now + V_W'($signed(int'($urandom_range(2 * NOISE)) - int'(NOISE)));
    wp <= (wp == TD - 1) ? 0 : wp + 1;
  end

  // oldest entry: written TD clocks ago
  assign v_out = dly[wp];
endmodule
