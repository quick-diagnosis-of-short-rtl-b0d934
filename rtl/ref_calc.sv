// Reference calculation: the phase voltage the inverter should produce.
//
// Each healthy H-bridge cell outputs (S1 - S2) * Vdc, and the series cells
// add up, so V_ref = sum over k of (vg1[k] - vg2[k]) * vdc[k], built from the
// switching pulses and the measured DC-link voltage of every cell. Follows
// the document; using one measured DC-link voltage per cell is this design's
// reading of "DC-Link voltages".
//
// Interface: vdc[k] and v_ref are signed samples (0.1 V / LSB by default).
// v_ref is registered, one clock after its inputs.
module ref_calc
  import chb_fd_pkg::*;
#(
  parameter int unsigned N  = N_CELLS,
  parameter int unsigned VW = V_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         vg1,
  input  logic [N-1:0]         vg2,
  input  logic signed [VW-1:0] vdc [N],
  output logic signed [VW-1:0] v_ref
);
  logic signed [VW-1:0] sum;
  always_comb begin
    sum = '0;
    for (int k = 0; k < N; k++) begin
      if (vg1[k] && !vg2[k]) sum = sum + vdc[k];
      else if (!vg1[k] && vg2[k]) sum = sum - vdc[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_ref <= '0;
    else        v_ref <= sum;
  end
endmodule
