// Fault detection block: names the faulty cell.
//
// After a short circuit the Fault signal can only return to 0 at an edge of
// the faulty cell, so the cell that is active when Fault falls is the faulty
// one. An edge detector finds the falling edge of Fault; if an active-cell
// signal is high at that clock, it is stored as the diagnosis.
//
// Interface: faulty_cell (one-hot) and faulty_idx hold the latest diagnosis;
// detected is sticky from the first diagnosis until reset; detect_pulse is
// high for the one clock after each diagnosis. All outputs are registered,
// one clock after the falling edge of fault. Keeping and updating the latest
// diagnosis is this design's choice.
module fault_detection_block
  import chb_fd_pkg::*;
#(
  parameter int unsigned N  = N_CELLS,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fault,
  input  logic [N-1:0]  active,
  output logic [N-1:0]  faulty_cell,
  output logic [IW-1:0] faulty_idx,
  output logic          detected,
  output logic          detect_pulse
);
  logic fault_q;
  logic fall;
  assign fall = fault_q && !fault;

  logic [IW-1:0] idx;
  always_comb begin
    idx = '0;
    for (int k = N - 1; k >= 0; k--)
      if (active[k]) idx = IW'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fault_q      <= 1'b0;
      faulty_cell  <= '0;
      faulty_idx   <= '0;
      detected     <= 1'b0;
      detect_pulse <= 1'b0;
    end else begin
      fault_q      <= fault;
      detect_pulse <= 1'b0;
      if (fall && active != '0) begin
        faulty_cell  <= active;
        faulty_idx   <= idx;
        detected     <= 1'b1;
        detect_pulse <= 1'b1;
      end
    end
  end
endmodule
