// Active cell composer: marks which cell switched last at an edge that can
// end a fault's Error interval.
//
// The voltage of cell k follows its state s = vg1 - vg2 (-1, 0 or +1). If a
// switch of cell k is shorted, the cell's fuse opens and its output stays 0,
// so Error returns to 0 exactly when the reference of that cell returns to 0.
// Those are the edges of conditions I and II: S1 (or S2) turning on while the
// other is on, or turning off while the other is off; in both the state of
// the cell goes from +-1 to 0. Only these edges, half of all edges, are used.
//
// On such an edge of cell k, active becomes one-hot k and stays so for PW
// ticks. Only one cell is active at a time: a later edge of another cell
// takes over at once. If several cells have such an edge in the same clock
// the lowest index wins. PW must exceed the measurement delay plus the CNT2
// filter time, and stay below the minimum distance between two such edges
// (173 us for 11 levels with a 2 ms carrier period); 50 us is this design's
// choice.
//
// Interface: vg1/vg2 are the switching pulses; active is registered and rises
// one clock after the edge; it lasts PW ticks (between PW-1 and PW tick
// periods).
module active_cell_composer
  import chb_fd_pkg::*;
#(
  parameter int unsigned N   = N_CELLS,
  parameter int unsigned PW  = PW_DEF,
  parameter int unsigned PWW = PW_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic [N-1:0] vg1,
  input  logic [N-1:0] vg2,
  output logic [N-1:0] active
);
  logic [N-1:0]   vg1_q, vg2_q;
  logic [N-1:0]   edge_k;
  logic [N-1:0]   first;
  logic [PWW-1:0] timer;

  // Condition I or II: the cell state goes from nonzero to zero
  always_comb begin
    for (int k = 0; k < N; k++)
      edge_k[k] = (vg1_q[k] != vg2_q[k]) && (vg1[k] == vg2[k]);
    first = edge_k & (~edge_k + 1'b1);   // lowest set bit
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vg1_q  <= '0;
      vg2_q  <= '0;
      active <= '0;
      timer  <= '0;
    end else begin
      vg1_q <= vg1;
      vg2_q <= vg2;
      if (edge_k != '0) begin
        active <= first;
        timer  <= PWW'(PW);
      end else if (tick && timer != '0) begin
        timer <= timer - 1'b1;
        if (timer == PWW'(1)) active <= '0;
      end
    end
  end

  a_one_active : assert property (@(posedge clk) disable iff (!rst_n) $countones(active) <= 1)
    else $error("active_cell_composer: more than one active cell");
endmodule
