// Dead-time insertion for the complementary switch pairs of the H-bridge legs.
//
// Every switching pulse vg[i] drives one leg: the upper switch follows vg[i]
// and the lower one its complement. After any change of vg[i] both gates stay
// off for DEAD cycles, so the two switches of a leg are never on together.
// A per-channel counter of the cycles since the last change of vg[i]
// (saturating at DEAD) gates the outputs.
//
// Interface: vg is the 2*N-bit vector {vg2, vg1} of all cells. g_hi/g_lo are
// registered: a turn-on appears DEAD+1 clocks after the edge of vg, a turn-off
// one clock after it. The document states only that a dead time separates the
// complementary switches; its length (1 us) and this implementation are this
// design's choices.
module dead_time_gen
  import chb_fd_pkg::*;
#(
  parameter int unsigned NCH  = 2 * N_CELLS,
  parameter int unsigned DEAD = DEAD_CYC
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] vg,
  output logic [NCH-1:0] g_hi,
  output logic [NCH-1:0] g_lo
);
  localparam int unsigned DW = $clog2(DEAD + 1);

  logic [NCH-1:0] vg_q;
  logic [DW-1:0]  since [NCH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vg_q <= '0;
      g_hi <= '0;
      g_lo <= '0;
      for (int i = 0; i < NCH; i++) since[i] <= '0;
    end else begin
      vg_q <= vg;
      for (int i = 0; i < NCH; i++) begin
        if (vg[i] != vg_q[i]) begin
          since[i] <= '0;
          g_hi[i]  <= 1'b0;
          g_lo[i]  <= 1'b0;
        end else begin
          if (since[i] != DW'(DEAD)) since[i] <= since[i] + 1'b1;
          g_hi[i] <= vg[i]  && (since[i] == DW'(DEAD));
          g_lo[i] <= !vg[i] && (since[i] == DW'(DEAD));
        end
      end
    end
  end
endmodule
