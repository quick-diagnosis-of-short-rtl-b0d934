// Clock-enable generator: divides the system clock by DIV and emits a
// one-cycle strobe every DIV cycles. Used for the 1 us counter clock of the
// fault detector and for the carrier step of the modulator.
// Interface: clk, rst_n (async, active low), tick out. The first strobe comes
// DIV cycles after reset is released.
module tick_gen #(
  parameter int unsigned DIV = 150
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == W'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
