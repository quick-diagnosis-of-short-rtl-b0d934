// Three-level comparator of the reference and the measured phase voltage.
//
// error = v_ref - v_out. The Error output is +1 when error > TH, -1 when
// error < -TH, and 0 otherwise. The dead band TH absorbs the spread of the
// DC-link voltages; about Vdc/2 is the recommended value (250 = 25 V at
// 0.1 V / LSB). The difference is formed one bit wider so it cannot wrap.
//
// Interface: signed samples in, err (err_t: -1/0/+1) registered, one clock
// after its inputs. The law follows the document; the encoding is this
// design's choice.
module error_comparator
  import chb_fd_pkg::*;
#(
  parameter int unsigned VW = V_W,
  parameter int          TH = TH_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [VW-1:0] v_ref,
  input  logic signed [VW-1:0] v_out,
  output err_t                 err
);
  logic signed [VW:0] e;
  assign e = (VW+1)'(v_ref) - (VW+1)'(v_out);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    err <= ERR_ZERO;
    else if (e >  (VW+1)'(TH))     err <= ERR_POS;
    else if (e < -(VW+1)'(TH))     err <= ERR_NEG;
    else                           err <= ERR_ZERO;
  end
endmodule
