// rigid_transform: moves a 3-D point from the depth camera frame into the
// color camera frame with the 3x4 extrinsic matrix [R | t]:
//
//   Xc = e0*X + e1*Y + e2*Z  + e3
//   Yc = e4*X + e5*Y + e6*Z  + e7
//   Zc = e8*X + e9*Y + e10*Z + e11
//
// e[k] are the twelve depth-to-color extrinsics in the host's row-major
// order.  The equations are those of the reference algorithm.  The fixed
// point format (Q16.16 in and out, Q32.32 inside) and the two-stage pipeline
// are this design's own choices.
//
// How it works: stage 1 registers the nine Q32.32 products and the three
// translations aligned to Q32.32.  Stage 2 adds each row and drops 16
// fraction bits (arithmetic shift, so it rounds toward minus infinity).  The
// results are not saturated: a point more than 32 km away would wrap.
//
// Interface: en stalls both stages.  in_valid/out_valid mark occupied slots.
// A PAY_W-bit payload travels alongside.
// Timing: LATENCY = 2 enabled clocks, one point per clock.
module rigid_transform
  import regist_pkg::*;
#(
  parameter int unsigned PAY_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             in_valid,
  input  fix_t             x,
  input  fix_t             y,
  input  fix_t             z,
  input  logic [PAY_W-1:0] in_pay,
  input  fix_t [11:0]      extr,
  output logic             out_valid,
  output fix_t             xc,
  output fix_t             yc,
  output fix_t             zc,
  output logic [PAY_W-1:0] out_pay
);

  logic             s1_v;
  wide_t            prod [3][3];
  wide_t            trans [3];
  logic [PAY_W-1:0] s1_pay;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      out_valid <= 1'b0;
    end else if (en) begin
      s1_v      <= in_valid;
      out_valid <= s1_v;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int r = 0; r < 3; r++) begin
        prod[r][0] <= wide_t'(extr[4*r+0]) * wide_t'(x);
        prod[r][1] <= wide_t'(extr[4*r+1]) * wide_t'(y);
        prod[r][2] <= wide_t'(extr[4*r+2]) * wide_t'(z);
        trans[r]   <= wide_t'(extr[4*r+3]) <<< FRAC;
      end
      s1_pay <= in_pay;
    end
  end

  wide_t row_sum [3];

  always_comb begin
    for (int r = 0; r < 3; r++) begin
      row_sum[r] = prod[r][0] + prod[r][1] + prod[r][2] + trans[r];
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      xc      <= fix_t'(row_sum[0] >>> FRAC);
      yc      <= fix_t'(row_sum[1] >>> FRAC);
      zc      <= fix_t'(row_sum[2] >>> FRAC);
      out_pay <= s1_pay;
    end
  end

endmodule
