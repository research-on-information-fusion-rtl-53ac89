// project_unit: projects a color-camera 3-D point into the color image and
// forms the write that stores the point's depth at that pixel.
//
//   uc = trunc(fx * Xc / Zc + px)      vc = trunc(fy * Yc / Zc + py)
//   write depth_of_color[vc*IMG_W + uc] = Zd   if 0 <= uc < IMG_W and 0 <= vc < IMG_H
//
// fx, fy, px, py are the color camera intrinsics and Zd the depth-camera Z of
// the point (the value the reference algorithm stores, not Zc).  trunc()
// truncates toward zero, as the reference algorithm's conversion to an
// unsigned 16-bit pixel index does.  A result at or below -1 is treated as
// off the image.  A point with Zc <= 0 (behind the color camera) and a
// quotient that does not fit Q16.16 are dropped: the floating-point original
// leaves these cases undefined, so dropping them is this design's own rule.
//
// How it works: stage 1 forms the Q32.32 products fx*Xc and fy*Yc.  Two
// pipe_divider instances divide them by Zc, which yields Q16.16.  The last
// stage adds the principal point, truncates, range-checks and computes the
// linear address.  Zd and a valid flag from upstream (in_ok) ride in the
// divider payload.
//
// Interface: en stalls every stage.  Every pixel that leaves sets out_valid
// for one enabled clock.  out_write says whether that pixel writes.
// Timing: LATENCY = 1 + 33 + 1 = 35 enabled clocks, one pixel per clock.
module project_unit
  import regist_pkg::*;
#(
  parameter int unsigned IMG_W  = IMG_W_DEF,
  parameter int unsigned IMG_H  = IMG_H_DEF,
  parameter int unsigned ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              in_valid,
  input  logic              in_ok,      // upstream stages produced a valid point
  input  fix_t              xc,
  input  fix_t              yc,
  input  fix_t              zc,
  input  fix_t              zd,         // depth-camera Z, the value written
  input  intrinsics_t       intr,       // color camera intrinsics
  output logic              out_valid,  // a pixel leaves the pipeline
  output logic              out_write,  // ... and it lands inside the image
  output logic [ADDR_W-1:0] out_addr,
  output fix_t              out_data
);

  localparam int unsigned PAY_W = FIX_W + 1;

  // Stage 1: numerators
  logic  s1_v, s1_ok;
  wide_t s1_nx, s1_ny;
  fix_t  s1_zc, s1_zd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_v <= 1'b0;
    else if (en) s1_v <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      s1_nx <= wide_t'(intr.fx) * wide_t'(xc);
      s1_ny <= wide_t'(intr.fy) * wide_t'(yc);
      s1_zc <= zc;
      s1_zd <= zd;
      s1_ok <= in_ok;
    end
  end

  // Division by Zc
  logic             dv_x, dv_y, ov_x, ov_y;
  fix_t             q_x, q_y;
  logic [PAY_W-1:0] pay_o;

  pipe_divider #(.NUM_W(64), .DEN_W(FIX_W), .Q_W(FIX_W), .PAY_W(PAY_W)) u_divx (
    .clk, .rst_n, .en,
    .in_valid (s1_v), .num (s1_nx), .den (s1_zc), .in_pay ({s1_ok, s1_zd}),
    .out_valid(dv_x), .quo (q_x), .ovf (ov_x), .out_pay (pay_o)
  );

  pipe_divider #(.NUM_W(64), .DEN_W(FIX_W), .Q_W(FIX_W), .PAY_W(1)) u_divy (
    .clk, .rst_n, .en,
    .in_valid (s1_v), .num (s1_ny), .den (s1_zc), .in_pay (1'b0),
    .out_valid(dv_y), .quo (q_y), .ovf (ov_y), .out_pay ()
  );

  // Last stage: principal point, truncation toward zero, range check
  logic signed [FIX_W:0] uf, vf;             // one extra bit, no wrap
  logic                  u_in, v_in;
  logic [FIX_W-FRAC:0]   ui, vi;             // integer parts (non-negative)
  logic                  hit;

  function automatic logic to_index(input logic signed [FIX_W:0] f,
                                    input int unsigned           lim,
                                    output logic [FIX_W-FRAC:0]  idx);
    // Returns 1 when trunc(f) lies in 0 .. lim-1.
    if (f >= 0) begin
      idx = (FIX_W-FRAC+1)'(f >>> FRAC);
      return idx < (FIX_W-FRAC+1)'(lim);
    end else if (f > -(FIX_W+1)'(1 << FRAC)) begin
      idx = '0;                              // -1 < f < 0 truncates to 0
      return 1'b1;
    end else begin
      idx = '0;
      return 1'b0;
    end
  endfunction

  always_comb begin
    uf   = (FIX_W+1)'(q_x) + (FIX_W+1)'(intr.px);
    vf   = (FIX_W+1)'(q_y) + (FIX_W+1)'(intr.py);
    u_in = to_index(uf, IMG_W, ui);
    v_in = to_index(vf, IMG_H, vi);
    hit  = pay_o[PAY_W-1] && !ov_x && !ov_y && u_in && v_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_write <= 1'b0;
    end else if (en) begin
      out_valid <= dv_x;
      out_write <= dv_x && hit;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      out_addr <= ADDR_W'(vi * IMG_W + ui);
      out_data <= fix_t'(pay_o[FIX_W-1:0]);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) dv_x == dv_y);

endmodule
