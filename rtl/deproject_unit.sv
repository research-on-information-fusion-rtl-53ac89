// deproject_unit: turns a depth pixel into a 3-D point in the depth camera
// frame (the inverse pinhole model).
//
//   Z = d * depth_scale
//   X = (u - px) * Z / fx
//   Y = (v - py) * Z / fy
//
// u is the column and v the row of the depth pixel, d its raw 16-bit sample,
// and fx, fy, px, py the depth camera intrinsics.  This follows the reference
// registration algorithm.  Its arithmetic is single precision floating point;
// here it is fixed point (see regist_pkg), which is this design's own choice.
//
// How it works: stage 1 forms u-px, v-py and Z (Z saturates at the largest
// Q16.16 value if the scale is 0.5 or more).  Stage 2 forms the Q32.32
// products (u-px)*Z and (v-py)*Z.  Two pipe_divider instances then divide
// them by fx and fy.  Z travels as the divider payload.  ok is low when a
// division overflowed or a focal length is not positive.
//
// Interface: en stalls every stage.  in_valid/out_valid mark occupied slots.
// Parameters must stay constant while pixels are in flight.
// Timing: LATENCY = 2 + (divider latency 33) = 35 enabled clocks, one pixel
// per clock.
module deproject_unit
  import regist_pkg::*;
#(
  parameter int unsigned U_W = 10,   // column index width (640 columns)
  parameter int unsigned V_W = 9     // row index width (480 rows)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               in_valid,
  input  logic [U_W-1:0]     u,
  input  logic [V_W-1:0]     v,
  input  logic [DEPTH_W-1:0] depth,
  input  intrinsics_t        intr,         // depth camera intrinsics
  input  scale_t             depth_scale,
  output logic               out_valid,
  output logic               ok,
  output fix_t               x,
  output fix_t               y,
  output fix_t               z
);

  // Stage 1
  logic  s1_v;
  fix_t  s1_du, s1_dv, s1_z;
  logic [DEPTH_W+31:0] zfull;             // Q16.32
  fix_t  z_sat;

  always_comb begin
    zfull = DEPTH_W'(depth) * 48'(depth_scale);
    if (zfull[DEPTH_W+31:FRAC+FIX_W-1] != '0) z_sat = fix_t'({1'b0, {(FIX_W-1){1'b1}}});
    else                                     z_sat = fix_t'(zfull[FRAC+FIX_W-1:FRAC]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_v <= 1'b0;
    else if (en) s1_v <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      s1_du <= fix_t'({{(FIX_W-FRAC-U_W){1'b0}}, u, {FRAC{1'b0}}}) - intr.px;
      s1_dv <= fix_t'({{(FIX_W-FRAC-V_W){1'b0}}, v, {FRAC{1'b0}}}) - intr.py;
      s1_z  <= z_sat;
    end
  end

  // Stage 2
  logic  s2_v;
  wide_t s2_nx, s2_ny;
  fix_t  s2_z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_v <= 1'b0;
    else if (en) s2_v <= s1_v;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      s2_nx <= wide_t'(s1_du) * wide_t'(s1_z);
      s2_ny <= wide_t'(s1_dv) * wide_t'(s1_z);
      s2_z  <= s1_z;
    end
  end

  // Divisions by the focal lengths
  logic vx, vy, ovx, ovy;
  fix_t qx, qy;
  logic [FIX_W-1:0] zo;

  pipe_divider #(.NUM_W(64), .DEN_W(FIX_W), .Q_W(FIX_W), .PAY_W(FIX_W)) u_divx (
    .clk, .rst_n, .en,
    .in_valid (s2_v), .num (s2_nx), .den (intr.fx), .in_pay (s2_z),
    .out_valid(vx), .quo (qx), .ovf (ovx), .out_pay (zo)
  );

  pipe_divider #(.NUM_W(64), .DEN_W(FIX_W), .Q_W(FIX_W), .PAY_W(1)) u_divy (
    .clk, .rst_n, .en,
    .in_valid (s2_v), .num (s2_ny), .den (intr.fy), .in_pay (1'b0),
    .out_valid(vy), .quo (qy), .ovf (ovy), .out_pay ()
  );

  assign out_valid = vx;
  assign ok        = !ovx && !ovy;
  assign x         = qx;
  assign y         = qy;
  assign z         = fix_t'(zo);

  // Both dividers are fed identically, so their valid bits always agree.
  assert property (@(posedge clk) disable iff (!rst_n) vx == vy);

endmodule
