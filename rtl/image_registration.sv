// image_registration: depth-to-color image registration accelerator.
//
// A depth camera and a color camera sit side by side and see the same scene
// from slightly different points.  Before depth can be looked up at a color
// pixel (for example at a detected face or object), every depth sample has
// to be moved into the color camera's view.  For each depth pixel (u,v) with
// raw depth d, this block computes:
//   1. the 3-D point in the depth camera frame (deproject_unit),
//   2. the same point in the color camera frame (rigid_transform),
//   3. the color pixel it lands on (project_unit).
// It then issues a write of the point's depth to depth_of_color[vc*640+uc]
// when that pixel lies inside the 640x480 color image.  The algorithm is the
// reference one.  Its floating-point arithmetic is carried out here in
// Q16.16 fixed point.
//
// Interfaces (all of them this design's own choice):
//   cfg_*   register bus of param_regs: camera model, start, status.
//   s_*     depth samples, 16-bit, in raster order (row 0 first, column 0
//           first), valid/ready handshake.  A frame is IMG_W*IMG_H samples.
//   m_*     depth_of_color writes: linear pixel address and Q16.16 depth
//           (metres when the depth scale is in metres per unit),
//           valid/ready handshake.  The output buffer is not cleared by this
//           block, as in the reference algorithm.  Later pixels overwrite
//           earlier ones that land on the same color pixel.
//   irq     one-clock pulse when a frame is complete.
//
// Timing: one depth sample per clock when m_ready stays high and samples
// arrive every clock.  The pipeline is 72 stages deep (35 deprojection, 2
// transform, 35 projection).  irq rises IMG_W*IMG_H + 73 clock edges after
// the edge that writes start: one edge to leave IDLE, one per pixel, 72 for
// the last pixel to retire.  At 640x480 that is 307,273 clocks, about
// 3.1 ms at 100 MHz.  When m_ready is low while a write is
// pending, the whole pipeline and the input stall together (one global
// enable).
module image_registration
  import regist_pkg::*;
#(
  parameter int unsigned IMG_W  = IMG_W_DEF,
  parameter int unsigned IMG_H  = IMG_H_DEF,
  parameter int unsigned ADDR_W = $clog2(IMG_W * IMG_H),
  parameter int unsigned CNT_W  = $clog2(IMG_W * IMG_H + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // register bus
  input  logic [7:0]         cfg_addr,
  input  logic [31:0]        cfg_wdata,
  input  logic               cfg_we,
  output logic [31:0]        cfg_rdata,
  // depth sample stream
  input  logic               s_valid,
  output logic               s_ready,
  input  logic [DEPTH_W-1:0] s_depth,
  // depth_of_color write stream
  output logic               m_valid,
  input  logic               m_ready,
  output logic [ADDR_W-1:0]  m_addr,
  output fix_t               m_data,
  output logic               irq
);

  localparam int unsigned U_W = $clog2(IMG_W);
  localparam int unsigned V_W = $clog2(IMG_H);

  cam_params_t      params;
  logic             start, busy, done, take;
  logic [U_W-1:0]   u;
  logic [V_W-1:0]   v;
  logic [CNT_W-1:0] written, dropped;

  // Global pipeline enable: only a write that the sink refuses stalls.
  logic en;
  logic p_valid, p_write;
  assign en      = !(p_valid && p_write) || m_ready;
  assign s_ready = take && en;

  logic accept;
  assign accept = s_valid && s_ready;

  param_regs #(.CNT_W(CNT_W)) u_regs (
    .clk, .rst_n,
    .cfg_addr, .cfg_wdata, .cfg_we, .cfg_rdata,
    .busy, .done, .written, .dropped,
    .start, .params
  );

  regist_ctrl #(.IMG_W(IMG_W), .IMG_H(IMG_H), .U_W(U_W), .V_W(V_W), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n,
    .start, .accept,
    .retire (p_valid && en),
    .write  (p_write && en),
    .take, .u, .v, .busy, .done,
    .done_pulse (irq),
    .written, .dropped
  );

  // Eq. 1: depth pixel -> depth camera point
  logic d_valid, d_ok;
  fix_t d_x, d_y, d_z;

  deproject_unit #(.U_W(U_W), .V_W(V_W)) u_deproj (
    .clk, .rst_n, .en,
    .in_valid (accept), .u, .v, .depth (s_depth),
    .intr (params.depth), .depth_scale (params.depth_scale),
    .out_valid (d_valid), .ok (d_ok), .x (d_x), .y (d_y), .z (d_z)
  );

  // Eq. 2: depth camera frame -> color camera frame
  logic             r_valid;
  fix_t             r_x, r_y, r_z;
  logic [FIX_W:0]   r_pay;

  rigid_transform #(.PAY_W(FIX_W + 1)) u_rigid (
    .clk, .rst_n, .en,
    .in_valid (d_valid), .x (d_x), .y (d_y), .z (d_z),
    .in_pay ({d_ok, d_z}), .extr (params.extr),
    .out_valid (r_valid), .xc (r_x), .yc (r_y), .zc (r_z), .out_pay (r_pay)
  );

  // Eq. 3 and the range check: color camera frame -> color pixel write
  project_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ADDR_W(ADDR_W)) u_proj (
    .clk, .rst_n, .en,
    .in_valid (r_valid), .in_ok (r_pay[FIX_W]),
    .xc (r_x), .yc (r_y), .zc (r_z), .zd (fix_t'(r_pay[FIX_W-1:0])),
    .intr (params.color),
    .out_valid (p_valid), .out_write (p_write), .out_addr (m_addr), .out_data (m_data)
  );

  assign m_valid = p_valid && p_write;

  // Stream rules: a pending write holds its address and data until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_valid && !m_ready |=> m_valid && $stable(m_addr) && $stable(m_data));
  assert property (@(posedge clk) disable iff (!rst_n) s_ready |-> take);

endmodule
