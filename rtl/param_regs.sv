// param_regs: host-visible registers of the image registration module.
//
// The host (the ARM processor system) loads the camera model before a
// frame: color and depth intrinsics (fx, fy, px, py each), the twelve
// depth-to-color extrinsics and the depth scale.  These are the inputs of
// the reference registration algorithm.  It then writes 1 to bit 0 of CTRL
// to start a frame and polls CTRL for done.  Values are fixed point: Q16.16
// for intrinsics and extrinsics, unsigned Q0.32 for the depth scale (see
// regist_pkg).  The register map, the simple bus and the fixed-point
// encodings are this design's own choices.
//
//   0x00 CTRL     W: bit0 = start.      R: bit0 busy, bit1 done
//   0x04 WRITTEN  R: pixels written in the current or last frame
//   0x08 DROPPED  R: pixels that missed the image
//   0x10..0x1C    color fx, fy, px, py
//   0x20..0x2C    depth fx, fy, px, py
//   0x30..0x5C    extrinsics e0..e11 (row major [R | t])
//   0x60          depth scale
//
// Bus: a write takes effect at the clock edge where cfg_we is high.  Reads
// are combinational from cfg_addr.  Writes to the camera model are ignored
// while a frame is busy, so the pipeline never sees a change mid-frame.
// start is a one-clock pulse.  Unmapped addresses read as zero.
module param_regs
  import regist_pkg::*;
#(
  parameter int unsigned CNT_W = 19
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       cfg_addr,
  input  logic [31:0]      cfg_wdata,
  input  logic             cfg_we,
  output logic [31:0]      cfg_rdata,
  input  logic             busy,
  input  logic             done,
  input  logic [CNT_W-1:0] written,
  input  logic [CNT_W-1:0] dropped,
  output logic             start,
  output cam_params_t      params
);

  // The camera model as a flat word array: index (addr - 0x10) / 4.
  // 0..3 color, 4..7 depth, 8..19 extrinsics, 20 depth scale.
  localparam int unsigned NWORDS = 21;
  logic [31:0] word [NWORDS];

  logic       in_model;
  logic [4:0] widx;

  always_comb begin
    in_model = (cfg_addr >= REG_INTR_C) && (cfg_addr <= REG_SCALE) && (cfg_addr[1:0] == 2'b00);
    widx     = 5'((cfg_addr - REG_INTR_C) >> 2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NWORDS; i++) word[i] <= '0;
      start <= 1'b0;
    end else begin
      start <= cfg_we && (cfg_addr == REG_CTRL) && cfg_wdata[0] && !busy;
      if (cfg_we && in_model && !busy) word[widx] <= cfg_wdata;
    end
  end

  always_comb begin
    params.color.fx    = fix_t'(word[0]);
    params.color.fy    = fix_t'(word[1]);
    params.color.px    = fix_t'(word[2]);
    params.color.py    = fix_t'(word[3]);
    params.depth.fx    = fix_t'(word[4]);
    params.depth.fy    = fix_t'(word[5]);
    params.depth.px    = fix_t'(word[6]);
    params.depth.py    = fix_t'(word[7]);
    for (int k = 0; k < 12; k++) params.extr[k] = fix_t'(word[8 + k]);
    params.depth_scale = word[20];
  end

  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr == REG_CTRL)         cfg_rdata = {30'd0, done, busy};
    else if (cfg_addr == REG_WRITTEN) cfg_rdata = 32'(written);
    else if (cfg_addr == REG_DROPPED) cfg_rdata = 32'(dropped);
    else if (in_model)                cfg_rdata = word[widx];
  end

endmodule
