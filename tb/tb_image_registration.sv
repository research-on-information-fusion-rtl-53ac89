// tb_image_registration: end-to-end, full-size test of the depth-to-color
// registration module (640x480, default parameters).
//
// A synthetic depth frame is generated: a background wall at about 2.5 m, a
// box at 1.0 m in front of it, 1 mm depth units and scattered holes with
// depth 0.  The camera models resemble a small stereo depth camera with a
// separate color sensor.  The test loads them over the register bus and
// runs three frames:
//   frame 1  random input bubbles and random output back-pressure, with a
//            start and a camera-model write attempted while busy (both must
//            be ignored);
//   frame 2  no bubbles and no back-pressure; irq must rise exactly
//            NPIX + 73 clock edges after the edge that writes start (one
//            pixel per clock, the 72-stage pipeline and one clock for the
//            controller to leave IDLE);
//   frame 3  the same with 20% more color focal length, to show that a new
//            camera model loaded between frames takes effect.
// Every write (its order, address and depth) is compared with the
// wide-integer model.  The WRITTEN/DROPPED registers must match the model's
// counts.  The write addresses are also compared with a double-precision
// evaluation of the algorithm, and at most 0.5% of them may differ by more
// than one pixel.  Each mechanism must be seen at least once: output stall,
// input bubble, off-image drop, Zc <= 0 drop (depth holes), two depth pixels
// landing on the same color pixel, ignored start, ignored model write.
module tb_image_registration;
  import regist_pkg::*;
  import regist_model_pkg::*;

  localparam int W = 640, H = 480, NPIX = W * H;
  localparam int FRAME_CLKS = NPIX + 73;     // clock edges, start write to irq

  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic cfg_we = 0;
  logic [31:0] cfg_rdata;
  logic s_valid = 0, s_ready;
  logic [15:0] s_depth = '0;
  logic m_valid, m_ready = 1;
  logic [18:0] m_addr;
  fix_t m_data;
  logic irq;

  int checks = 0, failures = 0;

  image_registration dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---- scene -------------------------------------------------------------
  function automatic int scene_depth(int u, int v);
    int d;
    logic [31:0] h;
    h = 32'(u * 7919 + v * 104729) ^ 32'(u * v * 31);
    h = h ^ (h >> 13);
    h = h * 32'h5bd1e995;
    h = h ^ (h >> 15);
    if (h[6:0] == 0) return 0;                                 // hole
    d = 2400 + v / 4 + 32'(h[3:0]);                           // wall
    if (u >= 200 && u < 420 && v >= 150 && v < 330) d = 1000 + (u - 200) / 8;   // box
    return d;
  endfunction

  // ---- camera model ------------------------------------------------------
  cam_params_t p;

  task automatic set_model(real color_gain);
    real a, b;
    p.color.fx = r2fx(615.3 * color_gain);
    p.color.fy = r2fx(615.7 * color_gain);
    p.color.px = r2fx(319.6);
    p.color.py = r2fx(241.2);
    p.depth.fx = r2fx(385.2);
    p.depth.fy = r2fx(385.2);
    p.depth.px = r2fx(320.4);
    p.depth.py = r2fx(238.9);
    a = 0.004; b = -0.003;                      // small rotation angles (rad)
    p.extr[0] = r2fx(1.0);  p.extr[1] = r2fx(-a);  p.extr[2]  = r2fx(b);   p.extr[3]  = r2fx(0.0148);
    p.extr[4] = r2fx(a);    p.extr[5] = r2fx(1.0); p.extr[6]  = r2fx(0.002); p.extr[7] = r2fx(0.0002);
    p.extr[8] = r2fx(-b);   p.extr[9] = r2fx(-0.002); p.extr[10] = r2fx(1.0); p.extr[11] = '0;
    p.depth_scale = 32'd4294967;                // 0.001 m per unit
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_addr = a; cfg_wdata = d; cfg_we = 1;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic load_model();
    wr(8'h10, p.color.fx); wr(8'h14, p.color.fy); wr(8'h18, p.color.px); wr(8'h1c, p.color.py);
    wr(8'h20, p.depth.fx); wr(8'h24, p.depth.fy); wr(8'h28, p.depth.px); wr(8'h2c, p.depth.py);
    for (int k = 0; k < 12; k++) wr(8'(8'h30 + 4 * k), p.extr[k]);
    wr(8'h60, p.depth_scale);
  endtask

  // ---- stimulus and scoreboard -------------------------------------------
  typedef struct { int addr; fix_t d; int raddr; logic rok; } wexp_t;
  wexp_t q_w[$];
  int ptr;                 // next pixel to send
  int exp_written, exp_dropped;
  logic stress = 0;        // random bubbles and back-pressure
  logic running = 0;
  int last_writer [NPIX];
  int n_stall, n_bubble, n_off, n_hole, n_collide, n_far, n_seen;
  longint cyc = 0;

  always @(posedge clk) cyc++;

  always @(negedge clk) if (running) begin
    s_valid = (ptr < NPIX) && (!stress || $urandom_range(0, 4) != 0);
    s_depth = (ptr < NPIX) ? 16'(scene_depth(ptr % W, ptr / W)) : 16'd0;
    m_ready = !stress || ($urandom_range(0, 3) != 0);
    #2;
    if (m_valid && !m_ready) n_stall++;
    if (!s_valid && s_ready) n_bubble++;
    if (m_valid && m_ready) begin
      wexp_t e;
      if (q_w.size() == 0) begin
        check(0, "unexpected write");
      end else begin
        e = q_w.pop_front();
        check(int'(m_addr) == e.addr && m_data == e.d,
              $sformatf("write addr %0d/%0d data %0d/%0d", m_addr, e.addr, m_data, e.d));
        n_seen++;
        if (last_writer[e.addr] == 1) n_collide++;
        last_writer[e.addr] = 1;
        if (!e.rok || e.raddr < 0 ||
            (((e.raddr % W) - (e.addr % W)) ** 2 > 1) || (((e.raddr / W) - (e.addr / W)) ** 2 > 1))
          n_far++;
      end
    end
    if (s_valid && s_ready) begin
      int u, v, a, ra;
      fix_t zd;
      wexp_t e;
      logic wr_ok;
      u = ptr % W; v = ptr / W;
      wr_ok = m_pixel(u, v, int'(s_depth), p, W, H, a, zd);
      if (wr_ok) begin
        e.addr = a; e.d = zd;
        e.rok  = real_pixel(u, v, int'(s_depth), p, W, H, ra);
        e.raddr = ra;
        q_w.push_back(e);
        exp_written++;
      end else begin
        exp_dropped++;
        if (s_depth == 0) n_hole++; else n_off++;
      end
      ptr++;
    end
  end

  int irq_count = 0;
  always @(posedge irq) irq_count++;

  task automatic run_frame(int f, logic st, output longint clocks);
    longint t0;
    logic [31:0] r;
    ptr = 0; exp_written = 0; exp_dropped = 0; n_seen = 0; n_far = 0;
    for (int i = 0; i < NPIX; i++) last_writer[i] = 0;
    stress = st;
    @(negedge clk);
    cfg_addr = REG_CTRL; cfg_wdata = 32'h1; cfg_we = 1;
    t0 = cyc;                                    // the next edge writes start
    running = 1;
    @(negedge clk); cfg_we = 0;
    if (f == 1) begin
      // mid-frame: a start and a model write, both to be ignored
      repeat (1000) @(negedge clk);
      cfg_addr = REG_CTRL; cfg_wdata = 32'h1; cfg_we = 1;
      @(negedge clk); cfg_addr = 8'h10; cfg_wdata = 32'h7fff_0000;
      @(negedge clk); cfg_we = 0;
    end
    @(posedge irq);
    #1 clocks = cyc - t0 - 1;                    // edges from the start write to irq
    @(negedge clk);
    running = 0;
    s_valid = 0;
    check(q_w.size() == 0, $sformatf("frame %0d: %0d writes missing", f, q_w.size()));
    cfg_addr = REG_CTRL; #1 r = cfg_rdata;
    check(r == 32'h2, $sformatf("frame %0d: CTRL reads done, not busy (%h)", f, r));
    cfg_addr = REG_WRITTEN; #1 r = cfg_rdata;
    check(int'(r) == exp_written, $sformatf("frame %0d: WRITTEN %0d/%0d", f, r, exp_written));
    cfg_addr = REG_DROPPED; #1 r = cfg_rdata;
    check(int'(r) == exp_dropped, $sformatf("frame %0d: DROPPED %0d/%0d", f, r, exp_dropped));
    check(n_seen == exp_written, "all writes seen");
    check(n_far * 200 <= n_seen,
          $sformatf("frame %0d: %0d of %0d writes more than 1 px from the float result", f, n_far, n_seen));
    $display("frame %0d: %0d clocks, %0d written, %0d dropped, %0d far from float",
             f, clocks, exp_written, exp_dropped, n_far);
  endtask

  longint clocks;
  int ignored_start, ignored_write;

  initial begin
    n_stall = 0; n_bubble = 0; n_off = 0; n_hole = 0; n_collide = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    set_model(1.0);
    load_model();
    run_frame(1, 1'b1, clocks);
    // the mid-frame write must not have reached the register
    cfg_addr = 8'h10; #1;
    ignored_write = (cfg_rdata == p.color.fx);
    check(ignored_write == 1, "model write during a frame ignored");
    ignored_start = (irq_count == 1);
    check(ignored_start == 1, "start during a frame ignored (one irq)");
    run_frame(2, 1'b0, clocks);
    check(clocks == FRAME_CLKS, $sformatf("frame clocks %0d, expected %0d", clocks, FRAME_CLKS));
    set_model(1.2);
    load_model();
    run_frame(3, 1'b0, clocks);
    check(irq_count == 3, "three frames, three irq pulses");
    check(n_stall > 0, "output stall seen");
    check(n_bubble > 0, "input bubble seen");
    check(n_off > 0, "off-image drop seen");
    check(n_hole > 0, "Zc <= 0 drop seen");
    check(n_collide > 0, "two pixels on one color pixel seen");
    $display("mechanisms: stall %0d bubble %0d off-image %0d hole %0d collide %0d ignored start %0d ignored write %0d",
             n_stall, n_bubble, n_off, n_hole, n_collide, ignored_start, ignored_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
