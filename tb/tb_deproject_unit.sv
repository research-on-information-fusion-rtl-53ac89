// tb_deproject_unit: self-checking test of the depth deprojection (Eq. 1).
//
// Several camera models are tried in turn (realistic ones, a depth scale
// large enough to saturate Z, a non-positive focal length).  For each, random
// depth pixels are pushed through with random stalls and bubbles.  Every
// output is compared with the wide-integer model of regist_model_pkg, and the
// latency must be 35 enabled clocks.
module tb_deproject_unit;
  import regist_pkg::*;
  import regist_model_pkg::*;

  localparam int LAT = 35;
  localparam int NSET = 8, NPER = 600;

  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  logic [9:0] u = '0;
  logic [8:0] v = '0;
  logic [15:0] depth = '0;
  intrinsics_t intr = '0;
  scale_t depth_scale = '0;
  logic out_valid, ok;
  fix_t x, y, z;

  int checks = 0, failures = 0;
  int n_sat = 0, n_bad = 0;

  deproject_unit dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic ok; fix_t x, y, z; longint t; } exp_t;
  exp_t q_exp[$];
  longint tick = 0;
  logic en_last = 0;
  int sent = 0;
  logic feeding = 0;

  always @(posedge clk) if (rst_n && en) tick++;

  always @(negedge clk) if (rst_n) begin
    if (en_last && out_valid) begin
      exp_t e;
      if (q_exp.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        e = q_exp.pop_front();
        checks++;
        if (ok !== e.ok || z !== e.z || (e.ok && (x !== e.x || y !== e.y)) || tick - e.t != LAT) begin
          failures++;
          $display("FAIL: ok=%0b/%0b x=%0d/%0d y=%0d/%0d z=%0d/%0d lat=%0d",
                   ok, e.ok, x, e.x, y, e.y, z, e.z, tick - e.t);
        end
      end
    end
    en       = ($urandom_range(0, 7) != 0);
    in_valid = feeding && ($urandom_range(0, 5) != 0);
    if (in_valid) begin
      u     = 10'($urandom_range(0, 639));
      v     = 9'($urandom_range(0, 479));
      depth = 16'($urandom);
      if ($urandom_range(0, 9) == 0) depth = 16'd0;
    end
    if (en && in_valid) begin
      exp_t e;
      e.ok = m_deproject(int'(u), int'(v), int'(depth), intr, depth_scale, e.x, e.y, e.z);
      e.t  = tick;
      q_exp.push_back(e);
      sent++;
    end
    en_last = en;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSET; s++) begin
      @(negedge clk);
      intr.fx = r2fx(380.0 + 300.0 * real'($urandom_range(0, 1000)) / 1000.0);
      intr.fy = intr.fx + fix_t'($urandom_range(0, 65536 * 4));
      intr.px = r2fx(300.0 + 40.0 * real'($urandom_range(0, 1000)) / 1000.0);
      intr.py = r2fx(220.0 + 40.0 * real'($urandom_range(0, 1000)) / 1000.0);
      depth_scale = 32'd4294967;                      // 0.001 m per unit
      if (s == 1) depth_scale = 32'd42949673;         // 0.01
      if (s == 2) depth_scale = 32'hC000_0000;        // 0.75: Z saturates
      if (s == 3) intr.fx = -intr.fx;                  // invalid model
      if (s == 4) intr.fy = '0;
      if (s == 2) n_sat++;
      if (s == 3 || s == 4) n_bad++;
      feeding = 1;
      wait (sent >= (s + 1) * NPER);
      @(negedge clk);
      feeding = 0;
      wait (q_exp.size() == 0);
      repeat (3) @(negedge clk);
    end
    checks++;
    if (n_sat == 0 || n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
