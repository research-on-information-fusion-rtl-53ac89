// tb_project_unit: self-checking test of the projection into the color
// image (Eq. 3) and of the range check that decides whether a pixel writes.
//
// Points are drawn so that most land in the 640x480 image and the rest fall
// off each of its edges, sit just left of or above column/row 0 (they must
// truncate to 0), lie behind the camera (Zc <= 0) or come from an upstream
// stage that flagged them invalid.  Each retiring pixel's write flag,
// address and depth are compared with the wide-integer model, and the
// latency must be 35 enabled clocks.  Every case must occur.
module tb_project_unit;
  import regist_pkg::*;
  import regist_model_pkg::*;

  localparam int LAT = 35;
  localparam int N = 6000;
  localparam int W = 640, H = 480;

  logic clk = 0, rst_n = 0, en = 0, in_valid = 0, in_ok = 0;
  fix_t xc = '0, yc = '0, zc = '0, zd = '0;
  intrinsics_t intr;
  logic out_valid, out_write;
  logic [18:0] out_addr;
  fix_t out_data;

  int checks = 0, failures = 0;
  int n_hit = 0, n_off = 0, n_behind = 0, n_bad = 0, n_edge0 = 0;

  project_unit dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic wr; int addr; fix_t d; longint t; } exp_t;
  exp_t q_exp[$];
  longint tick = 0;
  logic en_last = 0;
  int sent = 0;

  always @(posedge clk) if (rst_n && en) tick++;

  initial begin
    intr.fx = r2fx(615.3);
    intr.fy = r2fx(615.7);
    intr.px = r2fx(319.6);
    intr.py = r2fx(241.2);
  end

  // A point that projects to color pixel (pu, pv) at depth zz.
  task automatic aim(real pu, real pv, real zz);
    xc = r2fx((pu - 319.6) * zz / 615.3);
    yc = r2fx((pv - 241.2) * zz / 615.7);
    zc = r2fx(zz);
  endtask

  always @(negedge clk) if (rst_n) begin
    if (en_last && out_valid) begin
      exp_t e;
      if (q_exp.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        e = q_exp.pop_front();
        checks++;
        if (out_write !== e.wr || (e.wr && (int'(out_addr) != e.addr || out_data !== e.d))
            || tick - e.t != LAT) begin
          failures++;
          $display("FAIL: wr %0b/%0b addr %0d/%0d data %0d/%0d lat %0d",
                   out_write, e.wr, out_addr, e.addr, out_data, e.d, tick - e.t);
        end
      end
    end
    en       = ($urandom_range(0, 7) != 0);
    in_valid = (sent < N) && ($urandom_range(0, 5) != 0);
    if (in_valid) begin
      real zz;
      int kind;
      zz    = 0.2 + 8.0 * real'($urandom_range(0, 100000)) / 100000.0;
      in_ok = 1'b1;
      kind  = $urandom_range(0, 9);
      case (kind)
        0: aim(-0.999 * real'($urandom_range(1, 1000)) / 1000.0, 100.0, zz);   // -1 < u < 0
        1: aim(real'($urandom_range(0, 1000)) - 200.0, real'($urandom_range(0, 900)) - 200.0, zz);
        2: begin aim(300.0, 200.0, zz); zc = -zc; end                          // behind
        3: begin aim(300.0, 200.0, zz); zc = '0; end                           // Zc = 0
        4: begin aim(300.0, 200.0, zz); in_ok = 1'b0; end                      // upstream invalid
        5: aim(639.0 + real'($urandom_range(0, 2000)) / 1000.0, 479.5, zz);    // right edge
        default: aim(real'($urandom_range(0, 639999)) / 1000.0,
                     real'($urandom_range(0, 479999)) / 1000.0, zz);
      endcase
      zd = fix_t'($urandom);
    end
    if (en && in_valid) begin
      exp_t e;
      int a;
      e.wr = m_project(xc, yc, zc, intr, W, H, a) && in_ok;
      e.addr = a;
      e.d = zd;
      e.t = tick;
      q_exp.push_back(e);
      sent++;
      if (e.wr) n_hit++; else n_off++;
      if (zc <= 0) n_behind++;
      if (!in_ok) n_bad++;
      if (e.wr && (a % W) == 0) n_edge0++;
    end
    en_last = en;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sent == N && q_exp.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (n_hit == 0 || n_off == 0 || n_behind == 0 || n_bad == 0 || n_edge0 == 0) begin
      failures++;
      $display("FAIL: case not reached: hit %0d off %0d behind %0d bad %0d col0 %0d",
               n_hit, n_off, n_behind, n_bad, n_edge0);
    end
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
