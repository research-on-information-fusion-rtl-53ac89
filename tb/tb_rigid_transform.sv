// tb_rigid_transform: self-checking test of the depth-to-color rigid
// transform (Eq. 2).
//
// Random rotation-like matrices (entries within +-1.2), translations of a
// few centimetres and points up to a few tens of metres are pushed through
// with random stalls and bubbles.  The payload must follow its point.
// Results are compared with the wide-integer model, and the latency must be
// 2 enabled clocks.
module tb_rigid_transform;
  import regist_pkg::*;
  import regist_model_pkg::*;

  localparam int LAT = 2;
  localparam int NSET = 10, NPER = 400;

  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  fix_t x = '0, y = '0, z = '0;
  logic [15:0] in_pay = '0;
  fix_t [11:0] extr = '0;
  logic out_valid;
  fix_t xc, yc, zc;
  logic [15:0] out_pay;

  int checks = 0, failures = 0;

  rigid_transform #(.PAY_W(16)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { fix_t x, y, z; logic [15:0] pay; longint t; } exp_t;
  exp_t q_exp[$];
  longint tick = 0;
  logic en_last = 0;
  int sent = 0;
  logic feeding = 0;
  fix_t e [12];

  always @(posedge clk) if (rst_n && en) tick++;

  function automatic fix_t rnd(real lim);
    return r2fx(lim * (real'($urandom_range(0, 2000000)) / 1000000.0 - 1.0));
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (en_last && out_valid) begin
      exp_t ex;
      if (q_exp.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        ex = q_exp.pop_front();
        checks++;
        if (xc !== ex.x || yc !== ex.y || zc !== ex.z || out_pay !== ex.pay || tick - ex.t != LAT) begin
          failures++;
          $display("FAIL: %0d/%0d %0d/%0d %0d/%0d pay %0d/%0d lat %0d",
                   xc, ex.x, yc, ex.y, zc, ex.z, out_pay, ex.pay, tick - ex.t);
        end
      end
    end
    en       = ($urandom_range(0, 7) != 0);
    in_valid = feeding && ($urandom_range(0, 5) != 0);
    if (in_valid) begin
      x = rnd(20.0); y = rnd(20.0); z = rnd(30.0);
      in_pay = 16'(sent);
    end
    if (en && in_valid) begin
      exp_t ex;
      m_rigid(e, x, y, z, ex.x, ex.y, ex.z);
      ex.pay = in_pay;
      ex.t = tick;
      q_exp.push_back(ex);
      sent++;
    end
    en_last = en;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSET; s++) begin
      @(negedge clk);
      for (int k = 0; k < 12; k++) begin
        e[k] = (k % 4 == 3) ? rnd(0.05) : rnd(1.2);
        if (s == 0) e[k] = (k == 0 || k == 5 || k == 10) ? 32'sh10000 : '0;   // identity
        extr[k] = e[k];
      end
      feeding = 1;
      wait (sent >= (s + 1) * NPER);
      @(negedge clk);
      feeding = 0;
      wait (q_exp.size() == 0);
      repeat (3) @(negedge clk);
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
