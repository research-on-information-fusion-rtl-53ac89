// tb_pipe_divider: self-checking test of the pipelined divider.
//
// Drives random and corner-case divisions, with random stalls (en low) and
// bubbles, and compares every quotient and overflow flag with the
// simulator's own 128-bit signed division (truncation toward zero).  It also
// checks that each result appears exactly Q_W+1 enabled clocks after its
// operands and that the payload stays with its division.
module tb_pipe_divider;
  localparam int NUM_W = 64, DEN_W = 32, Q_W = 32, PAY_W = 8;
  localparam int LAT = Q_W + 1;
  localparam int N = 4000;

  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  logic signed [NUM_W-1:0] num = '0;
  logic signed [DEN_W-1:0] den = 32'sd1;
  logic [PAY_W-1:0] in_pay = '0;
  logic out_valid, ovf;
  logic signed [Q_W-1:0] quo;
  logic [PAY_W-1:0] out_pay;

  int checks = 0, failures = 0;

  pipe_divider #(.NUM_W(NUM_W), .DEN_W(DEN_W), .Q_W(Q_W), .PAY_W(PAY_W)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic ovf; logic signed [Q_W-1:0] q; logic [PAY_W-1:0] pay; longint t; } exp_t;
  exp_t q_exp[$];
  longint tick = 0;     // number of enabled clock edges so far
  int sent = 0, got = 0;

  function automatic exp_t model(logic signed [NUM_W-1:0] n, logic signed [DEN_W-1:0] d);
    exp_t e;
    logic signed [127:0] nn, dd, qq, mag;
    nn = 128'(n); dd = 128'(d);
    e.q = '0;
    if (d <= 0) begin
      e.ovf = 1'b1;
    end else begin
      qq  = nn / dd;
      mag = (qq < 0) ? -qq : qq;
      e.ovf = (mag >= (128'sd1 <<< (Q_W - 1))) ||
              (((nn < 0) ? -nn : nn) >= (dd <<< (Q_W - 1)));
      e.q = Q_W'(qq);
    end
    return e;
  endfunction

  logic en_last = 0;

  task automatic pick(int i);
    int kind;
    kind = $urandom_range(0, 9);
    case (kind)
      0: begin num = $signed({$urandom, $urandom}); den = $signed($urandom); end
      1: begin num = -64'sd1 <<< 63; den = 32'sd3; end
      2: begin num = 64'sd0; den = $signed($urandom_range(1, 1000)); end
      3: begin num = $signed(64'($urandom)) - 64'sd2147483648; den = 32'sd0; end
      4: begin num = $signed(64'($urandom)); den = -$signed(32'($urandom_range(1, 100000))); end
      5: begin den = $signed($urandom_range(1, 65536 * 700));
                num = 64'(den) * 64'sd2147483647; if ($urandom_range(0,1)) num = -num; end
      6: begin den = $signed($urandom_range(1, 65536 * 700));
                num = 64'(den) * 64'sd2147483648; if ($urandom_range(0,1)) num = -num; end
      default: begin
        num = $signed(64'($urandom) * 64'($urandom_range(1, 200000))) - 64'sd3000000000000;
        den = $signed($urandom_range(65536, 65536 * 1000));
      end
    endcase
    in_pay = PAY_W'(i);
  endtask

  always @(negedge clk) if (rst_n) begin
    // results that appeared at the last enabled edge
    if (en_last && out_valid) begin
      exp_t e;
      got++;
      if (q_exp.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        e = q_exp.pop_front();
        checks++;
        if (ovf !== e.ovf || (!e.ovf && quo !== e.q) || out_pay !== e.pay || tick - e.t != LAT) begin
          failures++;
          $display("FAIL: pay=%0d ovf=%0b/%0b quo=%0d/%0d lat=%0d", out_pay, ovf, e.ovf, quo, e.q, tick - e.t);
        end
      end
    end
    // new stimulus
    en       = ($urandom_range(0, 9) != 0);
    in_valid = (sent < N) && ($urandom_range(0, 7) != 0);
    if (in_valid) pick(sent);
    if (en && in_valid) begin
      exp_t e;
      e = model(num, den);
      e.pay = in_pay;
      e.t = tick;
      q_exp.push_back(e);
      sent++;
    end
    en_last = en;
  end

  always @(posedge clk) if (rst_n && en) tick++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sent == N && q_exp.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (got != N) begin failures++; $display("FAIL: got %0d of %0d", got, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
