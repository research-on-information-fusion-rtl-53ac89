// tb_param_regs: self-checking test of the host register file.
//
// Writes random values to all 21 camera-model registers, reads them back
// and checks that each lands in the right field of the parameter struct.
// Also checks the status reads (busy, done, written, dropped), that a start
// write gives a single one-clock pulse, that start and model writes are
// ignored while busy, that unaligned and unmapped addresses do nothing, and
// the reset values.
module tb_param_regs;
  import regist_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic cfg_we = 0;
  logic [31:0] cfg_rdata;
  logic busy = 0, done = 0;
  logic [18:0] written = '0, dropped = '0;
  logic start;
  cam_params_t params;

  int checks = 0, failures = 0;

  param_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); cfg_addr = a; cfg_wdata = d; cfg_we = 1;
    @(negedge clk); cfg_we = 0;
  endtask

  // combinational read: settle, then sample
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    cfg_addr = a;
    #1;
    d = cfg_rdata;
  endtask
  logic [31:0] r0, r1;

  logic [31:0] val [21];

  function automatic logic [31:0] field(int i);
    case (i)
      0: return params.color.fx;   1: return params.color.fy;
      2: return params.color.px;   3: return params.color.py;
      4: return params.depth.fx;   5: return params.depth.fy;
      6: return params.depth.px;   7: return params.depth.py;
      20: return params.depth_scale;
      default: return params.extr[i - 8];
    endcase
  endfunction

  int pulses = 0;
  always @(posedge clk) if (start) pulses++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 21; i++) check(field(i) == 0, "reset value");
    // load the model
    for (int i = 0; i < 21; i++) begin
      val[i] = $urandom;
      wr(8'(8'h10 + 4 * i), val[i]);
    end
    @(negedge clk);
    for (int i = 0; i < 21; i++) begin
      rd(8'(8'h10 + 4 * i), r0);
      check(r0 == val[i], $sformatf("read back word %0d", i));
      check(field(i) == val[i], $sformatf("struct field of word %0d", i));
    end
    // unaligned and unmapped writes change nothing
    wr(8'h11, 32'hdead_beef);
    wr(8'h64, 32'hdead_beef);
    wr(8'hfc, 32'hdead_beef);
    for (int i = 0; i < 21; i++) check(field(i) == val[i], "unaligned/unmapped write ignored");
    rd(8'h64, r0); rd(8'h0c, r1);
    check(r0 == 0 && r1 == 0, "unmapped reads are zero");
    // status
    busy = 1; done = 0; written = 19'd12345; dropped = 19'd777;
    rd(REG_CTRL, r0);
    check(r0 == 32'h1, "busy bit");
    rd(REG_WRITTEN, r0); rd(REG_DROPPED, r1);
    check(r0 == 12345 && r1 == 777, "counters");
    busy = 0; done = 1;
    rd(REG_CTRL, r0);
    check(r0 == 32'h2, "done bit");
    // start pulse
    pulses = 0;
    wr(REG_CTRL, 32'h1);
    repeat (3) @(negedge clk);
    check(pulses == 1, $sformatf("one start pulse, saw %0d", pulses));
    wr(REG_CTRL, 32'h0);
    repeat (2) @(negedge clk);
    check(pulses == 1, "writing 0 does not start");
    // while busy: start and model writes ignored
    busy = 1;
    wr(REG_CTRL, 32'h1);
    wr(8'h10, ~val[0]);
    wr(8'h60, ~val[20]);
    repeat (2) @(negedge clk);
    check(pulses == 1, "start ignored while busy");
    check(field(0) == val[0] && field(20) == val[20], "model write ignored while busy");
    busy = 0;
    wr(8'h60, ~val[20]);
    check(field(20) == ~val[20], "model write accepted when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
