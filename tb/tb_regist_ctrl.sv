// tb_regist_ctrl: self-checking test of the frame controller.
//
// A small 7x5 frame is used.  A model pipeline of random depth (a delay
// line that moves only when a random enable is high) turns accepted samples
// into retiring pixels, each writing or not at random.  The test checks the
// raster (u,v) sequence, that exactly 35 samples are taken per frame, that
// done rises with the last retiring pixel and not before, the written and
// dropped counts, that start is ignored while busy, and that two frames in
// a row both work.
module tb_regist_ctrl;
  localparam int W = 7, H = 5, NPIX = W * H;
  localparam int UW = $clog2(W), VW = $clog2(H), CW = $clog2(NPIX + 1);

  logic clk = 0, rst_n = 0;
  logic start = 0, accept = 0, retire = 0, write = 0;
  logic take, busy, done, done_pulse;
  logic [UW-1:0] u;
  logic [VW-1:0] v;
  logic [CW-1:0] written, dropped;

  int checks = 0, failures = 0;

  regist_ctrl #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // model pipeline: FIFO of accepted pixels with their write flag
  logic fifo[$];
  int n_acc, n_ret, n_wr, n_dr, n_pulse, n_restart_ignored;

  task automatic run_frame(int frame);
    int eu, ev;
    eu = 0; ev = 0;
    n_acc = 0; n_ret = 0; n_wr = 0; n_dr = 0; n_pulse = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(busy && take, "busy and take after start");
    check(!done, "done cleared by start");
    while (!(n_ret == NPIX && !busy)) begin
      // sample outputs for this cycle, then drive
      accept = take && ($urandom_range(0, 3) != 0);
      if (accept) begin
        check(int'(u) == eu && int'(v) == ev, $sformatf("raster position (%0d,%0d)", eu, ev));
        if (++eu == W) begin eu = 0; ev++; end
        fifo.push_back($urandom_range(0, 2) != 0);
        n_acc++;
      end
      retire = (fifo.size() > 8 || (fifo.size() > 0 && !take)) && ($urandom_range(0, 2) != 0);
      write  = 0;
      if (retire) begin
        write = fifo.pop_front();
        n_ret++;
        if (write) n_wr++; else n_dr++;
      end
      // a start while busy must be ignored
      start = ($urandom_range(0, 30) == 0) || (n_acc == 3);
      if (start) n_restart_ignored++;
      @(posedge clk); #1;
      if (done_pulse) n_pulse++;
      if (n_ret < NPIX) check(!done && busy, "no done before the last pixel retired");
      @(negedge clk);
      accept = 0; retire = 0; write = 0; start = 0;
    end
    check(done, "done after the frame");
    check(n_pulse == 1, "one done pulse");
    check(n_acc == NPIX, $sformatf("accepted %0d of %0d", n_acc, NPIX));
    check(int'(written) == n_wr && int'(dropped) == n_dr,
          $sformatf("counts %0d/%0d %0d/%0d", written, n_wr, dropped, n_dr));
    check(!take, "take low when idle");
  endtask

  initial begin
    n_restart_ignored = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(!busy && !done && !take, "idle after reset");
    run_frame(0);
    repeat (4) @(negedge clk);
    check(done && !busy, "done holds while idle");
    run_frame(1);
    check(n_restart_ignored > 0, "start during busy exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
