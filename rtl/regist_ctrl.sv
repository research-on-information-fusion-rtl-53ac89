// regist_ctrl: frame controller of the image registration pipeline.
//
// The reference algorithm visits the depth image in raster order, row v
// from 0 to IMG_H-1 and column u from 0 to IMG_W-1 within a row.  This block
// produces that (u,v) sequence for the depth samples arriving on the input
// stream.  It also decides when a frame has finished: every pixel that
// enters the pipeline leaves it exactly once ("retires"), whether it writes
// or not, so the frame is over when IMG_W*IMG_H pixels have retired.
//
// States: IDLE -> (start) -> RUN, which accepts the IMG_W*IMG_H samples of
// one frame, -> DRAIN, which waits for the last pixels to retire, -> IDLE.
// done is a sticky flag, cleared by the next start; done_pulse lasts one
// clock.  It also counts the pixels that wrote (written) and those that
// missed the image or were invalid (dropped) in the current frame.
// The start/done handshake is this design's own choice.
//
// Timing: accept, retire and write are sampled every clock.  take is
// combinational from the state (high in RUN only).
module regist_ctrl #(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480,
  parameter int unsigned U_W   = $clog2(IMG_W),
  parameter int unsigned V_W   = $clog2(IMG_H),
  parameter int unsigned CNT_W = $clog2(IMG_W * IMG_H + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,     // one-clock start request, ignored while busy
  input  logic             accept,    // a depth sample entered the pipeline
  input  logic             retire,    // a pixel left the pipeline
  input  logic             write,     // ... and it wrote (only with retire)
  output logic             take,      // the pipeline may accept samples
  output logic [U_W-1:0]   u,
  output logic [V_W-1:0]   v,
  output logic             busy,
  output logic             done,
  output logic             done_pulse,
  output logic [CNT_W-1:0] written,
  output logic [CNT_W-1:0] dropped
);

  localparam int unsigned NPIX = IMG_W * IMG_H;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;

  logic [CNT_W-1:0] n_in, n_ret;
  logic             last_in, last_ret;

  assign last_in  = (n_in  == CNT_W'(NPIX - 1));
  assign last_ret = (n_ret == CNT_W'(NPIX - 1));
  assign take     = (state == S_RUN);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      u          <= '0;
      v          <= '0;
      n_in       <= '0;
      n_ret      <= '0;
      done       <= 1'b0;
      done_pulse <= 1'b0;
      written    <= '0;
      dropped    <= '0;
    end else begin
      done_pulse <= 1'b0;
      if (state == S_IDLE) begin
        if (start) begin
          state   <= S_RUN;
          done    <= 1'b0;
          u       <= '0;
          v       <= '0;
          n_in    <= '0;
          n_ret   <= '0;
          written <= '0;
          dropped <= '0;
        end
      end else begin
        if (accept && state == S_RUN) begin
          n_in <= n_in + 1'b1;
          if (u == U_W'(IMG_W - 1)) begin
            u <= '0;
            v <= v + 1'b1;
          end else begin
            u <= u + 1'b1;
          end
          if (last_in) state <= S_DRAIN;
        end
        if (retire) begin
          n_ret <= n_ret + 1'b1;
          if (write) written <= written + 1'b1;
          else       dropped <= dropped + 1'b1;
          if (last_ret) begin
            state      <= S_IDLE;
            done       <= 1'b1;
            done_pulse <= 1'b1;
          end
        end
      end
    end
  end

  // A pixel can only retire after it entered.
  assert property (@(posedge clk) disable iff (!rst_n) retire |-> busy);
  assert property (@(posedge clk) disable iff (!rst_n) accept |-> take);
  assert property (@(posedge clk) disable iff (!rst_n) write |-> retire);

endmodule
