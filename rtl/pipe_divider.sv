// pipe_divider: fully pipelined signed-by-positive fixed-point divider.
//
// Computes quo = num / den, truncated toward zero, one new division per
// clock.  It serves the four divisions of the registration: the division by
// the depth focal lengths when a depth pixel is deprojected, and the division
// by the color-frame Z when a point is projected.  With a Q32.32 numerator
// and a Q16.16 denominator the quotient comes out in Q16.16.
//
// How it works: stage 0 takes the magnitude of the numerator and flags an
// overflow when the denominator is not positive or when the quotient
// magnitude would not fit in Q_W-1 bits.  Stages 1..Q_W-1 each decide one
// quotient bit by restoring subtraction of den << i, most significant bit
// first.  The last stage restores the sign.  A PAY_W-bit payload travels
// alongside so that callers keep their other operands aligned.
//
// Interface: en advances the whole pipeline (a stalled pipeline holds every
// stage).  in_valid/out_valid mark occupied slots.  When ovf is set the
// quotient is meaningless.
// Timing: LATENCY = Q_W + 1 enabled clocks from input to output.
// Restoring division, the overflow rule and the pipelining are this design's
// own choices; the reference algorithm only calls for a division.
module pipe_divider #(
  parameter int unsigned NUM_W = 64,
  parameter int unsigned DEN_W = 32,
  parameter int unsigned Q_W   = 32,
  parameter int unsigned PAY_W = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    in_valid,
  input  logic signed [NUM_W-1:0] num,
  input  logic signed [DEN_W-1:0] den,
  input  logic        [PAY_W-1:0] in_pay,
  output logic                    out_valid,
  output logic signed [Q_W-1:0]   quo,
  output logic                    ovf,
  output logic        [PAY_W-1:0] out_pay
);

  localparam int unsigned NSTG    = Q_W;   // stage 0 .. Q_W-1 carry remainders

  // Per-stage state, index s = 0 .. NSTG-1.
  logic             v_q   [NSTG];
  logic [NUM_W-1:0] rem_q [NSTG];
  logic [NUM_W-1:0] den_q [NSTG];
  logic [Q_W-1:0]   qb_q  [NSTG];
  logic             neg_q [NSTG];
  logic             ovf_q [NSTG];
  logic [PAY_W-1:0] pay_q [NSTG];

  // Stage 0: magnitude and overflow test.
  logic [NUM_W-1:0] num_mag;
  logic [NUM_W-1:0] den_ext;
  logic             den_bad;
  logic             too_big;

  always_comb begin
    num_mag = num[NUM_W-1] ? NUM_W'(-num) : NUM_W'(num);
    den_ext = NUM_W'(unsigned'(den));
    den_bad = (den <= 0);
    // |num| >= den * 2^(Q_W-1)  <=>  floor(|num| / 2^(Q_W-1)) >= den
    too_big = ((num_mag >> (Q_W - 1)) >= den_ext);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q[0] <= 1'b0;
    end else if (en) begin
      v_q[0] <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      rem_q[0] <= num_mag;
      den_q[0] <= den_ext;
      qb_q[0]  <= '0;
      neg_q[0] <= num[NUM_W-1];
      ovf_q[0] <= den_bad || too_big;
      pay_q[0] <= in_pay;
    end
  end

  // Stages 1 .. Q_W-1: stage s decides quotient bit i = Q_W-1-s.
  for (genvar s = 1; s < NSTG; s++) begin : g_stage
    localparam int unsigned BIT = Q_W - 1 - s;
    logic [NUM_W-1:0] trial;
    logic             take;

    always_comb begin
      trial = den_q[s-1] << BIT;
      take  = (rem_q[s-1] >= trial);
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q[s] <= 1'b0;
      end else if (en) begin
        v_q[s] <= v_q[s-1];
      end
    end

    always_ff @(posedge clk) begin
      if (en) begin
        rem_q[s]      <= take ? (rem_q[s-1] - trial) : rem_q[s-1];
        qb_q[s]       <= qb_q[s-1];
        qb_q[s][BIT]  <= take;
        den_q[s]      <= den_q[s-1];
        neg_q[s]      <= neg_q[s-1];
        ovf_q[s]      <= ovf_q[s-1];
        pay_q[s]      <= pay_q[s-1];
      end
    end
  end

  // Output stage: restore the sign.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (en) begin
      out_valid <= v_q[NSTG-1];
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      quo     <= neg_q[NSTG-1] ? -signed'(qb_q[NSTG-1]) : signed'(qb_q[NSTG-1]);
      ovf     <= ovf_q[NSTG-1];
      out_pay <= pay_q[NSTG-1];
    end
  end

endmodule
