// pipe_div: pipelined unsigned restoring divider, quo = floor(num / den).
//
// Each of the STAGES register stages resolves Q_W/STAGES quotient bits, most
// significant first, by comparing the partial remainder with the divisor
// shifted left by the bit position and subtracting when it fits. The caller
// guarantees that the quotient fits in Q_W bits (num < den * 2**Q_W) and
// that den is not zero; both hold everywhere the filter uses it because
// the quotient is a weighted average of bounded values and every weight is
// positive.
//
// Interface: a new operand pair may enter every cycle; in_side is an opaque
// sideband that travels with the operands. Latency is exactly STAGES clock
// cycles from in_valid to out_valid. Only the valid bits are reset.
//
// The filter needs one such divider per weight estimation unit (the new
// weighted mean) and one in the deviation unit; the restoring algorithm and
// the stage split are this design's choice.
module pipe_div #(
  parameter int unsigned NUM_W  = 52,
  parameter int unsigned DEN_W  = 36,
  parameter int unsigned Q_W    = 16,
  parameter int unsigned STAGES = 2,
  parameter int unsigned SIDE_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [NUM_W-1:0]  num,
  input  logic [DEN_W-1:0]  den,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  output logic [Q_W-1:0]    quo,
  output logic [SIDE_W-1:0] out_side
);

  localparam int unsigned BPS = Q_W / STAGES;
  localparam int unsigned EW  = (NUM_W > DEN_W + Q_W) ? NUM_W : DEN_W + Q_W;

  initial assert (BPS * STAGES == Q_W)
    else $error("pipe_div: Q_W must be a multiple of STAGES");

  logic [EW-1:0]     rem_q  [STAGES+1];
  logic [DEN_W-1:0]  den_q  [STAGES+1];
  logic [Q_W-1:0]    quo_q  [STAGES+1];
  logic [SIDE_W-1:0] side_q [STAGES+1];
  logic              vld_q  [STAGES+1];

  assign rem_q[0]  = EW'(num);
  assign den_q[0]  = den;
  assign quo_q[0]  = '0;
  assign side_q[0] = in_side;
  assign vld_q[0]  = in_valid;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic [EW-1:0]  rem_n;
    logic [Q_W-1:0] quo_n;

    always_comb begin
      logic [EW-1:0] trial;
      rem_n = rem_q[s];
      quo_n = quo_q[s];
      for (int b = 0; b < int'(BPS); b++) begin
        trial = EW'(den_q[s]) << (Q_W - 1 - (s * BPS + b));
        if (rem_n >= trial) begin
          rem_n = rem_n - trial;
          quo_n[Q_W - 1 - (s * BPS + b)] = 1'b1;
        end
      end
    end

    always_ff @(posedge clk) begin
      rem_q[s+1]  <= rem_n;
      den_q[s+1]  <= den_q[s];
      quo_q[s+1]  <= quo_n;
      side_q[s+1] <= side_q[s];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_q[s+1] <= 1'b0;
      else        vld_q[s+1] <= vld_q[s];
    end
  end

  assign out_valid = vld_q[STAGES];
  assign quo       = quo_q[STAGES];
  assign out_side  = side_q[STAGES];

endmodule
