// pipe_sqrt: pipelined unsigned integer square root, root = floor(sqrt(rad)).
//
// Digit-by-digit (restoring) method: every step brings down the next two
// radicand bits into the partial remainder and tries to subtract
// 4*root + 1; the outcome is the next root bit. Each of the STAGES register
// stages performs Q_W/STAGES steps, where Q_W = R_W/2 is the root width.
//
// Interface: one radicand per cycle may enter; in_side travels with it.
// Latency is exactly STAGES cycles. Only the valid bits are reset.
// The filter uses it to turn the weighted variance into the standard
// deviation; the method and stage split are this design's choice.
module pipe_sqrt #(
  parameter int unsigned R_W    = 24,
  parameter int unsigned STAGES = 12,
  parameter int unsigned SIDE_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [R_W-1:0]    rad,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  output logic [R_W/2-1:0]  root,
  output logic [SIDE_W-1:0] out_side
);

  localparam int unsigned Q_W = R_W / 2;
  localparam int unsigned SPS = Q_W / STAGES;
  localparam int unsigned RM_W = Q_W + 2;

  initial assert (SPS * STAGES == Q_W && 2 * Q_W == R_W)
    else $error("pipe_sqrt: R_W must be even and R_W/2 a multiple of STAGES");

  logic [R_W-1:0]    rad_q  [STAGES+1];   // radicand bits not yet used, MSB-aligned
  logic [RM_W-1:0]   rem_q  [STAGES+1];
  logic [Q_W-1:0]    root_q [STAGES+1];
  logic [SIDE_W-1:0] side_q [STAGES+1];
  logic              vld_q  [STAGES+1];

  assign rad_q[0]  = rad;
  assign rem_q[0]  = '0;
  assign root_q[0] = '0;
  assign side_q[0] = in_side;
  assign vld_q[0]  = in_valid;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic [R_W-1:0]  rad_n;
    logic [RM_W-1:0] rem_n;
    logic [Q_W-1:0]  root_n;

    always_comb begin
      logic [RM_W+1:0] acc;
      logic [RM_W+1:0] trial;
      rad_n  = rad_q[s];
      rem_n  = rem_q[s];
      root_n = root_q[s];
      for (int i = 0; i < int'(SPS); i++) begin
        acc   = {rem_n, rad_n[R_W-1 -: 2]};
        trial = (RM_W+2)'({root_n, 2'b01});
        rad_n = rad_n << 2;
        if (acc >= trial) begin
          rem_n  = RM_W'(acc - trial);
          root_n = {root_n[Q_W-2:0], 1'b1};
        end else begin
          rem_n  = RM_W'(acc);
          root_n = {root_n[Q_W-2:0], 1'b0};
        end
      end
    end

    always_ff @(posedge clk) begin
      rad_q[s+1]  <= rad_n;
      rem_q[s+1]  <= rem_n;
      root_q[s+1] <= root_n;
      side_q[s+1] <= side_q[s];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld_q[s+1] <= 1'b0;
      else        vld_q[s+1] <= vld_q[s];
    end
  end

  assign out_valid = vld_q[STAGES];
  assign root      = root_q[STAGES];
  assign out_side  = side_q[STAGES];

endmodule
