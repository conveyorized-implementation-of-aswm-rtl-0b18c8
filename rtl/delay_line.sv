// delay_line: fixed-length register delay for a data word and its valid bit.
//
// Used to keep side information (median, flags) aligned with the main
// filter pipeline. DEPTH register stages; DEPTH = 0 is a plain wire.
// Only the valid bits are reset.
module delay_line #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  if (DEPTH == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [W-1:0] data_q [DEPTH];
    logic         vld_q  [DEPTH];

    always_ff @(posedge clk) begin
      data_q[0] <= in_data;
      for (int i = 1; i < int'(DEPTH); i++) data_q[i] <= data_q[i-1];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) vld_q[i] <= 1'b0;
      end else begin
        vld_q[0] <= in_valid;
        for (int i = 1; i < int'(DEPTH); i++) vld_q[i] <= vld_q[i-1];
      end
    end

    assign out_valid = vld_q[DEPTH-1];
    assign out_data  = data_q[DEPTH-1];
  end

endmodule
