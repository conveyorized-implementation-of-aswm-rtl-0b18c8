// tb_recip_rom: reads every word of the weight table and compares it with
// floor(2^31 / (8d + 1)), one clock after the address (synchronous read).
module tb_recip_rom;
  import aswm_pkg::*;

  logic       clk = 0;
  logic [7:0] addr;
  weight_t    data;
  int checks = 0, failures = 0;

  recip_rom dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned expect_v;
    for (int d = 0; d < 256; d++) begin
      @(negedge clk) addr = 8'(d);
      @(posedge clk); #1;
      expect_v = 64'd2147483648 / (64'd8 * longint'(d) + 64'd1);
      checks++;
      if (64'(data) != expect_v) begin
        failures++;
        $display("FAIL addr %0d: got %0d expected %0d", d, data, expect_v);
      end
    end
    // table end points stated explicitly
    checks++;
    if (dut.table_q[0] != 32'h8000_0000 || dut.table_q[255] != 32'd1052172) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
