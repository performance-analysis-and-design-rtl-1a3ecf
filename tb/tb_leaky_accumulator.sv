// tb_leaky_accumulator: three channels, random increments, model
// y = y - floor(y / 8) + dy per channel; checks that only the selected
// channel changes, the upd pulse and the decay toward zero with dy = 0.
// A second, single-channel instance with LEAK_M = 0 (ideal accumulator,
// beta = 1) gets the same increments and must add them exactly (24-bit
// wrap-around) and hold its value once dy = 0.
module tb_leaky_accumulator;
  localparam int N_CH = 3, ACC_W = 24, Y_W = 24, LEAK_M = 3;
  logic clk = 0, rst_n = 0, en = 0, upd;
  logic [1:0] ch = '0;
  logic signed [ACC_W-1:0] dy = '0;
  logic signed [Y_W-1:0] y [N_CH];
  int checks = 0, failures = 0;
  int m [N_CH];
  logic upd0;
  logic [0:0] ch0 = '0;
  logic signed [Y_W-1:0] y0 [1];
  logic signed [Y_W-1:0] m0 = '0, hold0;

  leaky_accumulator #(.N_CH(N_CH), .ACC_W(ACC_W), .Y_W(Y_W), .LEAK_M(LEAK_M)) dut (.*);
  leaky_accumulator #(.N_CH(1), .ACC_W(ACC_W), .Y_W(Y_W), .LEAK_M(0)) dut0 (
    .clk, .rst_n, .en, .ch(ch0), .dy, .upd(upd0), .y(y0));
  always #5 clk = ~clk;

  function automatic int floordiv(int a, int d);
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < N_CH; c++) m[c] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      ch = 2'($urandom_range(0, N_CH - 1));
      dy = (n > 5000) ? '0 : ACC_W'($signed($urandom_range(0, 200000)) - 100000);
      @(posedge clk); #1;
      if (en) m[ch] = m[ch] - floordiv(m[ch], 1 << LEAK_M) + int'(dy);
      if (en) m0 = m0 + dy;
      checks++; if (upd != en) failures++;
      checks++;
      if (y0[0] != m0) begin failures++; if (failures < 10) $display("FAIL beta=1 y=%0d exp %0d", y0[0], m0); end
      if (n == 5001) hold0 = y0[0];
      for (int c = 0; c < N_CH; c++) begin
        checks++;
        if (int'(y[c]) != m[c]) begin failures++; if (failures < 10) $display("FAIL ch%0d y=%0d exp %0d", c, y[c], m[c]); end
      end
    end
    // after 1000 cycles without input the floor-rounded leak settles at 0..7 (floor(y/8) is 0 for y in 0..7)
    for (int c = 0; c < N_CH; c++) begin
      checks++; if (y[c] < 0 || y[c] > 7) failures++;
    end
    // the ideal accumulator does not decay
    checks++; if (y0[0] != hold0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
