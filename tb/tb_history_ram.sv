// tb_history_ram: random writes and reads against an array model; checks the
// one-cycle read latency and that reads with re low hold the output.
module tb_history_ram;
  import adm_pkg::*;
  localparam int DEPTH = 120;
  logic clk = 0, we = 0, re = 0;
  logic [6:0] waddr = 0, raddr = 0;
  hist_t wdata = '0, rdata;
  hist_t model [DEPTH];
  hist_t expect_q;
  int checks = 0, failures = 0;

  history_ram #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill every word first
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 7'(a); wdata = hist_t'($urandom_range(0, 3)); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 7'($urandom_range(0, DEPTH - 1)); wdata = hist_t'($urandom_range(0, 3));
      re = ($urandom_range(0, 3) != 0); raddr = 7'($urandom_range(0, DEPTH - 1));
      if (re) expect_q = model[raddr];   // read-before-write on the same address
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata !== expect_q) begin failures++; if (failures < 10) $display("FAIL read %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
