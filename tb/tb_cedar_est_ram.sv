// tb_cedar_est_ram: self-checking test of the estimator RAM.
// The application port loads the example estimator values 0, 1, 4, 9, 11,
// 54.7, 132, 211 (scaled by 1000) and random values elsewhere; the
// read-only port must return each one a cycle after its address, and the
// application port must read back what it wrote.
module tb_cedar_est_ram;
  localparam int unsigned N = 256, W = 32, AW = 8;
  logic clk = 1'b0;
  logic [AW-1:0] p1_addr, p2_addr;
  logic p2_we;
  logic [W-1:0] p2_wdata, p1_rdata, p2_rdata;
  logic [W-1:0] model [N];
  localparam int unsigned EXAMPLE [8] = '{0, 1000, 4000, 9000, 11000, 54700, 132000, 211000};
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cedar_est_ram #(.N_EST(N), .EST_W(W)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p2_we = 0; p1_addr = 0; p2_addr = 0; p2_wdata = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      p2_addr = AW'(i); p2_we = 1;
      p2_wdata = (i < 8) ? EXAMPLE[i] : $urandom();
      model[i] = p2_wdata;
    end
    @(negedge clk); p2_we = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); p1_addr = AW'(i);
      @(posedge clk); #1 check(p1_rdata == EXAMPLE[i], $sformatf("example A_%0d = %0d", i, p1_rdata));
    end
    for (int k = 0; k < 3000; k++) begin
      logic [W-1:0] exp1, exp2;
      @(negedge clk);
      p1_addr = AW'($urandom()); p2_addr = AW'($urandom());
      p2_we = $urandom() % 4 == 0 && p2_addr != p1_addr; p2_wdata = $urandom();
      exp1 = model[p1_addr]; exp2 = model[p2_addr];
      if (p2_we) model[p2_addr] = p2_wdata;
      @(posedge clk); #1;
      check(p1_rdata == exp1, $sformatf("port 1 addr %0d", p1_addr));
      check(p2_rdata == exp2, $sformatf("port 2 addr %0d", p2_addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
