// tb_cedar_flow_ram: self-checking test of the dual-port flow pointer RAM.
// Writes random words through both ports, keeps a reference copy, and checks
// read data from both ports one cycle after the address, including the
// old-data result of a read in the same cycle as a write on that port.
module tb_cedar_flow_ram;
  localparam int unsigned N = 1024, W = 12, AW = 10;
  logic clk = 1'b0;
  logic [AW-1:0] p1_addr, p2_addr;
  logic p1_we, p2_we;
  logic [W-1:0] p1_wdata, p2_wdata, p1_rdata, p2_rdata;
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cedar_flow_ram #(.N_FLOWS(N), .PTR_W(W)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp1, exp2;
    p1_we = 0; p2_we = 0; p1_addr = 0; p2_addr = 0; p1_wdata = 0; p2_wdata = 0;
    // fill: even words through port 1, odd words through port 2
    for (int i = 0; i < N; i += 2) begin
      @(negedge clk);
      p1_addr = AW'(i);   p1_we = 1; p1_wdata = W'($urandom()); model[i]   = p1_wdata;
      p2_addr = AW'(i+1); p2_we = 1; p2_wdata = W'($urandom()); model[i+1] = p2_wdata;
    end
    @(negedge clk); p1_we = 0; p2_we = 0;
    // random traffic on both ports, never the same address written twice
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      p1_addr = AW'($urandom()); p2_addr = AW'($urandom());
      p1_we = $urandom() % 3 == 0; p2_we = ($urandom() % 3 == 0) && (p2_addr != p1_addr);
      p1_wdata = W'($urandom()); p2_wdata = W'($urandom());
      exp1 = model[p1_addr]; exp2 = model[p2_addr];
      if (p1_we) model[p1_addr] = p1_wdata;
      if (p2_we) model[p2_addr] = p2_wdata;
      @(posedge clk); #1;
      check(p1_rdata == exp1, $sformatf("port 1 addr %0d got %h exp %h", p1_addr, p1_rdata, exp1));
      check(p2_rdata == exp2, $sformatf("port 2 addr %0d got %h exp %h", p2_addr, p2_rdata, exp2));
    end
    // a word written on one port is read on the other
    @(negedge clk); p1_we = 1; p2_we = 0; p1_addr = 10'd77; p1_wdata = 12'hABC; model[77] = 12'hABC;
    @(negedge clk); p1_we = 0; p2_addr = 10'd77;
    @(posedge clk); #1 check(p2_rdata == 12'hABC, "cross-port read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
