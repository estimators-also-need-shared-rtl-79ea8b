// tb_cedar_io_regs: self-checking test of the I/O register block.
// Checks reset values, write/read of every register, the clamp of the size
// registers, the interrupt (gated by irq_en, sticky, write-1-to-clear), the
// MAX_PTR tracking and clear, the busy bit, and one-cycle read latency.
module tb_cedar_io_regs;
  import cedar_pkg::*;
  localparam int unsigned NF = 1024, NE = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 0, rd_en = 0, busy = 0, thr_hit = 0, ptr_wr = 0, irq;
  logic [2:0] addr = 0;
  logic [31:0] wdata = 0, rdata, ptr_val = 0;
  cedar_cfg_t cfg;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cedar_io_regs #(.N_FLOWS(NF), .N_EST(NE)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input cedar_reg_e a, input logic [31:0] d);
    @(negedge clk); wr_en = 1; addr = a; wdata = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(input cedar_reg_e a, output logic [31:0] d);
    @(negedge clk); rd_en = 1; addr = a;
    @(posedge clk); #1 d = rdata;
    @(negedge clk); rd_en = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd(REG_CTRL, d);      check(d == 0, "CTRL reset");
    rd(REG_THRESH, d);    check(d == NE - 1, "THRESH reset");
    rd(REG_NUM_FLOWS, d); check(d == NF, "NUM_FLOWS reset");
    rd(REG_NUM_EST, d);   check(d == NE, "NUM_EST reset");
    rd(REG_UPS_IDX, d);   check(d == 0, "UPS_IDX reset");
    check(cfg.enable == 0 && cfg.num_est == NE, "cfg reset");
    wr(REG_CTRL, 32'hB);  rd(REG_CTRL, d); check(d == 32'hB, "CTRL write");
    check(cfg.enable && cfg.irq_en && !cfg.upscale && cfg.cur_bank, "CTRL fields");
    wr(REG_THRESH, 32'd40); rd(REG_THRESH, d); check(d == 40 && cfg.thresh == 40, "THRESH write");
    wr(REG_NUM_FLOWS, 32'd500); rd(REG_NUM_FLOWS, d); check(d == 500 && cfg.num_flows == 500, "NUM_FLOWS");
    wr(REG_NUM_FLOWS, 32'd5000); rd(REG_NUM_FLOWS, d); check(d == NF, "NUM_FLOWS clamp");
    wr(REG_NUM_EST, 32'd16); rd(REG_NUM_EST, d); check(d == 16 && cfg.num_est == 16, "NUM_EST");
    wr(REG_NUM_EST, 32'd100); rd(REG_NUM_EST, d); check(d == NE, "NUM_EST clamp");
    wr(REG_UPS_IDX, 32'd321); rd(REG_UPS_IDX, d); check(d == 321 && cfg.ups_idx == 321, "UPS_IDX");
    // interrupt
    check(irq == 0, "no irq yet");
    @(negedge clk); thr_hit = 1; @(negedge clk); thr_hit = 0;
    check(irq == 1, "irq set by threshold hit");
    rd(REG_STATUS, d); check(d[0] == 1, "STATUS irq pending");
    wr(REG_STATUS, 32'd0); check(irq == 1, "irq sticky on write 0");
    wr(REG_STATUS, 32'd1); check(irq == 0, "irq cleared");
    wr(REG_CTRL, 32'h1);  // irq_en off
    @(negedge clk); thr_hit = 1; @(negedge clk); thr_hit = 0;
    check(irq == 0, "irq masked");
    // busy
    busy = 1; rd(REG_STATUS, d); check(d[1] == 1, "busy bit"); busy = 0;
    // max pointer
    @(negedge clk); ptr_wr = 1; ptr_val = 7;
    @(negedge clk); ptr_val = 3;
    @(negedge clk); ptr_val = 12;
    @(negedge clk); ptr_wr = 0; ptr_val = 99;
    rd(REG_MAX_PTR, d); check(d == 12, $sformatf("MAX_PTR %0d", d));
    wr(REG_MAX_PTR, 0); rd(REG_MAX_PTR, d); check(d == 0, "MAX_PTR clear");
    // read latency: rdata must not change before the edge
    @(negedge clk); rd_en = 1; addr = REG_THRESH;
    #1 check(rdata == 0, "read data not combinational");
    @(posedge clk); #1 check(rdata == 40, "read after one edge");
    @(negedge clk); rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
