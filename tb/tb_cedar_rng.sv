// tb_cedar_rng: self-checking test of the xorshift32 random source.
// Compares 2000 successive outputs with a reference xorshift32 written
// here, checks that the value holds while `next` is low, and that the
// low bit is close to balanced.
module tb_cedar_rng;
  logic clk = 1'b0, rst_n = 1'b0, next = 1'b0;
  logic [31:0] value;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cedar_rng #(.SEED(32'h1234_5678)) dut (.clk, .rst_n, .next, .value);

  function automatic logic [31:0] ref_step(input logic [31:0] x);
    logic [31:0] y = x;
    y = y ^ {y[18:0], 13'd0};
    y = y ^ {17'd0, y[31:17]};
    y = y ^ {y[26:0], 5'd0};
    return y;
  endfunction

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
    logic [31:0] model;
    int ones;
    ones = 0;
    model = 32'h1234_5678;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(value == model, "seed after reset");
    next = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      model = ref_step(model);
      check(value == model, $sformatf("step %0d value %h expected %h", i, value, model));
      ones += int'(value[0]);
    end
    next = 1'b0;
    repeat (5) @(negedge clk);
    check(value == model, "value holds while next is low");
    check(ones > 850 && ones < 1150, $sformatf("bit balance %0d/2000", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
