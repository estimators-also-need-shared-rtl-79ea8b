// tb_cedar_prob_inc: self-checking test of the probabilistic increment.
// The increment must happen iff rnd < ceil(SCALE * 2^32 / gap), worked out
// here with a division rather than the block's multiplication. It also
// checks the forced cases (gap equal to SCALE always increments, a zero gap
// or a saturated pointer never does) and the increment rates for the gaps
// 1, 3 and 5 of the example sequence 0, 1, 4, 9 (scaled by 1000).
module tb_cedar_prob_inc;
  localparam int unsigned SCALE = 1000;
  logic [31:0] a_lo, a_hi, rnd;
  logic allow, inc;
  int checks = 0, failures = 0;

  cedar_prob_inc #(.EST_W(32), .SCALE(SCALE)) dut (.a_lo, .a_hi, .rnd, .allow, .inc);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic expect_inc(input logic [31:0] lo, input logic [31:0] hi,
                                      input logic [31:0] r, input logic al);
    longint unsigned gap, bound;
    if (!al || hi <= lo) return 1'b0;
    gap = 64'(hi) - 64'(lo);
    bound = ((64'(SCALE) << 32) + gap - 1) / gap;   // ceil
    return 64'(r) < bound;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits;
    allow = 1'b1;
    // gap == SCALE: probability 1
    a_lo = 32'd4000; a_hi = 32'd5000;
    rnd = 32'hFFFF_FFFF; #1 check(inc == 1'b1, "gap 1.0 at max rnd");
    rnd = 32'd0;         #1 check(inc == 1'b1, "gap 1.0 at zero rnd");
    // zero gap and saturated pointer
    a_hi = a_lo; rnd = 32'd0; #1 check(inc == 1'b0, "zero gap");
    a_hi = 32'd9000; allow = 1'b0; #1 check(inc == 1'b0, "allow low");
    allow = 1'b1;
    // boundary values for gap 3000
    a_lo = 32'd1000; a_hi = 32'd4000;
    rnd = 32'd1431655765; #1 check(inc == expect_inc(a_lo, a_hi, rnd, 1'b1), "boundary -1");
    rnd = 32'd1431655766; #1 check(inc == expect_inc(a_lo, a_hi, rnd, 1'b1), "boundary");
    rnd = 32'd1431655764; #1 check(inc == 1'b1, "just below 1/3");
    rnd = 32'd1431655767; #1 check(inc == 1'b0, "just above 1/3");
    // random operands against the reference
    for (int i = 0; i < 20000; i++) begin
      a_lo  = $urandom() >> ($urandom() % 32);
      a_hi  = a_lo + ($urandom() >> ($urandom() % 32));
      rnd   = $urandom();
      allow = ($urandom() % 8) != 0;
      #1 check(inc == expect_inc(a_lo, a_hi, rnd, allow),
               $sformatf("lo=%0d hi=%0d rnd=%h allow=%0b inc=%0b", a_lo, a_hi, rnd, allow, inc));
    end
    // rates for gaps 3 and 5 (example sequence A = 0, 1, 4, 9)
    allow = 1'b1;
    a_lo = 32'd1000; a_hi = 32'd4000; hits = 0;
    for (int i = 0; i < 30000; i++) begin rnd = $urandom(); #1 hits += int'(inc); end
    check(hits > 9600 && hits < 10400, $sformatf("rate 1/3: %0d of 30000", hits));
    a_lo = 32'd4000; a_hi = 32'd9000; hits = 0;
    for (int i = 0; i < 30000; i++) begin rnd = $urandom(); #1 hits += int'(inc); end
    check(hits > 5700 && hits < 6300, $sformatf("rate 1/5: %0d of 30000", hits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
