// tb_cedar_core: self-checking test of the CEDAR update state machine.
// The flow pointer RAM and the two estimator RAMs are modelled here as
// arrays with one cycle of read latency. Phases:
//  1. Example array 0, 1, 4, 9, 11, 54.7, 132, 211 (x1000), 8 estimators:
//     random packets; a reference model (its own xorshift32 and a division
//     based probability test) predicts every pointer exactly. Also checks
//     the first step is certain, the last estimator saturates, and that a
//     packet is accepted every 4 cycles.
//  2. Equal-relative-error array (delta = 5%): the mean estimate over many
//     flows must match the true count (unbiasedness) within 3%.
//  3. Threshold events, flows outside the configured number of flows.
//  4. Up-scaling: bank selection by the current-up-scaled-flow-index, lock
//     of that flow, and retry of a packet whose flow became locked while it
//     was in flight.
module tb_cedar_core;
  import cedar_pkg::*;
  localparam int unsigned NF = 1024, NE = 256, W = 32, FW = 10, PW = 8;
  localparam logic [31:0] SEED = 32'hC0FF_EE11;

  logic clk = 1'b0, rst_n = 1'b0;
  cedar_cfg_t cfg;
  logic in_valid = 0, in_ready;
  logic [FW-1:0] in_flow = 0;
  logic [FW-1:0] fp_addr;
  logic fp_we;
  logic [PW-1:0] fp_wdata, fp_rdata;
  logic [PW-1:0] est_addr;
  logic [W-1:0] est_rdata [2];
  logic busy, thr_hit, ptr_wr;
  logic [31:0] ptr_val;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cedar_core #(.N_FLOWS(NF), .N_EST(NE), .EST_W(W), .SCALE(1000), .SEED(SEED)) dut (.*);

  // memories
  logic [PW-1:0] fmem [NF];
  logic [W-1:0]  emem [2][NE];
  always_ff @(posedge clk) begin
    if (fp_we) fmem[fp_addr] <= fp_wdata;
    fp_rdata     <= fmem[fp_addr];
    est_rdata[0] <= emem[0][est_addr];
    est_rdata[1] <= emem[1][est_addr];
  end

  // reference model
  logic [31:0] rng_model = SEED;
  logic [PW-1:0] fmodel [NF];
  bit model_on = 0;
  int accepts = 0, writes = 0, thr_events = 0;
  int last_accept = -1, min_gap = 1000, max_gap = 0, cyc = 0;

  function automatic logic [31:0] xs(input logic [31:0] x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5; return x;
  endfunction

  function automatic logic ref_inc(input logic [W-1:0] lo, input logic [W-1:0] hi, input logic [31:0] r);
    longint unsigned gap;
    if (hi <= lo) return 1'b0;
    gap = 64'(hi) - 64'(lo);
    return 64'(r) < ((64'd1000 << 32) + gap - 1) / gap;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_ready) begin
      accepts++;
      if (last_accept >= 0) begin
        if (cyc - last_accept < min_gap) min_gap = cyc - last_accept;
        if (cyc - last_accept > max_gap) max_gap = cyc - last_accept;
      end
      last_accept = cyc;
      if (model_on && 32'(in_flow) < cfg.num_flows) begin
        logic [PW-1:0] p;
        p = fmodel[in_flow];
        if (32'(p) + 1 < cfg.num_est && ref_inc(emem[cfg.cur_bank][p], emem[cfg.cur_bank][p+1], rng_model))
          fmodel[in_flow] = p + 1'b1;
        rng_model = xs(rng_model);
      end
    end
    if (fp_we) writes++;
    if (thr_hit) thr_events++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input int f);
    @(negedge clk);
    in_valid = 1; in_flow = FW'(f);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
  endtask

  task automatic drain();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned EX [8] = '{0, 1000, 4000, 9000, 11000, 54700, 132000, 211000};

  initial begin
    int ok, sent_first;
    cfg = '0;
    cfg.num_flows = NF; cfg.num_est = 8; cfg.thresh = NE; cfg.enable = 1;
    foreach (fmem[i]) begin fmem[i] = 0; fmodel[i] = 0; end
    for (int i = 0; i < NE; i++) begin
      emem[0][i] = (i < 8) ? EX[i] : 32'd0;
      emem[1][i] = 32'd0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- phase 1: exact prediction on the example array ----
    model_on = 1;
    send(3);
    drain();
    check(fmem[3] == 1, "first packet moves pointer from A_0 to A_1 with probability 1");
    last_accept = -1;
    @(negedge clk); in_valid = 1;
    for (int k = 0; k < 4000; k++) begin
      in_flow = FW'($urandom() % 64);
      @(posedge clk); while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    last_accept = -1;
    drain();
    check(min_gap == 4 && max_gap == 4, $sformatf("accept interval %0d..%0d cycles, expected 4", min_gap, max_gap));
    ok = 1;
    for (int i = 0; i < 64; i++) if (fmem[i] != fmodel[i]) begin
      ok = 0; $display("flow %0d pointer %0d model %0d", i, fmem[i], fmodel[i]);
    end
    check(ok == 1, "pointers match reference model");
    // saturation: drive flow 0 far past the last estimator
    for (int k = 0; k < 400; k++) send(0);
    drain();
    check(fmem[0] == 7 && fmodel[0] == 7, $sformatf("saturates at last estimator (%0d)", fmem[0]));
    model_on = 0;

    // ---- phase 2: unbiasedness on an equal-relative-error array ----
    begin
      real d2, sum, dl, mean;
      d2 = 0.05 * 0.05;
      sum = 0.0;
      emem[0][0] = 0;
      for (int l = 0; l < NE - 1; l++) begin
        dl = (1.0 + 2.0 * d2 * sum) / (1.0 - d2);
        sum += dl;
        emem[0][l+1] = (sum * 1000.0 < 4.0e9) ? 32'($rtoi(sum * 1000.0 + 0.5)) : 32'hFFFF_FFFF;
      end
      cfg.num_est = NE;
      for (int i = 0; i < 512; i++) fmem[i] = 0;
      @(negedge clk); in_valid = 1;
      for (int k = 0; k < 512 * 150; k++) begin
        in_flow = FW'(k % 512);
        @(posedge clk); while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 0;
      drain();
      mean = 0.0;
      for (int i = 0; i < 512; i++) mean += real'(emem[0][fmem[i]]) / 1000.0;
      mean = mean / 512.0;
      $display("mean estimate %f for true count 150", mean);
      check(mean > 145.5 && mean < 154.5, $sformatf("unbiased: mean %f vs 150", mean));
    end

    // ---- phase 3: threshold events and flows outside the range ----
    for (int i = 0; i < NE; i++) emem[0][i] = 32'(i * 1000);  // every step certain
    fmem[20] = 0; fmem[40] = 0;
    cfg.thresh = 5; thr_events = 0;
    for (int k = 0; k < 6; k++) send(20);
    drain();
    check(fmem[20] == 6, "deterministic steps with gap 1.0");
    check(thr_events == 2, $sformatf("threshold events %0d, expected 2 (pointers 5 and 6)", thr_events));
    cfg.num_flows = 32;
    writes = 0;
    send(40); send(40);
    drain();
    check(writes == 0 && fmem[40] == 0, "flows beyond num_flows ignored");
    cfg.num_flows = NF;

    // ---- phase 4: up-scaling banks, lock and retry ----
    for (int i = 0; i < NE; i++) begin
      emem[0][i] = 32'd5000;           // zero gap: never increments
      emem[1][i] = 32'(i * 1000);      // gap 1.0: always increments
    end
    for (int i = 0; i < 16; i++) fmem[i] = 8'd3;
    cfg.cur_bank = 0; cfg.upscale = 1; cfg.ups_idx = 5; cfg.thresh = 1;
    thr_events = 0;
    send(2);  // converted flow: new bank
    send(9);  // not yet converted: old bank
    drain();
    check(fmem[2] == 4, "flow below index uses new bank");
    check(fmem[9] == 3, "flow above index uses old bank");
    check(thr_events == 0, "no threshold event during up-scaling");
    // locked flow waits
    send(5);
    repeat (40) @(negedge clk);
    check(busy == 1 && fmem[5] == 3, "locked flow waits");
    check(in_ready == 0, "no new packet while one waits");
    cfg.ups_idx = 6;
    drain();
    check(fmem[5] == 4, "locked flow proceeds in new bank once released");
    // in-flight retry: flow 7 becomes locked between fetch and update
    writes = 0;
    @(negedge clk); in_valid = 1; in_flow = 7;
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0; cfg.ups_idx = 7;
    repeat (20) @(negedge clk);
    check(writes == 0 && fmem[7] == 3, "in-flight packet of a newly locked flow is not written");
    cfg.ups_idx = 8;
    drain();
    check(fmem[7] == 4 && writes == 1, "retried packet applied once, in new bank");
    // in-flight retry: flow 10 moves from old bank to new bank before update
    writes = 0;
    @(negedge clk); in_valid = 1; in_flow = 10;
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0; cfg.ups_idx = 11;
    drain();
    check(fmem[10] == 4 && writes == 1, "bank change in flight is retried in the new bank");
    // end of up-scaling: bank 1 becomes current
    cfg.upscale = 0; cfg.cur_bank = 1;
    send(12);
    drain();
    check(fmem[12] == 4, "after up-scaling the new bank is current");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
