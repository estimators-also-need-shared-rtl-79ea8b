// tb_cedar_workload: the CEDAR evaluation set-ups, run on the engine at its
// default size with synthetic traffic (no packet trace is needed).
//
// Run A, 12-bit estimators: 4096 entries, starting error 1%, error step
// 0.5%, up-scale threshold at pointer 4000. Groups of flows receive exactly
// 10, 100, 1000 and 10000 packets, and 8 heavy flows 500,000 packets each,
// in random interleaving; the heavy flows drive four up-scaling events
// (1% -> 1.5% -> 2% -> 2.5% -> 3%), the last at about 1.2e5 packets.
// Run B, 8-bit estimators: NUM_EST = 256 and NUM_FLOWS limited to the flows
// in use, same error start and step, threshold at pointer 240; groups of
// 10, 100, 1000 and 10000 packets force many up-scaling events.
//
// The testbench plays the client application: it loads equal-relative-error
// tables (recursion D_0 = 1/(1-d^2), D_l = (1 + 2 d^2 sum D)/(1-d^2), values
// x1000), answers every interrupt with a full up-scaling walk while packets
// keep flowing, and reads the estimates through the application ports at the
// end. For each group it checks that the estimates are unbiased (mean within
// 3 standard errors) and that the RMS relative error lies between a third of
// the starting error and 1.4 times the final error, i.e. that the error
// follows the current scale over the whole counter range.
module tb_cedar_workload;
  import cedar_pkg::*;
  localparam int unsigned NF = 131072, NE = 4096, W = 32, FW = 17, PW = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 0, in_ready;
  logic [FW-1:0] in_flow = 0;
  logic reg_wr = 0, reg_rd = 0, irq;
  logic [2:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [FW-1:0] app_fp_addr = 0;
  logic app_fp_we = 0;
  logic [PW-1:0] app_fp_wdata = 0, app_fp_rdata;
  logic [PW-1:0] app_est_addr [2];
  logic app_est_we [2];
  logic [W-1:0] app_est_wdata [2], app_est_rdata [2];
  always #5 clk = ~clk;

  cedar_top dut (.*);

  int checks = 0, failures = 0;
  longint unsigned est [2][NE];
  bit cur_bank;
  real cur_delta, dstep;
  int n_est, n_flows, n_walks;
  bit traffic_done;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (80000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reg_write(input cedar_reg_e a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  task automatic ctrl(input bit upscale, input bit bank);
    reg_write(REG_CTRL, {28'd0, bank, upscale, 1'b1, 1'b1});
  endtask

  task automatic load_bank(input int b, input real d);
    real d2, sum;
    d2 = d * d; sum = 0.0;
    for (int l = 0; l < NE; l++) begin
      if (l > 0) sum += (1.0 + 2.0 * d2 * sum) / (1.0 - d2);
      // values past the 32-bit range are pinned; they are never reached
      est[b][l] = (l < n_est && sum * 1000.0 < 4.29e9) ? longint'($rtoi(sum * 1000.0 + 0.5))
                                                       : 64'd4290000000;
    end
    for (int l = 0; l < NE; l++) begin
      @(negedge clk);
      app_est_addr[b] = PW'(l); app_est_we[b] = 1; app_est_wdata[b] = W'(est[b][l]);
    end
    @(negedge clk); app_est_we[b] = 0;
  endtask

  task automatic read_ptr(input int j, output logic [PW-1:0] p);
    @(negedge clk); app_fp_addr = FW'(j);
    @(posedge clk); #1 p = app_fp_rdata;
  endtask

  task automatic upscale();
    int nb, lo, hi, m;
    logic [PW-1:0] l;
    longint unsigned v;
    real p;
    nb = 1 - int'(cur_bank);
    reg_write(REG_UPS_IDX, 0);
    ctrl(1'b1, cur_bank);
    for (int j = 0; j < n_flows; j++) begin
      reg_write(REG_UPS_IDX, j);
      read_ptr(j, l);
      v = est[cur_bank][l];
      lo = 0; hi = n_est - 1;
      while (lo < hi) begin
        m = (lo + hi + 1) / 2;
        if (est[nb][m] <= v) lo = m; else hi = m - 1;
      end
      m = lo;
      if (m < n_est - 1 && est[nb][m+1] > est[nb][m]) begin
        p = real'(v - est[nb][m]) / real'(est[nb][m+1] - est[nb][m]);
        if (real'($urandom()) / 4294967296.0 < p) m++;
      end
      @(negedge clk); app_fp_we = 1; app_fp_wdata = PW'(m);
      @(negedge clk); app_fp_we = 0;
    end
    reg_write(REG_UPS_IDX, n_flows);
    cur_bank = bit'(nb);
    ctrl(1'b0, cur_bank);
    reg_write(REG_STATUS, 32'd1);
    n_walks++;
    cur_delta += dstep;
    load_bank(1 - nb, cur_delta + dstep);
  endtask

  // one evaluation run; groups given as (flows, packets per flow)
  task automatic run(input string name, input int est_entries, input int thresh,
                     input int grp_flows [], input int grp_count []);
    int remaining [], active [];
    int n_active, total, k, f, base;
    logic [PW-1:0] p;
    real e, mean, sq, rms, se;
    // reset and set up
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    n_est = est_entries; n_walks = 0; cur_bank = 0; cur_delta = 0.01; dstep = 0.005;
    n_flows = 0;
    foreach (grp_flows[g]) n_flows += grp_flows[g];
    for (int j = 0; j < n_flows; j++) begin
      @(negedge clk); app_fp_addr = FW'(j); app_fp_we = 1; app_fp_wdata = 0;
    end
    @(negedge clk); app_fp_we = 0;
    load_bank(0, cur_delta);
    load_bank(1, cur_delta + dstep);
    reg_write(REG_NUM_EST, est_entries);
    reg_write(REG_NUM_FLOWS, (est_entries == NE) ? NF : n_flows);
    if (est_entries == NE) n_flows = NF;   // 12-bit run walks every flow
    reg_write(REG_THRESH, thresh);
    ctrl(1'b0, 1'b0);
    // traffic, with the application serving interrupts alongside
    remaining = new[n_flows];
    active = new[n_flows];
    n_active = 0; total = 0; base = 0;
    foreach (remaining[j]) remaining[j] = 0;
    foreach (grp_flows[g]) begin
      for (int i = 0; i < grp_flows[g]; i++) begin
        remaining[base + i] = grp_count[g];
        active[n_active++] = base + i;
        total += grp_count[g];
      end
      base += grp_flows[g];
    end
    traffic_done = 0;
    fork
      begin
        @(negedge clk);
        while (n_active > 0) begin
          k = int'($urandom() % n_active);
          f = active[k];
          in_valid = 1; in_flow = FW'(f);
          @(posedge clk); while (!in_ready) @(posedge clk);
          @(negedge clk); in_valid = 0;
          if (--remaining[f] == 0) active[k] = active[--n_active];
        end
        traffic_done = 1;
      end
      begin
        while (!traffic_done) begin
          @(negedge clk);
          if (irq) upscale();
        end
      end
    join
    repeat (10) @(negedge clk);
    $display("%s: %0d packets, %0d up-scaling events, final error target %.1f%%",
             name, total, n_walks, cur_delta * 100.0);
    // per-group statistics from estimates read through the application ports
    base = 0;
    foreach (grp_flows[g]) begin
      mean = 0.0; sq = 0.0;
      for (int i = 0; i < grp_flows[g]; i++) begin
        read_ptr(base + i, p);
        @(negedge clk); app_est_addr[cur_bank] = p;
        @(posedge clk); #1 e = real'(app_est_rdata[cur_bank]) / 1000.0;
        mean += e;
        sq += (e - grp_count[g]) * (e - grp_count[g]);
      end
      mean /= grp_flows[g];
      rms = $sqrt(sq / grp_flows[g]) / grp_count[g];
      se = rms * grp_count[g] / $sqrt(real'(grp_flows[g]));
      $display("%s: count %0d, %0d flows: mean estimate %.2f, RMS relative error %.2f%%",
               name, grp_count[g], grp_flows[g], mean, rms * 100.0);
      check(mean > grp_count[g] - 3.0 * se - 0.5 && mean < grp_count[g] + 3.0 * se + 0.5,
            $sformatf("%s count %0d unbiased", name, grp_count[g]));
      check(rms < 1.4 * cur_delta, $sformatf("%s count %0d error below 1.4 x final target", name, grp_count[g]));
      if (grp_count[g] >= 100)
        check(rms > 0.01 / 3.0, $sformatf("%s count %0d error not implausibly small", name, grp_count[g]));
      base += grp_flows[g];
    end
  endtask

  initial begin
    app_est_addr[0] = 0; app_est_addr[1] = 0; app_est_we[0] = 0; app_est_we[1] = 0;
    app_est_wdata[0] = 0; app_est_wdata[1] = 0;
    run("12-bit", NE, 4000, '{512, 512, 512, 256, 8}, '{10, 100, 1000, 10000, 500000});
    check(n_walks == 4, $sformatf("12-bit run: %0d up-scaling events, expected 4", n_walks));
    check(cur_delta > 0.0299 && cur_delta < 0.0301, "12-bit run ends at 3% error target");
    run("8-bit", 256, 240, '{256, 256, 64, 8}, '{10, 100, 1000, 10000});
    check(n_walks >= 15, $sformatf("8-bit run: %0d up-scaling events", n_walks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
