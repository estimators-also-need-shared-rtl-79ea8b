// tb_cedar_top: end-to-end test of the CEDAR engine at its default size
// (131072 flows, 4096 estimators of 32 bits, values x1000).
//
// The testbench plays the client application as well as the packet source:
//  - it clears the flow pointer RAM and loads the two estimator RAMs with
//    equal-relative-error arrays (delta 1% and 1.5%), computed here with the
//    recursion D_0 = 1/(1-d^2), D_l = (1 + 2 d^2 (D_0+..+D_{l-1}))/(1-d^2),
//    A_0 = 0, A_{l+1} = A_l + D_l, each value scaled by 1000 and rounded;
//  - it streams packets (a few heavy flows and many light ones) and keeps
//    the true count of every flow;
//  - on the threshold interrupt it runs the up-scaling walk while packets
//    keep flowing: for each flow j it sets the current-up-scaled-flow-index
//    to j, reads F_j, finds m with A''_m <= A'_l < A''_{m+1}, writes m+1
//    with probability (A'_l - A''_m)/(A''_{m+1} - A''_m) and m otherwise;
//    then it makes A'' current and refills A' with the next error step.
// Two up-scaling events happen. At the end it reads every estimate through
// the application ports (F_j, then A_{F_j}) and checks the estimates of the
// heavy flows and the total of all estimates against the true counts. It
// counts how often each mechanism happened (threshold interrupt, up-scaling
// walk, packets in the new array during a walk, lock waits, retried
// updates, 4-cycle packet interval, application reads) and counts a
// failure for any that never happened.
module tb_cedar_top;
  import cedar_pkg::*;
  localparam int unsigned NF = 131072, NE = 4096, W = 32, FW = 17, PW = 12;
  localparam int unsigned HEAVY = 64;
  localparam real DELTA0 = 0.01, DSTEP = 0.005;
  localparam int unsigned THRESH = 1000;

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
  int unsigned truth [NF];
  longint unsigned est [2][NE];     // copy of what the application loaded
  bit cur_bank = 0;
  real cur_delta = DELTA0;
  bit stop_stream = 0;

  // mechanism counters
  int n_pkts = 0, n_irq = 0, n_walks = 0, n_newbank = 0, n_lockwait = 0;
  int n_retry = 0, n_incs = 0, n_app_reads = 0;
  int last_acc = -1, min_gap = 1000, cyc = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // observe the engine
  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_ready) begin
      n_pkts++;
      truth[in_flow]++;
      if (last_acc >= 0 && cyc - last_acc < min_gap) min_gap = cyc - last_acc;
      last_acc = cyc;
    end
    if (dut.u_core.fp_we) n_incs++;
    if (dut.u_core.state_q == ST_FETCH_PTR && dut.u_core.pend_q && dut.cfg.upscale &&
        32'(dut.u_core.flow_q) == dut.cfg.ups_idx) n_lockwait++;
    if (dut.u_core.state_q == ST_UPDATE) begin
      if (dut.u_core.upd_abort) n_retry++;
      else if (dut.u_core.bank_q != dut.cfg.cur_bank) n_newbank++;
    end
  end

  initial begin
    // generous: two full walks of 131072 flows plus set-up
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- application helpers ----
  task automatic reg_write(input cedar_reg_e a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  task automatic reg_read(input cedar_reg_e a, output logic [31:0] d);
    @(negedge clk); reg_rd = 1; reg_addr = a;
    @(posedge clk); #1 d = reg_rdata;
    @(negedge clk); reg_rd = 0;
  endtask

  task automatic ctrl(input bit upscale, input bit bank);
    reg_write(REG_CTRL, {28'd0, bank, upscale, 1'b1, 1'b1});
  endtask

  // load an equal-relative-error array for error d into bank b
  task automatic load_bank(input int b, input real d);
    real d2, sum, dl;
    d2 = d * d; sum = 0.0;
    for (int l = 0; l < NE; l++) begin
      if (l > 0) begin
        dl = (1.0 + 2.0 * d2 * (sum)) / (1.0 - d2);
        sum += dl;
      end
      est[b][l] = (sum * 1000.0 < 4.2e9) ? longint'($rtoi(sum * 1000.0 + 0.5)) : 64'd4200000000;
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

  // estimate of flow j as the client reads it: F_j, then A_{F_j}
  task automatic read_estimate(input int j, output real e);
    logic [PW-1:0] p;
    read_ptr(j, p);
    @(negedge clk); app_est_addr[cur_bank] = p;
    @(posedge clk); #1 e = real'(app_est_rdata[cur_bank]) / 1000.0;
    n_app_reads++;
  endtask

  // up-scaling walk from bank cur_bank (A') to the other bank (A'')
  task automatic upscale();
    int nb;
    logic [PW-1:0] l;
    int lo, hi, m;
    longint unsigned v;
    real p;
    nb = 1 - int'(cur_bank);
    reg_write(REG_UPS_IDX, 0);
    ctrl(1'b1, cur_bank);
    for (int j = 0; j < NF; j++) begin
      reg_write(REG_UPS_IDX, j);
      read_ptr(j, l);
      v = est[cur_bank][l];
      // binary search: largest m with A''_m <= v
      lo = 0; hi = NE - 1;
      while (lo < hi) begin
        m = (lo + hi + 1) / 2;
        if (est[nb][m] <= v) lo = m; else hi = m - 1;
      end
      m = lo;
      if (m < NE - 1) begin
        p = real'(v - est[nb][m]) / real'(est[nb][m+1] - est[nb][m]);
        if (real'($urandom()) / 4294967296.0 < p) m++;
      end
      @(negedge clk); app_fp_we = 1; app_fp_wdata = PW'(m);
      @(negedge clk); app_fp_we = 0;
    end
    reg_write(REG_UPS_IDX, NF);
    cur_bank = bit'(nb);
    ctrl(1'b0, cur_bank);
    reg_write(REG_STATUS, 32'd1);   // clear interrupt
    n_walks++;
    // prepare the old array for the next event: one more error step
    cur_delta += DSTEP;
    load_bank(1 - nb, cur_delta + DSTEP);
  endtask

  // ---- packet source ----
  initial begin
    int f;
    wait (rst_n);
    wait (dut.cfg.enable);
    @(negedge clk);
    while (!stop_stream) begin
      if (dut.cfg.upscale && dut.cfg.ups_idx < HEAVY && $urandom() % 2 == 0)
        f = int'(dut.cfg.ups_idx) + int'($urandom() % 2);
      else if ($urandom() % 4 != 0) f = int'($urandom() % HEAVY);
      else f = int'($urandom() % NF);
      in_valid = 1; in_flow = FW'(f);
      @(posedge clk); while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
      if ($urandom() % 8 == 0) @(negedge clk);
    end
  end

  // ---- application ----
  initial begin
    logic [31:0] d;
    real e, tot_est;
    longint unsigned tot_true;
    int bad;
    app_est_addr[0] = 0; app_est_addr[1] = 0; app_est_we[0] = 0; app_est_we[1] = 0;
    app_est_wdata[0] = 0; app_est_wdata[1] = 0;
    foreach (truth[i]) truth[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // clear the flow pointer RAM through the application port
    for (int j = 0; j < NF; j++) begin
      @(negedge clk); app_fp_addr = FW'(j); app_fp_we = 1; app_fp_wdata = 0;
    end
    @(negedge clk); app_fp_we = 0;
    load_bank(0, DELTA0);
    load_bank(1, DELTA0 + DSTEP);
    reg_read(REG_NUM_FLOWS, d); check(d == NF, "NUM_FLOWS default");
    reg_write(REG_NUM_EST, NE);
    reg_write(REG_THRESH, THRESH);
    ctrl(1'b0, 1'b0);
    // two up-scaling events
    for (int ev = 0; ev < 2; ev++) begin
      while (!irq) @(negedge clk);
      n_irq++;
      reg_read(REG_MAX_PTR, d);
      check(d >= THRESH, $sformatf("interrupt with max pointer %0d >= threshold", d));
      reg_write(REG_MAX_PTR, 0);
      upscale();
    end
    repeat (20000) @(negedge clk);
    stop_stream = 1;
    repeat (20) @(negedge clk);
    reg_read(REG_STATUS, d);
    check(d[1] == 0, "engine idle at the end");

    // estimates against true counts
    bad = 0;
    for (int j = 0; j < HEAVY; j++) begin
      read_estimate(j, e);
      if (truth[j] == 0 || (e - real'(truth[j])) / real'(truth[j]) > 0.12 ||
          (real'(truth[j]) - e) / real'(truth[j]) > 0.12) begin
        bad++;
        $display("flow %0d estimate %f true %0d", j, e, truth[j]);
      end
    end
    check(bad == 0, $sformatf("%0d heavy flows outside 12%% of their true count", bad));
    tot_est = 0.0; tot_true = 0;
    for (int j = 0; j < NF; j++) begin
      tot_true += 64'(truth[j]);
      if (j < 4096) begin read_estimate(j, e); tot_est += e; end
      else if (truth[j] != 0) tot_est += real'(est[cur_bank][dut.u_flow_ram.mem[j]]) / 1000.0;
      else if (dut.u_flow_ram.mem[j] != 0) tot_est += 1.0e9;  // untouched flow must stay at A_0
    end
    $display("packets %0d, total estimate %f, %0d increments", tot_true, tot_est, n_incs);
    check(tot_true == longint'(n_pkts), "true counts add up");
    check(tot_est > 0.97 * real'(tot_true) && tot_est < 1.03 * real'(tot_true),
          "total estimate within 3% of packets counted");

    $display("mechanisms: irq=%0d walks=%0d newbank=%0d lockwait=%0d retry=%0d appreads=%0d min_interval=%0d",
             n_irq, n_walks, n_newbank, n_lockwait, n_retry, n_app_reads, min_gap);
    check(n_irq == 2, "threshold interrupt happened twice");
    check(n_walks == 2, "two up-scaling walks");
    check(n_newbank > 0, "packets used the new array during a walk");
    check(n_lockwait > 0, "a packet waited on the locked flow");
    check(n_retry > 0, "an in-flight update was retried");
    check(n_app_reads > 0, "application read estimates");
    check(min_gap == 4, $sformatf("minimum packet interval %0d cycles, expected 4", min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
