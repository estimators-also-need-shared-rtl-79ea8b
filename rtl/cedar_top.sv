// cedar_top: the CEDAR counter-estimation engine.
//
// Per-flow packet counters are replaced by short pointers (12 bits by
// default) into a small table of shared estimator values. A packet of flow
// j moves its pointer up by one with probability 1/(A_{i+1}-A_i), so the
// estimate A_{F_j} is unbiased; choosing the estimator values by the
// equal-relative-error recursion gives the smallest worst-case relative
// error for a given table. When the largest pointer nears the end of the
// table, the application converts every pointer to a second table with a
// larger error and a larger range (up-scaling), while packets keep flowing.
//
// Blocks, as in the published FPGA design:
//   cedar_core       three-state update machine (4 cycles per packet)
//   cedar_io_regs    configuration, start/stop, threshold, interrupt,
//                    current-up-scaled-flow-index
//   cedar_flow_ram   flow pointer array F, N_FLOWS x log2(N_EST) bits
//   cedar_est_ram x2 estimator arrays A' and A'' (ping-pong), N_EST x EST_W
// Port 1 of each RAM belongs to the state machine; port 2 of each RAM and
// the register bus are brought out for the client application, which
// loads estimator values, reads estimates (F_j, then A_{F_j}) and performs
// the up-scaling walk. That application is software and is not part of
// this RTL.
//
// Defaults follow the published implementation: 192 KB of flow pointers
// (131072 x 12 bits), a 16 KB estimator array (4096 x 32 bits) with values
// scaled by 1000. The second estimator RAM doubles that to 32 KB.
// All RAM ports have one cycle of read latency; the register bus likewise.
module cedar_top
  import cedar_pkg::*;
#(
  parameter int unsigned N_FLOWS = 131072,
  parameter int unsigned N_EST   = 4096,
  parameter int unsigned EST_W   = 32,
  parameter int unsigned SCALE   = EST_SCALE_DEFAULT,
  parameter logic [31:0] SEED    = 32'h2545_F491,
  localparam int unsigned FW     = $clog2(N_FLOWS),
  localparam int unsigned PW     = $clog2(N_EST)
) (
  input  logic             clk,
  input  logic             rst_n,
  // packet stream: one flow index per packet
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [FW-1:0]    in_flow,
  // I/O register bus
  input  logic             reg_wr,
  input  logic             reg_rd,
  input  logic [2:0]       reg_addr,
  input  logic [31:0]      reg_wdata,
  output logic [31:0]      reg_rdata,
  output logic             irq,
  // application port of the flow pointer RAM
  input  logic [FW-1:0]    app_fp_addr,
  input  logic             app_fp_we,
  input  logic [PW-1:0]    app_fp_wdata,
  output logic [PW-1:0]    app_fp_rdata,
  // application ports of the two estimator RAMs
  input  logic [PW-1:0]    app_est_addr  [2],
  input  logic             app_est_we    [2],
  input  logic [EST_W-1:0] app_est_wdata [2],
  output logic [EST_W-1:0] app_est_rdata [2]
);

  cedar_cfg_t       cfg;
  logic             busy, thr_hit, ptr_wr;
  logic [31:0]      ptr_val;
  logic [FW-1:0]    fp_addr;
  logic             fp_we;
  logic [PW-1:0]    fp_wdata, fp_rdata;
  logic [PW-1:0]    est_addr;
  logic [EST_W-1:0] est_rdata [2];

  cedar_io_regs #(.N_FLOWS(N_FLOWS), .N_EST(N_EST)) u_regs (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (reg_wr),
    .rd_en   (reg_rd),
    .addr    (reg_addr),
    .wdata   (reg_wdata),
    .rdata   (reg_rdata),
    .cfg     (cfg),
    .busy    (busy),
    .thr_hit (thr_hit),
    .ptr_wr  (ptr_wr),
    .ptr_val (ptr_val),
    .irq     (irq)
  );

  cedar_core #(
    .N_FLOWS(N_FLOWS), .N_EST(N_EST), .EST_W(EST_W), .SCALE(SCALE), .SEED(SEED)
  ) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg       (cfg),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_flow   (in_flow),
    .fp_addr   (fp_addr),
    .fp_we     (fp_we),
    .fp_wdata  (fp_wdata),
    .fp_rdata  (fp_rdata),
    .est_addr  (est_addr),
    .est_rdata (est_rdata),
    .busy      (busy),
    .thr_hit   (thr_hit),
    .ptr_wr    (ptr_wr),
    .ptr_val   (ptr_val)
  );

  cedar_flow_ram #(.N_FLOWS(N_FLOWS), .PTR_W(PW)) u_flow_ram (
    .clk      (clk),
    .p1_addr  (fp_addr),
    .p1_we    (fp_we),
    .p1_wdata (fp_wdata),
    .p1_rdata (fp_rdata),
    .p2_addr  (app_fp_addr),
    .p2_we    (app_fp_we),
    .p2_wdata (app_fp_wdata),
    .p2_rdata (app_fp_rdata)
  );

  for (genvar b = 0; b < 2; b++) begin : g_est
    cedar_est_ram #(.N_EST(N_EST), .EST_W(EST_W)) u_est_ram (
      .clk      (clk),
      .p1_addr  (est_addr),
      .p1_rdata (est_rdata[b]),
      .p2_addr  (app_est_addr[b]),
      .p2_we    (app_est_we[b]),
      .p2_wdata (app_est_wdata[b]),
      .p2_rdata (app_est_rdata[b])
    );
  end

endmodule
