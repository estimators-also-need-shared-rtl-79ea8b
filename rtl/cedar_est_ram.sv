// cedar_est_ram: one estimation array A of CEDAR, as a dual-port RAM.
//
// Holds the shared estimator values A_0..A_{L-1}, in ascending order, as
// fixed-point numbers scaled by 1000. Port 1 is read only and belongs to the
// CEDAR state machine; port 2 reads and writes and belongs to the client
// application, which computes and loads the values. The defaults, 4096
// estimators of 32 bits (16 KB), are those of the published FPGA design;
// the design instantiates this RAM twice for the ping-pong arrays A' and A''
// used by up-scaling.
//
// Timing: synchronous reads with one cycle latency on both ports; a port-2
// read in the cycle of a port-2 write returns the old word. No reset.
module cedar_est_ram #(
  parameter int unsigned N_EST = 4096,
  parameter int unsigned EST_W = 32,
  localparam int unsigned AW   = $clog2(N_EST)
) (
  input  logic             clk,
  // port 1 (CEDAR, read only)
  input  logic [AW-1:0]    p1_addr,
  output logic [EST_W-1:0] p1_rdata,
  // port 2 (application)
  input  logic [AW-1:0]    p2_addr,
  input  logic             p2_we,
  input  logic [EST_W-1:0] p2_wdata,
  output logic [EST_W-1:0] p2_rdata
);

  logic [EST_W-1:0] mem [N_EST];

  always_ff @(posedge clk) begin
    p1_rdata <= mem[p1_addr];
  end

  always_ff @(posedge clk) begin
    if (p2_we) mem[p2_addr] <= p2_wdata;
    p2_rdata <= mem[p2_addr];
  end

endmodule
