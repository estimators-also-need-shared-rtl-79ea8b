// cedar_flow_ram: the flow pointer array F of CEDAR, as a true dual-port RAM.
//
// One word per flow holds that flow's pointer into the estimator array
// (log2 of the number of estimators bits). Port 1 belongs to the CEDAR state
// machine (read and write), port 2 to the client application (read and
// write), as in the published FPGA implementation, where both are block RAM
// ports. The default size, 131072 flows of 12 bits, is the 192 KB flow
// pointer RAM of that implementation.
//
// Timing: both ports are synchronous; read data appears on the clock edge
// after the address (one cycle latency), and a read on the same port as a
// write returns the old word. The two ports must not write one address in
// the same cycle. There is no reset: the application clears the array.
module cedar_flow_ram #(
  parameter int unsigned N_FLOWS = 131072,
  parameter int unsigned PTR_W   = 12,
  localparam int unsigned AW     = $clog2(N_FLOWS)
) (
  input  logic             clk,
  // port 1 (CEDAR)
  input  logic [AW-1:0]    p1_addr,
  input  logic             p1_we,
  input  logic [PTR_W-1:0] p1_wdata,
  output logic [PTR_W-1:0] p1_rdata,
  // port 2 (application)
  input  logic [AW-1:0]    p2_addr,
  input  logic             p2_we,
  input  logic [PTR_W-1:0] p2_wdata,
  output logic [PTR_W-1:0] p2_rdata
);

  logic [PTR_W-1:0] mem [N_FLOWS];

  always_ff @(posedge clk) begin
    if (p1_we) mem[p1_addr] <= p1_wdata;
    p1_rdata <= mem[p1_addr];
  end

  always_ff @(posedge clk) begin
    if (p2_we) mem[p2_addr] <= p2_wdata;
    p2_rdata <= mem[p2_addr];
  end

endmodule
