// cedar_io_regs: the I/O register interface of the CEDAR engine.
//
// The client application programs CEDAR through these registers: the array
// sizes in use, start/stop, the flow pointer threshold that raises the
// up-scale interrupt, and the current-up-scaled-flow-index that it advances
// while it walks the flow pointer array. The published design names these
// functions; the register map below (see cedar_pkg), the bus and the reset
// values are this design's own.
//
// Bus: single-word writes (`wr_en`, `addr`, `wdata`) take effect at the clock
// edge; reads (`rd_en`, `addr`) return `rdata` one cycle later.
// Status: irq pending is set by `thr_hit` from the state machine when the
// interrupt is enabled and is cleared by writing 1 to STATUS[0]; `irq` is
// that pending bit. MAX_PTR tracks the largest pointer value the state
// machine has written (`ptr_wr`, `ptr_val`); any write to it clears it.
module cedar_io_regs
  import cedar_pkg::*;
#(
  parameter int unsigned N_FLOWS = 131072,
  parameter int unsigned N_EST   = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // register bus
  input  logic        wr_en,
  input  logic        rd_en,
  input  logic [2:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // to and from the state machine
  output cedar_cfg_t  cfg,
  input  logic        busy,
  input  logic        thr_hit,
  input  logic        ptr_wr,
  input  logic [31:0] ptr_val,
  output logic        irq
);

  cedar_cfg_t  cfg_q;
  logic        irq_q;
  logic [31:0] max_ptr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q.enable    <= 1'b0;
      cfg_q.irq_en    <= 1'b0;
      cfg_q.upscale   <= 1'b0;
      cfg_q.cur_bank  <= 1'b0;
      cfg_q.thresh    <= 32'(N_EST - 1);
      cfg_q.num_flows <= 32'(N_FLOWS);
      cfg_q.num_est   <= 32'(N_EST);
      cfg_q.ups_idx   <= '0;
      irq_q           <= 1'b0;
      max_ptr_q       <= '0;
      rdata           <= '0;
    end else begin
      // events from the state machine; a register write below wins
      if (thr_hit && cfg_q.irq_en) irq_q <= 1'b1;
      if (ptr_wr && ptr_val > max_ptr_q) max_ptr_q <= ptr_val;

      if (wr_en) begin
        unique case (cedar_reg_e'(addr))
          REG_CTRL: begin
            cfg_q.enable   <= wdata[0];
            cfg_q.irq_en   <= wdata[1];
            cfg_q.upscale  <= wdata[2];
            cfg_q.cur_bank <= wdata[3];
          end
          REG_STATUS:    if (wdata[0]) irq_q <= 1'b0;
          REG_THRESH:    cfg_q.thresh    <= wdata;
          REG_NUM_FLOWS: cfg_q.num_flows <= (wdata > 32'(N_FLOWS)) ? 32'(N_FLOWS) : wdata;
          REG_NUM_EST:   cfg_q.num_est   <= (wdata > 32'(N_EST)) ? 32'(N_EST) : wdata;
          REG_UPS_IDX:   cfg_q.ups_idx   <= wdata;
          REG_MAX_PTR:   max_ptr_q       <= '0;
          default: ;
        endcase
      end

      if (rd_en) begin
        unique case (cedar_reg_e'(addr))
          REG_CTRL:      rdata <= {28'd0, cfg_q.cur_bank, cfg_q.upscale, cfg_q.irq_en, cfg_q.enable};
          REG_STATUS:    rdata <= {30'd0, busy, irq_q};
          REG_THRESH:    rdata <= cfg_q.thresh;
          REG_NUM_FLOWS: rdata <= cfg_q.num_flows;
          REG_NUM_EST:   rdata <= cfg_q.num_est;
          REG_UPS_IDX:   rdata <= cfg_q.ups_idx;
          REG_MAX_PTR:   rdata <= max_ptr_q;
          default:       rdata <= '0;
        endcase
      end
    end
  end

  assign cfg = cfg_q;
  assign irq = irq_q;

endmodule
