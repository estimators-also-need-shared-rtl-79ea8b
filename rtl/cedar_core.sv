// cedar_core: the CEDAR update state machine.
//
// For each packet of flow j it reads the flow pointer F_j, reads the two
// successive estimators A_{F_j} and A_{F_j+1}, and writes F_j+1 back with
// probability 1/(A_{F_j+1} - A_{F_j}). Estimates stay unbiased because the
// expected number of packets needed to reach estimator l is A_l.
// The three states (fetch flow pointer, fetch estimators, update flow
// pointer) and the handling of one packet at a time follow the published
// FPGA design; fetching the two estimators takes two cycles on the single
// read-only estimator port, so a packet takes exactly 4 cycles:
//   cycle 0  FETCH_PTR    accept packet, read F_j
//   cycle 1  FETCH_EST    F_j arrives, read A_{F_j}
//   cycle 2  FETCH_EST    A_{F_j} arrives, read A_{F_j+1}
//   cycle 3  UPDATE       A_{F_j+1} arrives, decide, optionally write F_j
// and the next packet is accepted in cycle 4.
//
// Up-scaling (ping-pong estimator arrays): while cfg.upscale is set, a flow
// below the current-up-scaled-flow-index f has already been converted and
// uses the new array (the bank other than cfg.cur_bank); other flows use
// cfg.cur_bank. Flow f itself is locked: its packet waits until f moves on.
// The bank and lock are checked again in UPDATE; if the application changed
// them meanwhile, the packet is not written but retried from FETCH_PTR, so an
// update can never be lost under, or be applied in the wrong scale to, a
// flow the application is converting. This re-check is this design's own.
//
// Other choices of this design: packets for flows at or above
// cfg.num_flows are consumed and ignored; a pointer at cfg.num_est-1
// saturates; `thr_hit` pulses when a written pointer reaches cfg.thresh
// outside up-scaling; the stream input is a valid/ready handshake carrying
// only the flow index (every packet is one unit increment).
module cedar_core
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
  input  cedar_cfg_t       cfg,
  // packet stream
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [FW-1:0]    in_flow,
  // flow pointer RAM, port 1
  output logic [FW-1:0]    fp_addr,
  output logic             fp_we,
  output logic [PW-1:0]    fp_wdata,
  input  logic [PW-1:0]    fp_rdata,
  // estimator RAMs, port 1 (same address to both banks)
  output logic [PW-1:0]    est_addr,
  input  logic [EST_W-1:0] est_rdata [2],
  // events to the register block
  output logic             busy,
  output logic             thr_hit,
  output logic             ptr_wr,
  output logic [31:0]      ptr_val
);

  cedar_state_e     state_q;
  logic             phase_q;   // FETCH_EST sub-cycle
  logic             pend_q;    // a packet waits in FETCH_PTR (locked or retried)
  logic [FW-1:0]    flow_q;
  logic             bank_q;
  logic [PW-1:0]    ptr_q;
  logic [EST_W-1:0] alo_q;

  logic [FW-1:0]    cand_flow;
  logic             cand_valid;
  logic             cand_oob, cand_lock;
  logic             upd_abort;
  logic [PW:0]      ptr_inc;
  logic             allow, inc;
  logic [EST_W-1:0] ahi;
  logic [31:0]      rnd;
  logic             rnd_next;

  // Flow f is being converted by the application right now.
  function automatic logic locked(input logic [FW-1:0] f);
    return cfg.upscale && (32'(f) == cfg.ups_idx);
  endfunction

  // Estimator bank that holds flow f's scale.
  function automatic logic bank_of(input logic [FW-1:0] f);
    return cfg.cur_bank ^ (cfg.upscale && (32'(f) < cfg.ups_idx));
  endfunction

  cedar_rng #(.SEED(SEED)) u_rng (
    .clk   (clk),
    .rst_n (rst_n),
    .next  (rnd_next),
    .value (rnd)
  );

  cedar_prob_inc #(.EST_W(EST_W), .SCALE(SCALE)) u_dec (
    .a_lo  (alo_q),
    .a_hi  (ahi),
    .rnd   (rnd),
    .allow (allow),
    .inc   (inc)
  );

  always_comb begin
    in_ready   = cfg.enable && (state_q == ST_FETCH_PTR) && !pend_q;
    cand_flow  = pend_q ? flow_q : in_flow;
    cand_valid = pend_q || (in_valid && in_ready);
    cand_oob   = 32'(cand_flow) >= cfg.num_flows;
    cand_lock  = locked(cand_flow);

    ahi       = est_rdata[bank_q];
    ptr_inc   = {1'b0, ptr_q} + 1'b1;
    allow     = 32'(ptr_inc) < cfg.num_est;
    upd_abort = locked(flow_q) || (bank_of(flow_q) != bank_q);

    fp_addr  = (state_q == ST_FETCH_PTR) ? cand_flow : flow_q;
    fp_we    = 1'b0;
    fp_wdata = ptr_inc[PW-1:0];
    est_addr = ptr_q;
    rnd_next = 1'b0;
    thr_hit  = 1'b0;
    ptr_wr   = 1'b0;
    ptr_val  = 32'(ptr_inc);

    unique case (state_q)
      ST_FETCH_EST: est_addr = phase_q ? (allow ? ptr_inc[PW-1:0] : ptr_q) : fp_rdata;
      ST_UPDATE: if (!upd_abort) begin
        rnd_next = 1'b1;
        if (inc) begin
          fp_we   = 1'b1;
          ptr_wr  = 1'b1;
          thr_hit = !cfg.upscale && (32'(ptr_inc) >= cfg.thresh);
        end
      end
      default: ;
    endcase

    busy = (state_q != ST_FETCH_PTR) || pend_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_FETCH_PTR;
      phase_q <= 1'b0;
      pend_q  <= 1'b0;
      flow_q  <= '0;
      bank_q  <= 1'b0;
      ptr_q   <= '0;
      alo_q   <= '0;
    end else begin
      unique case (state_q)
        ST_FETCH_PTR: if (cand_valid) begin
          flow_q <= cand_flow;
          if (cand_oob) begin
            pend_q <= 1'b0;
          end else if (cand_lock) begin
            pend_q <= 1'b1;
          end else begin
            pend_q  <= 1'b0;
            bank_q  <= bank_of(cand_flow);
            phase_q <= 1'b0;
            state_q <= ST_FETCH_EST;
          end
        end
        ST_FETCH_EST: begin
          phase_q <= !phase_q;
          if (!phase_q) ptr_q <= fp_rdata;
          else begin
            alo_q   <= est_rdata[bank_q];
            state_q <= ST_UPDATE;
          end
        end
        ST_UPDATE: begin
          pend_q  <= upd_abort;
          state_q <= ST_FETCH_PTR;
        end
        default: state_q <= ST_FETCH_PTR;
      endcase
    end
  end

  // Stream handshake: a packet offered and not taken stays offered, unchanged.
  a_stream_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> (in_valid && $stable(in_flow)));

  // A pointer is never written beyond the last estimator in use.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    fp_we |-> (32'(fp_wdata) < cfg.num_est));

endmodule
