// spira_ctrl: the SPIRA controller, which enforces exclusive execution.
//
// The host processor starts the accelerator by writing the SP's start
// address into the START register. The controller keeps the address on a
// dedicated bus to the SP, pulses sp_wakeup_o and lets the SP run. While
// the SP runs, it owns the SPM (sel_ra_o = 0). The SP sets up the RA
// through the RA registers; the store that invokes the RA is recorded
// (ra_start_req_i) and takes effect when the SP goes to sleep
// (sp_sleep_i): once the SP's memory interface has no load in flight the
// controller switches the SPM mux to the crossbar, pulses ra_start_o and
// keeps ra_run_o high. When the RA reports ra_done_i and its crossbar has
// drained, the SPM returns to the SP and the SP resumes. If the SP goes to
// sleep with no RA invocation pending, the kernel is finished: the
// controller returns to idle, sets the sticky done bit and pulses irq_o.
// SP and RA are never active in the same cycle, and the mux select changes
// only when one of them changes power state.
// Host registers: START (index 0, write) and STATUS (index 1, read,
// bit 0 busy, bit 1 done; done clears on the next START). The start-address
// path, the wakeup signal and exclusive execution are the design's; the
// sleep/done handshakes, the drain waits and the register layout are this
// implementation's choices.
module spira_ctrl
  import spira_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host (main processor) register port
  input  logic              host_we_i,
  input  logic              host_addr_i,     // register index
  input  logic [DATA_W-1:0] host_wdata_i,
  output logic [DATA_W-1:0] host_rdata_o,
  output logic              irq_o,
  // sequential processor
  output logic              sp_wakeup_o,
  output logic [ADDR_W-1:0] sp_start_addr_o,
  output logic              sp_run_o,
  input  logic              sp_sleep_i,
  input  logic              sp_idle_i,       // no SP load in flight
  // reconfigurable array
  input  logic              ra_start_req_i,  // from the RA register file
  output logic              ra_start_o,
  output logic              ra_run_o,
  input  logic              ra_done_i,
  input  logic              xbar_idle_i,
  // SPM mux select
  output logic              sel_ra_o,
  output ctrl_state_e       state_o
);
  ctrl_state_e       state_q;
  logic [ADDR_W-1:0] start_addr_q;
  logic              ra_pend_q, ra_done_q, done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= CTRL_IDLE;
      start_addr_q <= '0;
      ra_pend_q    <= 1'b0;
      ra_done_q    <= 1'b0;
      done_q       <= 1'b0;
      sp_wakeup_o  <= 1'b0;
      ra_start_o   <= 1'b0;
      irq_o        <= 1'b0;
    end else begin
      sp_wakeup_o <= 1'b0;
      ra_start_o  <= 1'b0;
      irq_o       <= 1'b0;
      if (ra_start_req_i) ra_pend_q <= 1'b1;
      unique case (state_q)
        CTRL_IDLE: begin
          if (host_we_i && host_addr_i == 1'(HOST_START)) begin
            start_addr_q <= host_wdata_i;
            sp_wakeup_o  <= 1'b1;
            done_q       <= 1'b0;
            ra_pend_q    <= 1'b0;
            state_q      <= CTRL_SP_RUN;
          end
        end
        CTRL_SP_RUN: begin
          if (sp_sleep_i) state_q <= CTRL_SP_DRN;
        end
        CTRL_SP_DRN: begin
          if (sp_idle_i) begin
            if (ra_pend_q) begin
              ra_pend_q  <= 1'b0;
              ra_done_q  <= 1'b0;
              ra_start_o <= 1'b1;
              state_q    <= CTRL_RA_RUN;
            end else begin
              done_q  <= 1'b1;
              irq_o   <= 1'b1;
              state_q <= CTRL_IDLE;
            end
          end
        end
        CTRL_RA_RUN: begin
          if (ra_done_i) ra_done_q <= 1'b1;
          if ((ra_done_i || ra_done_q) && xbar_idle_i) begin
            ra_done_q <= 1'b0;
            state_q   <= CTRL_SP_RUN;
          end
        end
        default: state_q <= CTRL_IDLE;
      endcase
    end
  end

  assign sp_start_addr_o = start_addr_q;
  assign sp_run_o        = (state_q == CTRL_SP_RUN);
  assign ra_run_o        = (state_q == CTRL_RA_RUN);
  assign sel_ra_o        = (state_q == CTRL_RA_RUN);
  assign state_o         = state_q;
  assign host_rdata_o    = (host_addr_i == 1'(HOST_STATUS))
                           ? {{(DATA_W-2){1'b0}}, done_q, (state_q != CTRL_IDLE)}
                           : start_addr_q;

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(sp_run_o && ra_run_o));
endmodule
