// spira_top: one SPIRA accelerator (sequential processor integrated
// reconfigurable array) around its shared scratchpad memory.
//
// The SPM banks are reached by two masters that are never active at the
// same time. The RA's load-store PEs use a full crossbar with bank-conflict
// arbitration (five cycles per load without conflicts). The sequential
// processor bypasses the crossbar: its address decoder enables one bank,
// all banks share its address and data lines through a two-way mux per
// bank, and its loads return in two cycles, from the SPM or from the RA
// registers. The SPIRA controller takes the SP start address from the
// host, wakes the SP, and switches the bank muxes between SP and RA as the
// two take turns. Other SP addresses leave through the external port.
//
// The SP core, the PE array and the host bus are not part of this RTL:
// their signals are ports. SP port: req/we/be/addr/wdata with gnt, loads
// return on rvalid; sp_run high while the SP may execute, sp_sleep when it
// has reached its wait point. RA port: one request port per load-store PE,
// ra_start/ra_run/ra_done, the RA register values (ra_cfg) and a
// write-back port for live-out registers. Host port: START and STATUS
// registers with an irq pulse at the end of a kernel.
// Bank count, PE load-store port count and 256 KB banks follow the
// design's evaluated configuration; the rest is described in each block.
module spira_top
  import spira_pkg::*;
#(
  parameter int unsigned NUM_BANKS       = 4,
  parameter int unsigned NUM_LSU         = 4,
  parameter int unsigned BANK_WORDS      = 65536,
  parameter int unsigned NUM_RA_REGS     = 16,
  parameter int unsigned XBAR_RSP_STAGES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // host (main processor) register port
  input  logic              host_we,
  input  logic              host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  output logic [DATA_W-1:0] host_rdata,
  output logic              host_irq,
  // sequential processor
  output logic              sp_wakeup,
  output logic [ADDR_W-1:0] sp_start_addr,
  output logic              sp_run,
  input  logic              sp_sleep,
  input  logic              sp_req,
  input  logic              sp_we,
  input  logic [BE_W-1:0]   sp_be,
  input  logic [ADDR_W-1:0] sp_addr,
  input  logic [DATA_W-1:0] sp_wdata,
  output logic              sp_gnt,
  output logic              sp_rvalid,
  output logic [DATA_W-1:0] sp_rdata,
  // SP external memory or devices
  output logic              ext_req,
  output logic              ext_we,
  output logic [BE_W-1:0]   ext_be,
  output logic [ADDR_W-1:0] ext_addr,
  output logic [DATA_W-1:0] ext_wdata,
  input  logic              ext_gnt,
  input  logic              ext_rvalid,
  input  logic [DATA_W-1:0] ext_rdata,
  // reconfigurable array
  output logic              ra_start,
  output logic              ra_run,
  input  logic              ra_done,
  output logic [DATA_W-1:0] ra_cfg     [NUM_RA_REGS],
  input  logic              ra_reg_we,
  input  logic [$clog2(NUM_RA_REGS)-1:0] ra_reg_idx,
  input  logic [DATA_W-1:0] ra_reg_wdata,
  input  logic              lsu_req    [NUM_LSU],
  input  logic              lsu_we     [NUM_LSU],
  input  logic [BE_W-1:0]   lsu_be     [NUM_LSU],
  input  logic [ADDR_W-1:0] lsu_addr   [NUM_LSU],
  input  logic [DATA_W-1:0] lsu_wdata  [NUM_LSU],
  output logic              lsu_gnt    [NUM_LSU],
  output logic              lsu_conflict [NUM_LSU],
  output logic              lsu_rvalid [NUM_LSU],
  output logic [DATA_W-1:0] lsu_rdata  [NUM_LSU],
  // controller state, for observation
  output ctrl_state_e       ctrl_state
);
  logic sel_ra, sp_idle, xbar_idle, rareg_start;

  bank_req_t            sp_bank_req;
  logic [NUM_BANKS-1:0] sp_bank_en;
  bank_req_t            xb_bank_req [NUM_BANKS];
  bank_req_t            bank_req    [NUM_BANKS];
  logic [DATA_W-1:0]    bank_rdata  [NUM_BANKS];

  logic                 rareg_req, rareg_we;
  logic [$clog2(NUM_RA_REGS)-1:0] rareg_idx;
  logic [DATA_W-1:0]    rareg_wdata, rareg_rdata;

  spira_ctrl u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .host_we_i      (host_we),
    .host_addr_i    (host_addr),
    .host_wdata_i   (host_wdata),
    .host_rdata_o   (host_rdata),
    .irq_o          (host_irq),
    .sp_wakeup_o    (sp_wakeup),
    .sp_start_addr_o(sp_start_addr),
    .sp_run_o       (sp_run),
    .sp_sleep_i     (sp_sleep),
    .sp_idle_i      (sp_idle),
    .ra_start_req_i (rareg_start),
    .ra_start_o     (ra_start),
    .ra_run_o       (ra_run),
    .ra_done_i      (ra_done),
    .xbar_idle_i    (xbar_idle),
    .sel_ra_o       (sel_ra),
    .state_o        (ctrl_state)
  );

  sp_mem_if #(
    .NUM_BANKS(NUM_BANKS), .BANK_WORDS(BANK_WORDS), .NUM_RA_REGS(NUM_RA_REGS)
  ) u_sp_if (
    .clk          (clk),
    .rst_n        (rst_n),
    .en_i         (sp_run),
    .req_i        (sp_req),
    .we_i         (sp_we),
    .be_i         (sp_be),
    .addr_i       (sp_addr),
    .wdata_i      (sp_wdata),
    .gnt_o        (sp_gnt),
    .rvalid_o     (sp_rvalid),
    .rdata_o      (sp_rdata),
    .idle_o       (sp_idle),
    .spm_req_o    (sp_bank_req),
    .spm_bank_en_o(sp_bank_en),
    .spm_rdata_i  (bank_rdata),
    .rareg_req_o  (rareg_req),
    .rareg_we_o   (rareg_we),
    .rareg_idx_o  (rareg_idx),
    .rareg_wdata_o(rareg_wdata),
    .rareg_rdata_i(rareg_rdata),
    .ext_req_o    (ext_req),
    .ext_we_o     (ext_we),
    .ext_be_o     (ext_be),
    .ext_addr_o   (ext_addr),
    .ext_wdata_o  (ext_wdata),
    .ext_gnt_i    (ext_gnt),
    .ext_rvalid_i (ext_rvalid),
    .ext_rdata_i  (ext_rdata)
  );

  ra_regs #(.NUM_RA_REGS(NUM_RA_REGS)) u_ra_regs (
    .clk       (clk),
    .rst_n     (rst_n),
    .sp_req_i  (rareg_req),
    .sp_we_i   (rareg_we),
    .sp_idx_i  (rareg_idx),
    .sp_wdata_i(rareg_wdata),
    .sp_rdata_o(rareg_rdata),
    .cfg_o     (ra_cfg),
    .ra_we_i   (ra_reg_we),
    .ra_idx_i  (ra_reg_idx),
    .ra_wdata_i(ra_reg_wdata),
    .start_o   (rareg_start)
  );

  xbar #(
    .NUM_LSU(NUM_LSU), .NUM_BANKS(NUM_BANKS), .BANK_WORDS(BANK_WORDS),
    .RSP_STAGES(XBAR_RSP_STAGES)
  ) u_xbar (
    .clk         (clk),
    .rst_n       (rst_n),
    .en_i        (ra_run),
    .req_i       (lsu_req),
    .we_i        (lsu_we),
    .be_i        (lsu_be),
    .addr_i      (lsu_addr),
    .wdata_i     (lsu_wdata),
    .gnt_o       (lsu_gnt),
    .conflict_o  (lsu_conflict),
    .rvalid_o    (lsu_rvalid),
    .rdata_o     (lsu_rdata),
    .bank_req_o  (xb_bank_req),
    .bank_rdata_i(bank_rdata),
    .idle_o      (xbar_idle)
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    spm_bank_mux u_mux (
      .sel_ra_i  (sel_ra),
      .sp_en_i   (sp_bank_en[b]),
      .sp_req_i  (sp_bank_req),
      .ra_req_i  (xb_bank_req[b]),
      .bank_req_o(bank_req[b])
    );
    spm_bank #(.WORDS(BANK_WORDS)) u_bank (
      .clk    (clk),
      .req_i  (bank_req[b]),
      .rdata_o(bank_rdata[b])
    );
  end
endmodule
