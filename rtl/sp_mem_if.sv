// sp_mem_if: the SP's data-side memory interface.
//
// Gives the sequential processor direct access to the shared SPM banks and
// to the RA registers without going through the RA's crossbar. A request
// (req/we/be/addr/wdata, accepted in the cycle gnt_o is high) is decoded by
// sp_addr_decoder. SPM and RA-register loads return exactly two cycles
// after the accepted request (rvalid_o, rdata_o); stores complete at once.
// The SPM request is put on address/data lines shared by all banks, with a
// one-hot bank enable; the bank select travels down a two-stage pipeline
// and picks the returning bank's word (a mux in place of the buffers drawn
// between the SP and each bank). Other addresses go to the external
// port (valid/ready request, rvalid response). Responses stay in order: an
// external access waits for internal loads in flight, and no new request is
// accepted while an external load is outstanding.
// The two-cycle latencies and the decoder/mux structure are the design's;
// the handshake and the external-port ordering rules are this
// implementation's choices. idle_o tells the controller when no load is in
// flight, so the SPM may change owner.
module sp_mem_if
  import spira_pkg::*;
#(
  parameter int unsigned NUM_BANKS   = 4,
  parameter int unsigned BANK_WORDS  = 65536,
  parameter int unsigned NUM_RA_REGS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,        // SP is running
  // SP side
  input  logic                    req_i,
  input  logic                    we_i,
  input  logic [BE_W-1:0]         be_i,
  input  logic [ADDR_W-1:0]       addr_i,
  input  logic [DATA_W-1:0]       wdata_i,
  output logic                    gnt_o,
  output logic                    rvalid_o,
  output logic [DATA_W-1:0]       rdata_o,
  output logic                    idle_o,
  // shared SPM lines
  output bank_req_t               spm_req_o,
  output logic [NUM_BANKS-1:0]    spm_bank_en_o,
  input  logic [DATA_W-1:0]       spm_rdata_i [NUM_BANKS],
  // RA registers
  output logic                    rareg_req_o,
  output logic                    rareg_we_o,
  output logic [$clog2(NUM_RA_REGS)-1:0] rareg_idx_o,
  output logic [DATA_W-1:0]       rareg_wdata_o,
  input  logic [DATA_W-1:0]       rareg_rdata_i,
  // external memory or devices
  output logic                    ext_req_o,
  output logic                    ext_we_o,
  output logic [BE_W-1:0]         ext_be_o,
  output logic [ADDR_W-1:0]       ext_addr_o,
  output logic [DATA_W-1:0]       ext_wdata_o,
  input  logic                    ext_gnt_i,
  input  logic                    ext_rvalid_i,
  input  logic [DATA_W-1:0]       ext_rdata_i
);
  localparam int unsigned BW = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;

  typedef struct packed {
    logic          valid;
    logic          rareg;   // 1: RA register, 0: SPM bank
    logic [BW-1:0] bank;
  } ld_tag_t;

  logic hit_spm, hit_rareg, hit_ext;
  logic [NUM_BANKS-1:0] bank_en;
  logic [29:0] bank_waddr;
  logic [$clog2(NUM_RA_REGS)-1:0] reg_idx;
  logic [BW-1:0] bank_idx;

  ld_tag_t p1_q, p2_q, p1_d;
  logic    ext_pend_q;
  logic    req;
  logic    int_gnt, ext_gnt;

  sp_addr_decoder #(
    .NUM_BANKS(NUM_BANKS), .BANK_WORDS(BANK_WORDS), .NUM_RA_REGS(NUM_RA_REGS)
  ) u_dec (
    .addr_i      (addr_i),
    .hit_spm_o   (hit_spm),
    .hit_rareg_o (hit_rareg),
    .hit_ext_o   (hit_ext),
    .bank_en_o   (bank_en),
    .bank_waddr_o(bank_waddr),
    .reg_idx_o   (reg_idx)
  );

  always_comb begin
    bank_idx = '0;
    for (int b = 0; b < NUM_BANKS; b++)
      if (bank_en[b]) bank_idx = BW'(b);
  end

  assign req     = req_i & en_i;
  assign int_gnt = req & (hit_spm | hit_rareg) & ~ext_pend_q;
  assign ext_gnt = req & hit_ext & ~ext_pend_q & ~p1_q.valid & ext_gnt_i;
  assign gnt_o   = int_gnt | ext_gnt;

  // shared SPM lines
  always_comb begin
    spm_req_o.req   = int_gnt & hit_spm;
    spm_req_o.we    = we_i;
    spm_req_o.be    = be_i;
    spm_req_o.waddr = bank_waddr;
    spm_req_o.wdata = wdata_i;
    spm_bank_en_o   = bank_en;
  end

  assign rareg_req_o   = int_gnt & hit_rareg;
  assign rareg_we_o    = we_i;
  assign rareg_idx_o   = reg_idx;
  assign rareg_wdata_o = wdata_i;

  assign ext_req_o   = req & hit_ext & ~ext_pend_q & ~p1_q.valid;
  assign ext_we_o    = we_i;
  assign ext_be_o    = be_i;
  assign ext_addr_o  = addr_i;
  assign ext_wdata_o = wdata_i;

  always_comb begin
    p1_d.valid = int_gnt & ~we_i;
    p1_d.rareg = hit_rareg;
    p1_d.bank  = bank_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1_q       <= '0;
      p2_q       <= '0;
      ext_pend_q <= 1'b0;
    end else begin
      p1_q <= p1_d;
      p2_q <= p1_q;
      if (ext_gnt && !we_i)   ext_pend_q <= 1'b1;
      else if (ext_rvalid_i)  ext_pend_q <= 1'b0;
    end
  end

  // read return: the word of the bank named by the tag goes to the SP
  always_comb begin
    rvalid_o = p2_q.valid | (ext_pend_q & ext_rvalid_i);
    if (p2_q.valid)
      rdata_o = p2_q.rareg ? rareg_rdata_i : spm_rdata_i[p2_q.bank];
    else
      rdata_o = ext_rdata_i;
  end

  assign idle_o = ~p1_q.valid & ~p2_q.valid & ~ext_pend_q;

  // an external response never collides with an internal one
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(p2_q.valid && ext_pend_q && ext_rvalid_i));
endmodule
