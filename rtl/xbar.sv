// xbar: full crossbar between the RA's load-store PEs and the SPM banks.
//
// Each load-store port presents one request at a time (req/we/be/addr/
// wdata) and holds it until gnt_o is high. The target bank is the byte
// address's word number divided by the bank size, the same contiguous
// layout the SP decoder uses. When several ports want the same bank in one
// cycle, a round-robin arbiter per bank grants one of them and the others
// stall (conflict_o) and retry: this is the bank-conflict behaviour that
// makes the crossbar latency variable. Granted requests are registered
// and presented to the bank in the next cycle; each port carries a tag
// (valid, bank) alongside the bank's two-cycle pipeline to select the
// returning word, which then passes RSP_STAGES output registers. A load
// granted in cycle c therefore returns in cycle c + 3 + RSP_STAGES, five
// cycles with the default of two, the crossbar latency without conflicts
// that the design starts from. en_i (the RA is running) gates all grants;
// idle_o is high when nothing is in flight.
// The crossbar's presence, port and bank counts follow the design; the
// arbitration policy and the split of the pipeline are this
// implementation's choices.
module xbar
  import spira_pkg::*;
#(
  parameter int unsigned NUM_LSU     = 4,
  parameter int unsigned NUM_BANKS   = 4,
  parameter int unsigned BANK_WORDS  = 65536,
  parameter int unsigned RSP_STAGES  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,
  // load-store PE ports
  input  logic              req_i   [NUM_LSU],
  input  logic              we_i    [NUM_LSU],
  input  logic [BE_W-1:0]   be_i    [NUM_LSU],
  input  logic [ADDR_W-1:0] addr_i  [NUM_LSU],
  input  logic [DATA_W-1:0] wdata_i [NUM_LSU],
  output logic              gnt_o   [NUM_LSU],
  output logic              conflict_o [NUM_LSU],
  output logic              rvalid_o[NUM_LSU],
  output logic [DATA_W-1:0] rdata_o [NUM_LSU],
  // bank side
  output bank_req_t         bank_req_o   [NUM_BANKS],
  input  logic [DATA_W-1:0] bank_rdata_i [NUM_BANKS],
  output logic              idle_o
);
  localparam int unsigned BW = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;
  localparam int unsigned PW = (NUM_LSU > 1) ? $clog2(NUM_LSU) : 1;

  typedef struct packed {
    logic          valid;
    logic [BW-1:0] bank;
  } tag_t;

  logic [29:0]   word     [NUM_LSU];
  logic [29:0]   tgt_bank [NUM_LSU];
  logic [PW-1:0] rr_q     [NUM_BANKS];
  logic [NUM_LSU-1:0] win [NUM_BANKS];   // one-hot winner per bank
  bank_req_t     breq_q   [NUM_BANKS];
  tag_t          tag_q    [NUM_LSU][3];  // request, bank stage 1, bank stage 2
  logic          rv_q     [NUM_LSU][RSP_STAGES+1];
  logic [DATA_W-1:0] rd_q [NUM_LSU][RSP_STAGES+1];
  logic          busy;

  // bank of each port's request
  always_comb begin
    for (int p = 0; p < NUM_LSU; p++) begin
      word[p]     = addr_i[p][31:2];
      tgt_bank[p] = 30'(word[p] / BANK_WORDS);
    end
  end

  // round-robin arbitration, one arbiter per bank
  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      win[b] = '0;
      for (int k = 0; k < NUM_LSU; k++) begin
        logic [PW-1:0] p;
        p = PW'((int'(rr_q[b]) + k) % NUM_LSU);
        if (en_i && req_i[p] && tgt_bank[p] == 30'(b) && win[b] == '0)
          win[b][p] = 1'b1;
      end
    end
    for (int p = 0; p < NUM_LSU; p++) begin
      gnt_o[p] = 1'b0;
      for (int b = 0; b < NUM_BANKS; b++)
        if (win[b][p]) gnt_o[p] = 1'b1;
      conflict_o[p] = en_i && req_i[p] && !gnt_o[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        rr_q[b]   <= '0;
        breq_q[b] <= '0;
      end
      for (int p = 0; p < NUM_LSU; p++)
        for (int s = 0; s < 3; s++) tag_q[p][s] <= '0;
    end else begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        breq_q[b].req <= 1'b0;
        for (int p = 0; p < NUM_LSU; p++) begin
          if (win[b][p]) begin
            breq_q[b].req   <= 1'b1;
            breq_q[b].we    <= we_i[p];
            breq_q[b].be    <= be_i[p];
            breq_q[b].waddr <= 30'(word[p] % BANK_WORDS);
            breq_q[b].wdata <= wdata_i[p];
            rr_q[b]         <= PW'((p + 1) % NUM_LSU);
          end
        end
      end
      for (int p = 0; p < NUM_LSU; p++) begin
        tag_q[p][0].valid <= gnt_o[p] && !we_i[p];
        tag_q[p][0].bank  <= BW'(tgt_bank[p]);
        tag_q[p][1]       <= tag_q[p][0];
        tag_q[p][2]       <= tag_q[p][1];
      end
    end
  end

  assign bank_req_o = breq_q;

  // response path: select the bank word, then RSP_STAGES registers
  always_comb begin
    for (int p = 0; p < NUM_LSU; p++) begin
      rv_q[p][0] = tag_q[p][2].valid;
      rd_q[p][0] = bank_rdata_i[tag_q[p][2].bank];
    end
  end

  for (genvar s = 1; s <= RSP_STAGES; s++) begin : g_rsp
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int p = 0; p < NUM_LSU; p++) begin
          rv_q[p][s] <= 1'b0;
          rd_q[p][s] <= '0;
        end
      end else begin
        for (int p = 0; p < NUM_LSU; p++) begin
          rv_q[p][s] <= rv_q[p][s-1];
          rd_q[p][s] <= rd_q[p][s-1];
        end
      end
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int p = 0; p < NUM_LSU; p++) begin
      rvalid_o[p] = rv_q[p][RSP_STAGES];
      rdata_o[p]  = rd_q[p][RSP_STAGES];
      for (int s = 0; s < 3; s++) busy |= tag_q[p][s].valid;
      for (int s = 0; s <= RSP_STAGES; s++) busy |= rv_q[p][s];
    end
    for (int b = 0; b < NUM_BANKS; b++) busy |= breq_q[b].req;
  end
  assign idle_o = !busy;

  for (genvar p = 0; p < NUM_LSU; p++) begin : g_chk
    a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      !(en_i && req_i[p]) || tgt_bank[p] < 30'(NUM_BANKS));
  end
endmodule
