// tb_sp_mem_if: self-checking test of the SP memory interface.
// Random SP loads and stores to the SPM (four small banks modelled here),
// the RA registers (a two-cycle register model) and an external port whose
// model grants and answers after random delays. Checks: load data against
// a reference memory, SPM and RA-register loads returning exactly two
// cycles after acceptance, responses in request order, the one-hot bank
// enable, no grants while disabled, and idle_o.
module tb_sp_mem_if;
  import spira_pkg::*;
  localparam int unsigned NB = 4, BWORDS = 64, NR = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, en;

  logic req, we, gnt, rvalid, idle;
  logic [3:0] be;
  logic [31:0] addr, wdata, rdata;
  bank_req_t spm_req;
  logic [NB-1:0] bank_en;
  logic [31:0] spm_rdata [NB];
  logic rareg_req, rareg_we;
  logic [3:0] rareg_idx;
  logic [31:0] rareg_wdata, rareg_rdata;
  logic ext_req, ext_we, ext_gnt, ext_rvalid;
  logic [3:0] ext_be;
  logic [31:0] ext_addr, ext_wdata, ext_rdata;

  sp_mem_if #(.NUM_BANKS(NB), .BANK_WORDS(BWORDS), .NUM_RA_REGS(NR)) dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .req_i(req), .we_i(we), .be_i(be),
    .addr_i(addr), .wdata_i(wdata), .gnt_o(gnt), .rvalid_o(rvalid), .rdata_o(rdata),
    .idle_o(idle), .spm_req_o(spm_req), .spm_bank_en_o(bank_en), .spm_rdata_i(spm_rdata),
    .rareg_req_o(rareg_req), .rareg_we_o(rareg_we), .rareg_idx_o(rareg_idx),
    .rareg_wdata_o(rareg_wdata), .rareg_rdata_i(rareg_rdata),
    .ext_req_o(ext_req), .ext_we_o(ext_we), .ext_be_o(ext_be), .ext_addr_o(ext_addr),
    .ext_wdata_o(ext_wdata), .ext_gnt_i(ext_gnt), .ext_rvalid_i(ext_rvalid),
    .ext_rdata_i(ext_rdata));

  // SPM bank models (two-cycle reads, byte enables)
  logic [31:0] mem [NB][BWORDS];
  logic [31:0] r1 [NB];
  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      if (spm_req.req && bank_en[b]) begin
        if (spm_req.we) begin
          for (int k = 0; k < 4; k++)
            if (spm_req.be[k]) mem[b][spm_req.waddr[5:0]][8*k +: 8] <= spm_req.wdata[8*k +: 8];
        end else r1[b] <= mem[b][spm_req.waddr[5:0]];
      end
      spm_rdata[b] <= r1[b];
    end
  end

  // RA register model (two-cycle reads)
  logic [31:0] regs [NR];
  logic [31:0] rr1;
  always_ff @(posedge clk) begin
    if (rareg_req && rareg_we) regs[rareg_idx] <= rareg_wdata;
    if (rareg_req && !rareg_we) rr1 <= regs[rareg_idx];
    rareg_rdata <= rr1;
  end

  // external model: random grant, answers a load 1..4 cycles later
  int ext_delay;
  logic ext_busy;
  logic [31:0] ext_a;
  always @(posedge clk) begin
    ext_rvalid <= 1'b0;
    if (ext_busy) begin
      if (ext_delay == 0) begin
        ext_rvalid <= 1'b1; ext_rdata <= ext_a ^ 32'h5A5A_0F0F; ext_busy <= 1'b0;
      end else ext_delay <= ext_delay - 1;
    end else if (ext_req && ext_gnt && !ext_we) begin
      ext_busy <= 1'b1; ext_a <= ext_addr; ext_delay <= $urandom_range(3);
    end
    ext_gnt <= 1'($urandom);
  end

  int checks = 0, failures = 0, cycle = 0;
  int n_spm = 0, n_reg = 0, n_ext = 0;
  logic [31:0] ref_spm [NB*BWORDS];
  logic [31:0] ref_reg [NR];
  typedef struct { int t; logic fixed; logic [31:0] d; } exp_t;
  exp_t q [$];

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n) begin
    if (rvalid) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected rvalid"); end
      else begin
        exp_t e;
        e = q.pop_front();
        if (rdata !== e.d) begin failures++; $display("data %h vs %h", rdata, e.d); end
        if (e.fixed) begin
          checks++;
          if (cycle - e.t != 2) begin failures++; $display("latency %0d", cycle - e.t); end
        end
      end
    end
    if (spm_req.req) begin
      checks++;
      if (!$onehot(bank_en)) begin failures++; $display("bank enable not one-hot"); end
    end
  end

  task automatic pick();
    int kind;
    kind = $urandom_range(9);
    we = 1'($urandom); be = we ? 4'($urandom) : 4'h0; wdata = $urandom;
    if (kind < 6)      addr = 32'($urandom_range(NB*BWORDS-1)) << 2;
    else if (kind < 8) addr = 32'h4000_0000 | (32'($urandom_range(NR-1)) << 2);
    else               addr = 32'h8000_0000 | (32'($urandom_range(255)) << 2);
    if (addr >= 32'h4000_0000 && addr < 32'h8000_0000) be = we ? 4'hF : 4'h0;
  endtask

  initial begin
    for (int i = 0; i < NB*BWORDS; i++) ref_spm[i] = '0;
    for (int b = 0; b < NB; b++) for (int i = 0; i < BWORDS; i++) mem[b][i] = '0;
    for (int i = 0; i < NR; i++) begin ref_reg[i] = '0; regs[i] = '0; end
    ext_busy = 0; ext_rvalid = 0; ext_gnt = 0; ext_rdata = 0; ext_delay = 0;
    req = 0; we = 0; be = 0; addr = 0; wdata = 0; en = 0; rst_n = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    // disabled: nothing is accepted
    req = 1; addr = 0;
    repeat (3) begin #1; checks++; if (gnt || spm_req.req) begin failures++; $display("grant while disabled"); end @(posedge clk); #1; end
    en = 1;
    pick();
    repeat (4000) begin
      #1;
      if (req && gnt) begin
        if (addr < 32'h4000_0000) begin
          n_spm++;
          if (we) begin
            for (int k = 0; k < 4; k++) if (be[k]) ref_spm[addr[31:2]][8*k +: 8] = wdata[8*k +: 8];
          end else q.push_back('{cycle, 1'b1, ref_spm[addr[31:2]]});
        end else if (addr < 32'h8000_0000) begin
          n_reg++;
          if (we) ref_reg[addr[5:2]] = wdata;
          else q.push_back('{cycle, 1'b1, ref_reg[addr[5:2]]});
        end else begin
          n_ext++;
          if (!we) q.push_back('{cycle, 1'b0, addr ^ 32'h5A5A_0F0F});
        end
        @(posedge clk); #1;
        if ($urandom_range(3) == 0) req = 0; else begin req = 1; pick(); end
      end else begin
        @(posedge clk); #1;
        if (!req) begin req = 1; pick(); end
      end
    end
    req = 0;
    repeat (8) @(posedge clk); #1;
    checks += 3;
    if (!idle) begin failures++; $display("not idle at end"); end
    if (q.size() != 0) begin failures++; $display("%0d loads lost", q.size()); end
    if (n_spm < 100 || n_reg < 30 || n_ext < 30) begin failures++; $display("too little traffic"); end
    $display("spm %0d, rareg %0d, ext %0d accesses", n_spm, n_reg, n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
