// tb_xbar: self-checking test of the RA crossbar.
// Four load-store ports issue random loads and stores into four small
// banks, modelled here as two-cycle memories. Each port uses its own words
// (word number mod 4 = port), so every load has a known value. Checks: load
// data, a load latency of exactly 3 + RSP_STAGES cycles after the grant,
// at most one grant per bank per cycle, that a losing port waits at most
// three cycles (round robin), no grants while disabled, and idle_o.
module tb_xbar;
  import spira_pkg::*;
  localparam int unsigned NP = 4, NB = 4, BWORDS = 64, RSP = 2;
  localparam int unsigned LAT = 3 + RSP;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, en;

  logic              req [NP], we [NP], gnt [NP], conflict [NP], rvalid [NP];
  logic [3:0]        be [NP];
  logic [31:0]       addr [NP], wdata [NP], rdata [NP];
  bank_req_t         breq [NB];
  logic [31:0]       brdata [NB];
  logic              idle;

  xbar #(.NUM_LSU(NP), .NUM_BANKS(NB), .BANK_WORDS(BWORDS), .RSP_STAGES(RSP)) dut (
    .clk(clk), .rst_n(rst_n), .en_i(en), .req_i(req), .we_i(we), .be_i(be),
    .addr_i(addr), .wdata_i(wdata), .gnt_o(gnt), .conflict_o(conflict),
    .rvalid_o(rvalid), .rdata_o(rdata), .bank_req_o(breq), .bank_rdata_i(brdata),
    .idle_o(idle));

  // bank models: two-cycle read latency
  logic [31:0] mem [NB][BWORDS];
  logic [31:0] r1 [NB];
  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      if (breq[b].req) begin
        if (breq[b].we) mem[b][breq[b].waddr[5:0]] <= breq[b].wdata;
        else r1[b] <= mem[b][breq[b].waddr[5:0]];
      end
      brdata[b] <= r1[b];
    end
  end

  int checks = 0, failures = 0, cycle = 0, conflicts = 0, loads_done = 0;
  logic [31:0] ref_mem [NB*BWORDS];
  int          wait_cnt [NP];
  int          lat_q [NP][$];
  logic [31:0] dat_q [NP][$];

  always @(posedge clk) cycle <= cycle + 1;

  // per-port traffic generator: holds the request until granted
  task automatic new_req(int p);
    int w;
    w = ($urandom_range(NB*BWORDS/NP - 1) * NP) + p;
    req[p]   = ($urandom_range(3) != 0);
    we[p]    = 1'($urandom);
    be[p]    = 4'hF;
    addr[p]  = 32'(w) << 2;
    wdata[p] = $urandom;
  endtask

  // checks and bookkeeping just before each rising edge
  always @(negedge clk) if (rst_n) begin
    int ngnt [NB];
    for (int b = 0; b < NB; b++) ngnt[b] = 0;
    for (int p = 0; p < NP; p++) begin
      if (gnt[p]) begin
        ngnt[addr[p][31:2] / BWORDS]++;
        checks++;
        if (!req[p] || !en) begin failures++; $display("grant without request/enable"); end
      end
      if (conflict[p]) conflicts++;
      if (rvalid[p]) begin
        checks += 2;
        if (lat_q[p].size() == 0) begin failures += 2; $display("port %0d unexpected rvalid", p); end
        else begin
          int t; logic [31:0] d;
          t = lat_q[p].pop_front(); d = dat_q[p].pop_front();
          if (cycle - t != LAT) begin failures++; $display("port %0d latency %0d", p, cycle - t); end
          if (rdata[p] !== d) begin failures++; $display("port %0d data %h vs %h", p, rdata[p], d); end
          loads_done++;
        end
      end
    end
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (ngnt[b] > 1) begin failures++; $display("bank %0d granted twice", b); end
    end
  end

  initial begin
    for (int i = 0; i < NB*BWORDS; i++) ref_mem[i] = '0;
    for (int b = 0; b < NB; b++) for (int i = 0; i < BWORDS; i++) mem[b][i] = '0;
    for (int p = 0; p < NP; p++) begin req[p] = 0; we[p] = 0; be[p] = 0; addr[p] = 0; wdata[p] = 0; wait_cnt[p] = 0; end
    en = 0; rst_n = 0;
    repeat (2) @(posedge clk); #1; rst_n = 1;
    // disabled: requests must not be granted
    for (int p = 0; p < NP; p++) begin req[p] = 1; we[p] = 0; addr[p] = 32'(p) << 2; end
    repeat (3) begin
      #1;
      for (int p = 0; p < NP; p++) begin checks++; if (gnt[p]) begin failures++; $display("grant while disabled"); end end
      @(posedge clk); #1;
    end
    en = 1;
    for (int p = 0; p < NP; p++) new_req(p);
    repeat (3000) begin
      #1;
      for (int p = 0; p < NP; p++) begin
        if (req[p] && gnt[p]) begin
          if (we[p]) ref_mem[addr[p][31:2]] = wdata[p];
          else begin lat_q[p].push_back(cycle); dat_q[p].push_back(ref_mem[addr[p][31:2]]); end
          wait_cnt[p] = 0;
        end else if (req[p]) begin
          wait_cnt[p]++;
          checks++;
          if (wait_cnt[p] > NP - 1) begin failures++; $display("port %0d starved", p); end
        end
      end
      @(posedge clk); #1;
      for (int p = 0; p < NP; p++) if (!req[p] || gnt_seen(p)) new_req(p);
    end
    for (int p = 0; p < NP; p++) req[p] = 0;
    repeat (LAT + 2) @(posedge clk);
    #1;
    checks++;
    if (!idle) begin failures++; $display("not idle at end"); end
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (lat_q[p].size() != 0) begin failures++; $display("port %0d lost loads", p); end
    end
    checks++;
    if (conflicts == 0 || loads_done < 500) begin failures++; $display("too little traffic"); end
    $display("conflict cycles %0d, loads %0d", conflicts, loads_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the grant of the previous cycle, sampled at the edge
  logic gnt_q [NP];
  always @(posedge clk) for (int p = 0; p < NP; p++) gnt_q[p] <= gnt[p] && req[p];
  function automatic logic gnt_seen(int p);
    return gnt_q[p];
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
