// tb_spira_top_6x6: the end-to-end test of tb_spira_top run on the larger
// configuration used for MPEG2 kernels: six SPM banks of 256 KB and a
// 6x6 array, taken here to have six load-store ports. The behavioural SP
// touches all six banks and the behavioural RA runs six ports, so the same
// mechanisms (wakeup, per-bank SP access, RA-register and external access,
// RA invocation, owner switch, bank conflict, drain waits, irq) are counted.
module tb_spira_top_6x6;
  import spira_pkg::*;
  localparam int unsigned NUM_RA_REGS = 16;
  localparam int unsigned NUM_LSU = 6;
  localparam int unsigned NUM_BANKS = 6;
  localparam logic [31:0] BANK_BYTES = 32'h0004_0000;
  localparam int unsigned N = 32, OUTER = 3;
  localparam logic [31:0] A_BASE = 32'h0003_FFC0;   // banks 0 and 1
  localparam logic [31:0] B_BASE = 32'h000B_FFC0;   // banks 2 and 3
  localparam logic [31:0] START_PC = 32'h0000_0400;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic host_we, host_addr, host_irq;
  logic [31:0] host_wdata, host_rdata;
  logic sp_wakeup, sp_run, sp_sleep, sp_req, sp_we, sp_gnt, sp_rvalid;
  logic [31:0] sp_start_addr, sp_addr, sp_wdata, sp_rdata;
  logic [3:0] sp_be;
  logic ext_req, ext_we, ext_gnt, ext_rvalid;
  logic [3:0] ext_be;
  logic [31:0] ext_addr, ext_wdata, ext_rdata;
  logic ra_start, ra_run, ra_done, ra_reg_we;
  logic [31:0] ra_cfg [NUM_RA_REGS];
  logic [3:0] ra_reg_idx;
  logic [31:0] ra_reg_wdata;
  logic lsu_req [NUM_LSU], lsu_we [NUM_LSU], lsu_gnt [NUM_LSU];
  logic lsu_conflict [NUM_LSU], lsu_rvalid [NUM_LSU];
  logic [3:0] lsu_be [NUM_LSU];
  logic [31:0] lsu_addr [NUM_LSU], lsu_wdata [NUM_LSU], lsu_rdata [NUM_LSU];
  ctrl_state_e ctrl_state;

  spira_top #(.NUM_BANKS(NUM_BANKS), .NUM_LSU(NUM_LSU)) dut (
    .clk(clk), .rst_n(rst_n),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .host_rdata(host_rdata), .host_irq(host_irq),
    .sp_wakeup(sp_wakeup), .sp_start_addr(sp_start_addr), .sp_run(sp_run),
    .sp_sleep(sp_sleep), .sp_req(sp_req), .sp_we(sp_we), .sp_be(sp_be),
    .sp_addr(sp_addr), .sp_wdata(sp_wdata), .sp_gnt(sp_gnt), .sp_rvalid(sp_rvalid),
    .sp_rdata(sp_rdata),
    .ext_req(ext_req), .ext_we(ext_we), .ext_be(ext_be), .ext_addr(ext_addr),
    .ext_wdata(ext_wdata), .ext_gnt(ext_gnt), .ext_rvalid(ext_rvalid), .ext_rdata(ext_rdata),
    .ra_start(ra_start), .ra_run(ra_run), .ra_done(ra_done), .ra_cfg(ra_cfg),
    .ra_reg_we(ra_reg_we), .ra_reg_idx(ra_reg_idx), .ra_reg_wdata(ra_reg_wdata),
    .lsu_req(lsu_req), .lsu_we(lsu_we), .lsu_be(lsu_be), .lsu_addr(lsu_addr),
    .lsu_wdata(lsu_wdata), .lsu_gnt(lsu_gnt), .lsu_conflict(lsu_conflict),
    .lsu_rvalid(lsu_rvalid), .lsu_rdata(lsu_rdata), .ctrl_state(ctrl_state));

  int checks = 0, failures = 0, cycle = 0;
  int n_wakeup = 0, n_rareg = 0, n_ext = 0, n_ra_start = 0, n_switch = 0;
  int n_conflict = 0, n_sp_drain = 0, n_ra_drain = 0, n_irq = 0;
  int n_bank [NUM_BANKS];
  int n_sp_lat = 0, n_ra_lat = 0;
  logic sel_q;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ---------------------------------------------------------------- monitors
  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n) begin
    if (sp_wakeup) n_wakeup++;
    if (ra_start) n_ra_start++;
    if (host_irq) n_irq++;
    if (dut.sel_ra !== sel_q) n_switch++;
    sel_q = dut.sel_ra;
    for (int p = 0; p < NUM_LSU; p++) if (lsu_conflict[p]) n_conflict++;
    if (ctrl_state == CTRL_SP_DRN && !dut.sp_idle) n_sp_drain++;
    if (ctrl_state == CTRL_RA_RUN && ra_done && !dut.xbar_idle) n_ra_drain++;
    if (sp_req && sp_gnt) begin
      if (sp_addr < NUM_BANKS * BANK_BYTES) n_bank[sp_addr / BANK_BYTES]++;
      else if (sp_addr[31:12] == 20'h40000) n_rareg++;
      else n_ext++;
    end
    checks++;
    if (sp_run && ra_run) fail("SP and RA active together");
    if (ra_run !== dut.sel_ra) fail("SPM owner differs from the running unit");
  end

  // ------------------------------------------------------- external device
  always @(posedge clk) begin
    ext_rvalid <= 1'b0;
    if (ext_req && ext_gnt && !ext_we) begin
      ext_rvalid <= 1'b1;
      ext_rdata  <= ext_addr + 32'h1000_0000;
    end
  end
  assign ext_gnt = 1'b1;

  // ----------------------------------------------------- behavioural SP
  task automatic sp_store(logic [31:0] a, logic [31:0] d);
    sp_req = 1; sp_we = 1; sp_be = 4'hF; sp_addr = a; sp_wdata = d;
    do @(posedge clk); while (!sp_gnt);
    #1 sp_req = 0;
  endtask

  task automatic sp_load(logic [31:0] a, output logic [31:0] d, input bit fixed = 1);
    int t0;
    sp_req = 1; sp_we = 0; sp_be = 4'h0; sp_addr = a;
    do @(posedge clk); while (!sp_gnt);
    t0 = cycle;
    #1 sp_req = 0;
    while (!sp_rvalid) begin @(posedge clk); #1; end
    d = sp_rdata;
    if (fixed) begin
      checks++;
      if (cycle - t0 != 2) fail($sformatf("SP load latency %0d", cycle - t0));
      n_sp_lat++;
    end
  endtask

  function automatic logic [31:0] a_val(int it, int i);
    return 32'(it * 1000 + i * 7 + 3);
  endfunction

  task automatic sp_program();
    logic [31:0] d, e, sum;
    checks++;
    if (sp_start_addr !== START_PC) fail("start address");
    for (int it = 0; it < OUTER; it++) begin
      // outer-loop work: a scratch word in every bank, then the input array
      for (int b = 0; b < NUM_BANKS; b++) begin
        sp_store(32'(b) * BANK_BYTES + 32'h100, 32'(b * 17 + it));
        sp_load(32'(b) * BANK_BYTES + 32'h100, d);
        checks++;
        if (d !== 32'(b * 17 + it)) fail($sformatf("scratch word in bank %0d", b));
      end
      for (int i = 0; i < N; i++) sp_store(A_BASE + 32'(4*i), a_val(it, i));
      sp_load(32'h8000_0100 + 32'(4*it), d, 0);
      checks++;
      if (d !== 32'h9000_0100 + 32'(4*it)) fail("external load");
      // set up the RA and invoke it
      sp_store(RA_REG_BASE + 32'h4,  A_BASE);
      sp_store(RA_REG_BASE + 32'h8,  B_BASE);
      sp_store(RA_REG_BASE + 32'hC,  32'(N));
      sp_store(RA_REG_BASE + 32'h14, 32'(it + 2));
      sp_load(RA_REG_BASE + 32'hC, d);
      checks++;
      if (d !== 32'(N)) fail("RA register read-back");
      sp_store(RA_REG_BASE + 32'h0, 32'h1);
      // a load still in flight when the SP goes to sleep
      sp_req = 1; sp_we = 0; sp_addr = A_BASE;
      do @(posedge clk); while (!sp_gnt);
      #1 sp_req = 0; sp_sleep = 1;
      @(posedge clk); #1 sp_sleep = 0;
      checks++;
      if (sp_run) fail("SP still running after sleep");
      while (!sp_run) begin @(posedge clk); #1; end
      // resumed: check the RA's results through the SP's own path
      sum = 0;
      for (int i = 0; i < N; i++) begin
        e = a_val(it, i) * 32'(it + 2) + 1;
        sum += e;
        sp_load(B_BASE + 32'(4*i), d);
        checks++;
        if (d !== e) fail($sformatf("B[%0d] = %h, expected %h", i, d, e));
      end
      sp_load(RA_REG_BASE + 32'h10, d);
      checks++;
      if (d !== sum) fail($sformatf("live-out sum %h, expected %h", d, sum));
    end
    // kernel finished
    sp_sleep = 1;
    @(posedge clk); #1 sp_sleep = 0;
  endtask

  // ----------------------------------------------------- behavioural RA
  logic [31:0] ra_sum;
  int ports_done;

  task automatic ra_port(int p);
    logic [31:0] a_base, b_base, n, k, x;
    int t0;
    a_base = ra_cfg[1]; b_base = ra_cfg[2]; n = ra_cfg[3]; k = ra_cfg[5];
    for (int i = p; i < int'(n); i += NUM_LSU) begin
      lsu_req[p] = 1; lsu_we[p] = 0; lsu_be[p] = 4'h0; lsu_addr[p] = a_base + 32'(4*i);
      do @(posedge clk); while (!lsu_gnt[p]);
      t0 = cycle;
      #1 lsu_req[p] = 0;
      while (!lsu_rvalid[p]) begin @(posedge clk); #1; end
      x = lsu_rdata[p];
      checks++;
      if (cycle - t0 != 5) fail($sformatf("RA load latency %0d", cycle - t0));
      n_ra_lat++;
      x = x * k + 1;
      ra_sum += x;
      lsu_req[p] = 1; lsu_we[p] = 1; lsu_be[p] = 4'hF; lsu_addr[p] = b_base + 32'(4*i);
      lsu_wdata[p] = x;
      do @(posedge clk); while (!lsu_gnt[p]);
      #1 lsu_req[p] = 0;
    end
  endtask

  task automatic ra_kernel();
    ra_sum = 0;
    ports_done = 0;
    for (int p = 0; p < NUM_LSU; p++) begin
      automatic int pp = p;
      fork
        begin ra_port(pp); ports_done++; end
      join_none
    end
    while (ports_done != NUM_LSU) begin @(posedge clk); #1; end
    // live-out written back, then done right after the last store grant
    ra_reg_we = 1; ra_reg_idx = 4'd4; ra_reg_wdata = ra_sum; ra_done = 1;
    @(posedge clk); #1;
    ra_reg_we = 0; ra_done = 0;
  endtask

  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && ra_start) begin
        #1;
        checks++;
        if (!ra_run) fail("ra_start without ra_run");
        ra_kernel();
      end
    end
  end

  // ------------------------------------------------------------ host
  initial begin
    for (int b = 0; b < NUM_BANKS; b++) n_bank[b] = 0;
    host_we = 0; host_addr = 0; host_wdata = 0;
    sp_sleep = 0; sp_req = 0; sp_we = 0; sp_be = 0; sp_addr = 0; sp_wdata = 0;
    ra_done = 0; ra_reg_we = 0; ra_reg_idx = 0; ra_reg_wdata = 0;
    for (int p = 0; p < NUM_LSU; p++) begin
      lsu_req[p] = 0; lsu_we[p] = 0; lsu_be[p] = 0; lsu_addr[p] = 0; lsu_wdata[p] = 0;
    end
    sel_q = 0;
    rst_n = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    host_we = 1; host_addr = 0; host_wdata = START_PC;
    @(posedge clk); #1 host_we = 0;
    checks++;
    if (!sp_wakeup) fail("no wakeup pulse");
    sp_program();
    repeat (3) @(posedge clk); #1;
    host_addr = 1; #1;
    checks++;
    if (host_rdata !== 32'h2) fail($sformatf("host status %h", host_rdata));
    // every mechanism must have happened
    checks += 9 + NUM_BANKS;
    if (n_wakeup != 1)              fail("wakeup count");
    for (int b = 0; b < NUM_BANKS; b++) if (n_bank[b] == 0) fail($sformatf("no SP access to bank %0d", b));
    if (n_rareg == 0)               fail("no RA register access");
    if (n_ext != OUTER)             fail("external access count");
    if (n_ra_start != OUTER)        fail("RA invocation count");
    if (n_switch != 2 * OUTER)      fail("SPM owner switch count");
    if (n_conflict == 0)            fail("no bank conflict");
    if (n_sp_drain == 0)            fail("no SP drain wait");
    if (n_ra_drain == 0)            fail("no RA drain wait");
    if (n_irq != 1)                 fail("irq count");
    for (int b = 0; b < NUM_BANKS; b++) $display("SP accesses to bank %0d: %0d", b, n_bank[b]);
    $display("wakeup %0d, RA-reg %0d, ext %0d", n_wakeup, n_rareg, n_ext);
    $display("RA starts %0d, owner switches %0d, conflicts %0d, SP drains %0d, RA drains %0d, irq %0d",
             n_ra_start, n_switch, n_conflict, n_sp_drain, n_ra_drain, n_irq);
    $display("latency checks: SP %0d, RA %0d, total cycles %0d", n_sp_lat, n_ra_lat, cycle);
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
