// tb_spira_ctrl: self-checking test of the SPIRA controller.
// Walks the controller through host start, SP run, RA invocation with
// drain waits on both sides, SP resume and kernel end, checking the wakeup,
// start address, run/select outputs, RA start and irq pulses, the STATUS
// register and, every cycle, that SP and RA never run together.
module tb_spira_ctrl;
  import spira_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic host_we, host_addr, irq, sp_wakeup, sp_run, sp_sleep, sp_idle;
  logic ra_start_req, ra_start, ra_run, ra_done, xbar_idle, sel_ra;
  logic [31:0] host_wdata, host_rdata, sp_start_addr;
  ctrl_state_e state;
  int checks = 0, failures = 0;

  spira_ctrl dut (
    .clk(clk), .rst_n(rst_n), .host_we_i(host_we), .host_addr_i(host_addr),
    .host_wdata_i(host_wdata), .host_rdata_o(host_rdata), .irq_o(irq),
    .sp_wakeup_o(sp_wakeup), .sp_start_addr_o(sp_start_addr), .sp_run_o(sp_run),
    .sp_sleep_i(sp_sleep), .sp_idle_i(sp_idle), .ra_start_req_i(ra_start_req),
    .ra_start_o(ra_start), .ra_run_o(ra_run), .ra_done_i(ra_done),
    .xbar_idle_i(xbar_idle), .sel_ra_o(sel_ra), .state_o(state));

  task automatic expect_out(string what, logic spr, logic rar, logic wk, logic rs, logic iq);
    checks++;
    if (sp_run !== spr || ra_run !== rar || sel_ra !== rar || sp_wakeup !== wk ||
        ra_start !== rs || irq !== iq) begin
      failures++;
      $display("%s: sp_run=%b ra_run=%b sel_ra=%b wakeup=%b ra_start=%b irq=%b",
               what, sp_run, ra_run, sel_ra, sp_wakeup, ra_start, irq);
    end
  endtask

  task automatic expect_status(string what, logic [31:0] v);
    host_addr = 1'b1; #1;
    checks++;
    if (host_rdata !== v) begin
      failures++; $display("%s: status %h expected %h", what, host_rdata, v);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (sp_run && ra_run) begin failures++; $display("SP and RA both running"); end
  end

  initial begin
    host_we = 0; host_addr = 0; host_wdata = 0; sp_sleep = 0; sp_idle = 1;
    ra_start_req = 0; ra_done = 0; xbar_idle = 1;
    rst_n = 0; tick(); tick(); rst_n = 1;
    expect_out("idle", 0, 0, 0, 0, 0);
    expect_status("idle", 32'h0);
    // host writes the start address
    host_we = 1; host_addr = 0; host_wdata = 32'h0000_1230; tick(); host_we = 0;
    expect_out("woken", 1, 0, 1, 0, 0);
    checks++;
    if (sp_start_addr !== 32'h0000_1230) begin failures++; $display("start addr %h", sp_start_addr); end
    expect_status("busy", 32'h1);
    tick(); expect_out("sp running", 1, 0, 0, 0, 0);
    // a second START while busy is ignored
    host_we = 1; host_addr = 0; host_wdata = 32'hDEAD_0000; tick(); host_we = 0;
    checks++;
    if (sp_start_addr !== 32'h0000_1230) begin failures++; $display("START not ignored"); end
    // SP invokes the RA, then sleeps with a load still in flight
    ra_start_req = 1; tick(); ra_start_req = 0;
    expect_out("after invoke", 1, 0, 0, 0, 0);
    sp_sleep = 1; sp_idle = 0; tick(); sp_sleep = 0;
    expect_out("draining sp", 0, 0, 0, 0, 0);
    tick(); tick(); expect_out("still draining", 0, 0, 0, 0, 0);
    sp_idle = 1; tick();
    expect_out("ra started", 0, 1, 0, 1, 0);
    tick(); expect_out("ra running", 0, 1, 0, 0, 0);
    // RA done while its crossbar still holds a load
    xbar_idle = 0; ra_done = 1; tick(); ra_done = 0;
    expect_out("ra draining", 0, 1, 0, 0, 0);
    tick(); expect_out("ra draining 2", 0, 1, 0, 0, 0);
    xbar_idle = 1; tick();
    expect_out("sp resumed", 1, 0, 0, 0, 0);
    // second RA invocation, drains immediately
    ra_start_req = 1; tick(); ra_start_req = 0;
    sp_sleep = 1; tick(); sp_sleep = 0;
    tick(); expect_out("ra started 2", 0, 1, 0, 1, 0);
    ra_done = 1; tick(); ra_done = 0;
    expect_out("sp resumed 2", 1, 0, 0, 0, 0);
    // SP sleeps with nothing pending: kernel finished
    sp_sleep = 1; tick(); sp_sleep = 0;
    tick(); expect_out("finished", 0, 0, 0, 0, 1);
    expect_status("done", 32'h2);
    tick(); expect_out("idle again", 0, 0, 0, 0, 0);
    // a new START clears done
    host_we = 1; host_addr = 0; host_wdata = 32'h0000_4000; tick(); host_we = 0;
    expect_out("restart", 1, 0, 1, 0, 0);
    expect_status("restart", 32'h1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
