// tb_ra_regs: self-checking test of the RA register file.
// SP stores and loads against a reference copy (loads must return exactly
// two cycles after the request), RA write-back with priority over the SP,
// the cfg outputs, and the one-cycle start pulse on a CTRL write with bit 0.
module tb_ra_regs;
  import spira_pkg::*;
  localparam int unsigned NR = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic sp_req, sp_we, ra_we, start;
  logic [3:0] sp_idx, ra_idx;
  logic [31:0] sp_wdata, sp_rdata, ra_wdata;
  logic [31:0] cfg [NR];
  logic [31:0] ref_r [NR];
  logic        exp_v [3];
  logic [31:0] exp_d [3];
  int checks = 0, failures = 0, starts_seen = 0, starts_exp = 0;

  ra_regs #(.NUM_RA_REGS(NR)) dut (
    .clk(clk), .rst_n(rst_n), .sp_req_i(sp_req), .sp_we_i(sp_we), .sp_idx_i(sp_idx),
    .sp_wdata_i(sp_wdata), .sp_rdata_o(sp_rdata), .cfg_o(cfg), .ra_we_i(ra_we),
    .ra_idx_i(ra_idx), .ra_wdata_i(ra_wdata), .start_o(start));

  always_ff @(posedge clk) begin
    exp_v[1] <= exp_v[0]; exp_d[1] <= exp_d[0];
    exp_v[2] <= exp_v[1]; exp_d[2] <= exp_d[1];
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (exp_v[2]) begin
        checks++;
        if (sp_rdata !== exp_d[2]) begin
          failures++; $display("load mismatch %h vs %h", sp_rdata, exp_d[2]);
        end
      end
      for (int i = 0; i < NR; i++) begin
        checks++;
        if (cfg[i] !== ref_r[i]) begin
          failures++; $display("cfg[%0d] %h vs %h", i, cfg[i], ref_r[i]);
        end
      end
      if (start) starts_seen++;
    end
  end

  // one cycle of stimulus; the reference is updated as the edge will do it
  task automatic cycle(logic rq, logic we, int idx, logic [31:0] d,
                       logic rwe = 0, int ridx = 0, logic [31:0] rd = 0);
    sp_req = rq; sp_we = we; sp_idx = 4'(idx); sp_wdata = d;
    ra_we = rwe; ra_idx = 4'(ridx); ra_wdata = rd;
    exp_v[0] = rq && !we; exp_d[0] = ref_r[idx];
    if (rq && we && idx == 0 && d[0]) starts_exp++;
    @(posedge clk);
    if (rwe) ref_r[ridx] = rd;
    else if (rq && we) ref_r[idx] = d;
    #1;
  endtask

  initial begin
    for (int i = 0; i < NR; i++) ref_r[i] = '0;
    exp_v[0] = 0; exp_v[1] = 0; exp_v[2] = 0;
    sp_req = 0; sp_we = 0; sp_idx = 0; sp_wdata = 0; ra_we = 0; ra_idx = 0; ra_wdata = 0;
    rst_n = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int i = 1; i < NR; i++) cycle(1, 1, i, $urandom);
    for (int i = 0; i < NR; i++) cycle(1, 0, i, 0);
    cycle(1, 1, 0, 32'h1);            // invoke
    cycle(0, 0, 0, 0);
    cycle(1, 1, 0, 32'h2);            // CTRL write without start bit
    cycle(0, 0, 0, 0, 1, 5, 32'hCAFE_F00D);   // RA live-out write-back
    cycle(1, 0, 5, 0);
    cycle(1, 1, 7, 32'h1111, 1, 7, 32'h2222); // collision: RA wins
    cycle(1, 0, 7, 0);
    for (int i = 0; i < 1000; i++)
      cycle(1'($urandom), 1'($urandom), $urandom_range(NR-1), $urandom,
            ($urandom_range(7) == 0), $urandom_range(NR-1), $urandom);
    cycle(0, 0, 0, 0); cycle(0, 0, 0, 0); cycle(0, 0, 0, 0);
    checks++;
    if (starts_seen != starts_exp) begin
      failures++; $display("start pulses %0d, expected %0d", starts_seen, starts_exp);
    end
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
