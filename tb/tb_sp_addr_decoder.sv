// tb_sp_addr_decoder: self-checking test of the SP address decoder.
// Checks bank boundaries, the RA register window, external addresses and
// random addresses against an independent computation of the address map
// (SPM banks of BANK_WORDS words from address 0, RA registers in a 4 KB
// window at 0x4000_0000).
module tb_sp_addr_decoder;
  import spira_pkg::*;
  localparam int unsigned NB = 4, BW = 65536, NR = 16;
  logic [31:0] addr;
  logic hit_spm, hit_rareg, hit_ext;
  logic [NB-1:0] bank_en;
  logic [29:0] waddr;
  logic [3:0] idx;
  int checks = 0, failures = 0;

  sp_addr_decoder #(.NUM_BANKS(NB), .BANK_WORDS(BW), .NUM_RA_REGS(NR)) dut (
    .addr_i(addr), .hit_spm_o(hit_spm), .hit_rareg_o(hit_rareg), .hit_ext_o(hit_ext),
    .bank_en_o(bank_en), .bank_waddr_o(waddr), .reg_idx_o(idx));

  task automatic check(logic [31:0] a);
    logic e_spm, e_reg, e_ext;
    logic [NB-1:0] e_en;
    logic [29:0] e_w;
    addr = a; #1;
    e_spm = a < 32'h0010_0000;                       // 4 x 256 KB
    e_reg = a[31:12] == 20'h40000;
    e_ext = !e_spm && !e_reg;
    e_en  = e_spm ? (NB'(1) << a[19:18]) : '0;
    e_w   = {14'd0, a[17:2]};
    checks++;
    if (hit_spm !== e_spm || hit_rareg !== e_reg || hit_ext !== e_ext ||
        bank_en !== e_en || (e_spm && waddr !== e_w) || (e_reg && idx !== a[5:2])) begin
      failures++;
      $display("addr %h: spm=%b reg=%b ext=%b en=%b w=%h idx=%h", a, hit_spm,
               hit_rareg, hit_ext, bank_en, waddr, idx);
    end
  endtask

  initial begin
    check(32'h0); check(32'h3FFFC); check(32'h40000); check(32'h7FFFC);
    check(32'h80000); check(32'hC0000); check(32'hFFFFC); check(32'h100000);
    check(32'h4000_0000); check(32'h4000_003C); check(32'h4000_0FFC);
    check(32'h4000_1000); check(32'h3FFF_FFFC); check(32'hFFFF_FFFC);
    for (int i = 0; i < 1000; i++) check({12'd0, 20'($urandom)} & ~32'h3);
    for (int i = 0; i < 300; i++) check(32'h4000_0000 | (32'($urandom) & 32'hFFC));
    for (int i = 0; i < 300; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
