// sp_addr_decoder: address decoder on the SP's data path.
//
// Splits a 32-bit SP byte address into one of three targets: an SPM bank,
// the RA register file or the external port. The SPM is laid out bank after
// bank from address 0 (bank = word address / WORDS), so the decoder's
// one-hot bank enable selects which bank answers while all banks receive the
// same word address. The RA registers sit in a 4 KB window at RA_REG_BASE;
// anything else is external. Combinational, no state.
// The need for a bank decoder on the SP side is the design's; the contiguous
// bank layout and the address map are this implementation's choice.
module sp_addr_decoder
  import spira_pkg::*;
#(
  parameter int unsigned NUM_BANKS   = 4,
  parameter int unsigned BANK_WORDS  = 65536,
  parameter int unsigned NUM_RA_REGS = 16
) (
  input  logic [ADDR_W-1:0]    addr_i,
  output logic                 hit_spm_o,
  output logic                 hit_rareg_o,
  output logic                 hit_ext_o,
  output logic [NUM_BANKS-1:0] bank_en_o,     // one-hot when hit_spm_o
  output logic [29:0]          bank_waddr_o,  // word address inside the bank
  output logic [$clog2(NUM_RA_REGS)-1:0] reg_idx_o
);
  localparam longint unsigned SPM_BYTES = longint'(NUM_BANKS) * BANK_WORDS * 4;

  logic [29:0] word;
  logic [29:0] bank;

  assign word = addr_i[31:2];

  always_comb begin
    hit_spm_o    = ({32'd0, addr_i} < SPM_BYTES);
    hit_rareg_o  = (addr_i >= RA_REG_BASE) && (addr_i < RA_REG_BASE + RA_REG_WINDOW);
    hit_ext_o    = !hit_spm_o && !hit_rareg_o;
    bank         = 30'(word / BANK_WORDS);
    bank_waddr_o = 30'(word % BANK_WORDS);
    bank_en_o    = '0;
    for (int b = 0; b < NUM_BANKS; b++)
      bank_en_o[b] = hit_spm_o && (bank == 30'(b));
    reg_idx_o    = addr_i[2 +: $clog2(NUM_RA_REGS)];
  end
endmodule
