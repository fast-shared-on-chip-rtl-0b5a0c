// spm_bank_mux: the two-way mux in front of one SPM bank.
//
// The bank's address and data lines are shared between the SP and the
// crossbar of the RA. Because the controller never lets SP and RA run at
// the same time, no arbitration is needed: the controller's select picks
// the owner, and it only changes when the SP or the RA changes power state.
// The SP side is qualified by this bank's enable from the SP address
// decoder; all banks see the same SP address lines. Purely combinational.
module spm_bank_mux
  import spira_pkg::*;
(
  input  logic      sel_ra_i,   // 1: the crossbar owns the bank
  input  logic      sp_en_i,    // this bank enabled by the SP address decoder
  input  bank_req_t sp_req_i,   // SP address/data lines (shared by all banks)
  input  bank_req_t ra_req_i,   // this bank's crossbar output
  output bank_req_t bank_req_o
);
  always_comb begin
    if (sel_ra_i) begin
      bank_req_o = ra_req_i;
    end else begin
      bank_req_o     = sp_req_i;
      bank_req_o.req = sp_req_i.req & sp_en_i;
    end
  end
endmodule
