// tb_spm_bank_mux: self-checking test of the per-bank SP/crossbar mux.
// Random requests on both sides; with the RA selected the crossbar request
// must pass unchanged, with the SP selected the SP request must pass with
// its req bit qualified by this bank's decoder enable.
module tb_spm_bank_mux;
  import spira_pkg::*;
  logic      sel_ra, sp_en;
  bank_req_t sp_req, ra_req, out, expv;
  int checks = 0, failures = 0;

  spm_bank_mux dut (.sel_ra_i(sel_ra), .sp_en_i(sp_en), .sp_req_i(sp_req),
                    .ra_req_i(ra_req), .bank_req_o(out));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      sel_ra = 1'($urandom); sp_en = 1'($urandom);
      sp_req = '{req: 1'($urandom), we: 1'($urandom), be: 4'($urandom),
                 waddr: 30'($urandom), wdata: $urandom};
      ra_req = '{req: 1'($urandom), we: 1'($urandom), be: 4'($urandom),
                 waddr: 30'($urandom), wdata: $urandom};
      #1;
      if (sel_ra) expv = ra_req;
      else begin
        expv = sp_req;
        expv.req = sp_req.req && sp_en;
      end
      checks++;
      if (out !== expv) begin
        failures++;
        $display("mismatch sel_ra=%0b sp_en=%0b: %h vs %h", sel_ra, sp_en, out, expv);
      end
    end
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
