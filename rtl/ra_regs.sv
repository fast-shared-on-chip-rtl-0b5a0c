// ra_regs: the RA's register file as seen by the sequential processor.
//
// Before invoking the array, the SP initialises RA registers (loop bounds,
// base addresses, configuration pointers and similar live-in values) with
// ordinary store instructions, and reads live-out values back afterwards.
// Every register drives the array directly (cfg_o). Register RAREG_CTRL is
// special: an SP store with bit 0 set raises start_o for one cycle, which
// asks the controller to hand over to the RA. The RA writes its results
// back through its own write port, which wins over the SP on a collision
// (the two are never active together in normal operation).
// Timing: SP stores take effect at the request edge; SP loads return two
// cycles after the request cycle, the RA-register latency the design
// assumes. The number of registers, their meaning and the start bit are
// this implementation's choices. All registers reset to zero.
module ra_regs
  import spira_pkg::*;
#(
  parameter int unsigned NUM_RA_REGS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // SP port
  input  logic                    sp_req_i,
  input  logic                    sp_we_i,
  input  logic [$clog2(NUM_RA_REGS)-1:0] sp_idx_i,
  input  logic [DATA_W-1:0]       sp_wdata_i,
  output logic [DATA_W-1:0]       sp_rdata_o,
  // RA side
  output logic [DATA_W-1:0]       cfg_o [NUM_RA_REGS],
  input  logic                    ra_we_i,
  input  logic [$clog2(NUM_RA_REGS)-1:0] ra_idx_i,
  input  logic [DATA_W-1:0]       ra_wdata_i,
  // to the controller
  output logic                    start_o
);
  logic [DATA_W-1:0] regs_q [NUM_RA_REGS];
  logic [DATA_W-1:0] rd1_q, rd2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_RA_REGS; i++) regs_q[i] <= '0;
      rd1_q   <= '0;
      rd2_q   <= '0;
      start_o <= 1'b0;
    end else begin
      start_o <= sp_req_i && sp_we_i && (int'(sp_idx_i) == RAREG_CTRL) && sp_wdata_i[0];
      if (ra_we_i)
        regs_q[ra_idx_i] <= ra_wdata_i;
      else if (sp_req_i && sp_we_i)
        regs_q[sp_idx_i] <= sp_wdata_i;
      if (sp_req_i && !sp_we_i)
        rd1_q <= regs_q[sp_idx_i];
      rd2_q <= rd1_q;
    end
  end

  assign sp_rdata_o = rd2_q;
  assign cfg_o      = regs_q;
endmodule
