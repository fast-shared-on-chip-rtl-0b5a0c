// spm_bank: one bank of the shared scratchpad memory (SPM).
//
// A single-port synchronous memory with a pipelined two-cycle read: the
// request is sampled at a clock edge, the array is read into a register at
// that edge and the word moves to the output register at the next one, so
// read data is valid two cycles after the request cycle and a new request
// can be accepted every cycle. Writes take effect at the sampling edge and
// honour per-byte enables. The two-cycle load latency is the one the design
// is built around (an SRAM bank whose access time is a little over twice
// its cycle time); byte enables and the output register are this design's
// choices. Interface: one bank_req_t in, rdata out. Contents are not reset.
module spm_bank
  import spira_pkg::*;
#(
  parameter int unsigned WORDS = 65536   // 256 KB of 32-bit words
) (
  input  logic              clk,
  input  bank_req_t         req_i,
  output logic [DATA_W-1:0] rdata_o
);
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [DATA_W-1:0] mem [WORDS];
  logic [DATA_W-1:0] rd_q;
  logic [AW-1:0]     a;

  assign a = req_i.waddr[AW-1:0];

  always_ff @(posedge clk) begin
    if (req_i.req) begin
      if (req_i.we) begin
        for (int b = 0; b < BE_W; b++)
          if (req_i.be[b]) mem[a][8*b +: 8] <= req_i.wdata[8*b +: 8];
      end else begin
        rd_q <= mem[a];
      end
    end
    rdata_o <= rd_q;
  end
endmodule
