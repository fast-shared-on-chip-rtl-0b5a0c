// tb_spm_bank: self-checking test of one SPM bank.
// Writes words with random byte enables into a reference array, then reads
// them back with back-to-back requests and checks each word arrives exactly
// two cycles after its request.
module tb_spm_bank;
  import spira_pkg::*;
  localparam int unsigned WORDS = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  bank_req_t         req;
  logic [DATA_W-1:0] rdata;
  logic [DATA_W-1:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  spm_bank #(.WORDS(WORDS)) dut (.clk(clk), .req_i(req), .rdata_o(rdata));

  // expected read data pipeline
  logic              exp_v  [3];
  logic [DATA_W-1:0] exp_d  [3];

  always_ff @(posedge clk) begin
    exp_v[1] <= exp_v[0]; exp_d[1] <= exp_d[0];
    exp_v[2] <= exp_v[1]; exp_d[2] <= exp_d[1];
  end

  // compare in the cycle the data is due (two edges after the request)
  always @(negedge clk) begin
    if (exp_v[2]) begin
      checks++;
      if (rdata !== exp_d[2]) begin
        failures++;
        $display("read mismatch: got %h expected %h", rdata, exp_d[2]);
      end
    end
  end

  task automatic write_word(int a, logic [3:0] be, logic [31:0] d);
    req = '{req: 1'b1, we: 1'b1, be: be, waddr: 30'(a), wdata: d};
    exp_v[0] = 1'b0;
    for (int b = 0; b < 4; b++) if (be[b]) ref_mem[a][8*b +: 8] = d[8*b +: 8];
    @(posedge clk); #1;
  endtask

  task automatic read_word(int a);
    req = '{req: 1'b1, we: 1'b0, be: 4'h0, waddr: 30'(a), wdata: '0};
    exp_v[0] = 1'b1; exp_d[0] = ref_mem[a];
    @(posedge clk); #1;
  endtask

  initial begin
    req = '0;
    exp_v[0] = 0; exp_v[1] = 0; exp_v[2] = 0;
    @(posedge clk); #1;
    // full words first, then partial byte writes over them
    for (int a = 0; a < WORDS; a++) write_word(a, 4'hF, $urandom);
    for (int i = 0; i < 200; i++) write_word($urandom_range(WORDS-1), 4'($urandom), $urandom);
    for (int a = 0; a < WORDS; a++) read_word(a);
    // mixed traffic: reads interleaved with writes to other words
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(1)) read_word($urandom_range(WORDS-1));
      else write_word($urandom_range(WORDS-1), 4'($urandom), $urandom);
    end
    req = '0; exp_v[0] = 0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
