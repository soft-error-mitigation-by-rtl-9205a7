// tb_crc32_sig -- self-checking test of the CRC-32 verification signature.
// A reference model computes the same CRC byte by byte with a 256-entry table
// (a different algorithm from the unrolled bit-serial RTL) and the two are
// compared after every result. It also checks the known CRC-32 check value
// of the ASCII string "12345678" and the clear/valid-in-one-cycle case.
module tb_crc32_sig;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [63:0] data;
  logic [31:0] sig, sig_next;
  int checks = 0, failures = 0;
  logic [31:0] table_q [256];
  logic [31:0] ref_crc;

  crc32_sig #(.DATA_W(64)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_fold(logic [31:0] c, logic [63:0] d);
    for (int b = 0; b < 8; b++) c = (c >> 8) ^ table_q[(c ^ d[8*b +: 8]) & 8'hFF];
    return c;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [31:0] c;
      c = i;
      for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
      table_q[i] = c;
    end
    data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check("reset value", sig, 32'hFFFFFFFF);
    // "12345678" little-endian in one 64-bit word; standard CRC-32 = 9AE0DAAF
    @(negedge clk); clear = 1; valid = 1; data = 64'h3837363534333231;
    @(negedge clk); clear = 0; valid = 0;
    check("check value 12345678", ~sig, 32'h9AE0DAAF);
    // random stream with periodic clears
    ref_crc = 32'hFFFFFFFF;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 3) != 0);
      data  = {$urandom, $urandom};
      clear = (n % 37 == 36);
      if (clear) ref_crc = 32'hFFFFFFFF;
      if (valid) ref_crc = ref_fold(ref_crc, data);
      #1 check("sig_next", sig_next, ref_crc);
      @(posedge clk); #1 check("sig", sig, ref_crc);
    end
    valid = 0; clear = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
