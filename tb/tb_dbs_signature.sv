// tb_dbs_signature -- self-checking test of the DBS read/write signature.
// Inserts random block addresses and checks, against a reference bit array
// indexed with integer arithmetic (block number mod 2048 and block number /
// 2048 mod 2048), that every inserted address hits (no false negatives),
// that untouched addresses hit exactly when the reference says so, and that
// clear empties the signature.
module tb_dbs_signature;
  localparam int N = 2048;
  logic clk = 0, rst_n = 0, clear = 0, insert = 0;
  logic [31:0] ins_addr, test_addr;
  logic hit;
  int checks = 0, failures = 0;
  bit refbits [N];
  logic [31:0] inserted [$];

  dbs_signature #(.SIG_BITS(N)) dut (.*);
  always #5 clk = ~clk;

  function automatic bit ref_hit(logic [31:0] a);
    int unsigned blk;
    blk = a / 64;
    return refbits[blk % N] && refbits[(blk / N) % N];
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_addr = 0; test_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      foreach (refbits[i]) refbits[i] = 0;
      inserted.delete();
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < 200; i++) begin
        logic [31:0] a;
        int unsigned blk;
        a = $urandom & 32'h0FFF_FFFF;
        @(negedge clk); insert = 1; ins_addr = a;
        @(negedge clk); insert = 0;
        blk = a / 64;
        refbits[blk % N] = 1;
        refbits[(blk / N) % N] = 1;
        inserted.push_back(a);
      end
      foreach (inserted[i]) begin
        test_addr = inserted[i]; #1;
        check("inserted address hits", hit, 1'b1);
      end
      for (int i = 0; i < 300; i++) begin
        test_addr = $urandom & 32'h0FFF_FFFF; #1;
        check("random address matches reference", hit, ref_hit(test_addr));
      end
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    foreach (inserted[i]) begin
      test_addr = inserted[i]; #1;
      check("cleared signature misses", hit, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
