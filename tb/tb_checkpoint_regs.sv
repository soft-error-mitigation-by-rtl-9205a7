// tb_checkpoint_regs -- self-checking test of the register checkpoint.
// Random register snapshots are captured now and then; every restore must
// return, one cycle later, the most recent capture.
module tb_checkpoint_regs;
  localparam int NR = 32, XL = 64;
  logic clk = 0, rst_n = 0, capture = 0, restore = 0, rst_valid;
  logic [NR-1:0][XL-1:0] cap_regs, rst_regs, model;
  int checks = 0, failures = 0;
  checkpoint_regs #(.NREGS(NR), .XLEN(XL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cap_regs = '0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) cap_regs[r] = {$urandom, $urandom};
      capture = ($urandom_range(0, 3) == 0);
      restore = !capture && ($urandom_range(0, 2) == 0);
      @(posedge clk);
      if (capture) model = cap_regs;
      #1;
      checks++;
      if (rst_valid != restore) begin failures++; $display("FAIL rst_valid"); end
      if (restore) begin
        checks++;
        if (rst_regs != model) begin failures++; $display("FAIL restored registers"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
